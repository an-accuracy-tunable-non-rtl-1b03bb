// sorted_array: the K-entry queue memory of the read-out circuit.
//
// On every synchronization event (`write_en`, the WTA's Valid) the data input
// (normally the current Timer Value) is written at the address held by the
// Log(K)-counter, which then advances; so after a sort the synchronization
// times sit in the array in the order the oscillators synchronized, i.e.
// sorted. The host reads it through `addr_out` / `data_out`.
//
// `write_count` says how many consecutive entries, starting at `addr_in`,
// take the data in one write. With the WTA it is always 1, as in the basic
// read-out. With the match-counting read-out it may be the Match Count, so
// that p oscillators synchronizing together fill p entries instead of leaving
// p-1 gaps (the "multiple writes" extension the design description mentions;
// a range write is this design's way of doing it in one cycle).
//
// Each entry is TW = 16 bits (the timer width). The address input is as wide
// as the counter (clog2(K+1) bits); entries at K and above are dropped. The
// read port is combinational. Those three are this design's choices. Written
// as a plain array; no reset (entries are only meaningful once written by the
// current instruction).
module sorted_array #(
  parameter int unsigned K  = coproc_pkg::K_DEF,
  parameter int unsigned TW = coproc_pkg::TW,
  localparam int unsigned IW = $clog2(K),
  localparam int unsigned CW = $clog2(K + 1)
) (
  input  logic          clk,
  input  logic          write_en,
  input  logic [CW-1:0] addr_in,
  input  logic [CW-1:0] write_count,
  input  logic [TW-1:0] data_in,
  input  logic [IW-1:0] addr_out,
  output logic [TW-1:0] data_out
);

  logic [TW-1:0] mem [K];
  logic [CW:0]   addr_end;

  assign addr_end = {1'b0, addr_in} + {1'b0, write_count};

  always_ff @(posedge clk) begin
    for (int unsigned i = 0; i < K; i++) begin
      if (write_en && ((CW+1)'(i) >= {1'b0, addr_in}) && ((CW+1)'(i) < addr_end))
        mem[i] <= data_in;
    end
  end

  assign data_out = mem[addr_out];

endmodule
