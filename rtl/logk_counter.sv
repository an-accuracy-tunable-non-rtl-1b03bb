// logk_counter: the Log(K)-counter of the read-out circuit.
//
// Counts synchronization events of the current instruction. When `incr` (the
// WTA's Valid) is high it adds `step` (1 with the WTA, the Match Count with
// the MC circuit); `reset_count` (Reset Counter, asserted at the start of
// every instruction) sets it back to zero. Its value addresses the sorted
// array, so each synchronization is written one slot after the previous one.
//
// The counter is clog2(K+1) bits wide, one bit more than log2(K), so that it
// can reach K itself (N = K is a legal argument); it saturates at K. Both are
// this design's choices. `count_next` is the value after this cycle's edge,
// used by the comparator to end an instruction in the cycle of the N-th
// synchronization. Registered output, one update per rising clock edge.
module logk_counter #(
  parameter int unsigned K  = coproc_pkg::K_DEF,
  localparam int unsigned CW = $clog2(K + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          reset_count,
  input  logic          incr,
  input  logic [CW-1:0] step,
  output logic [CW-1:0] count,
  output logic [CW-1:0] count_next
);

  logic [CW:0] sum;

  always_comb begin
    sum = {1'b0, count} + {1'b0, step};
    if (reset_count)      count_next = '0;
    else if (!incr)       count_next = count;
    else if (sum > (CW+1)'(K))     count_next = CW'(K);
    else                  count_next = sum[CW-1:0];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) count <= '0;
    else        count <= count_next;
  end

endmodule
