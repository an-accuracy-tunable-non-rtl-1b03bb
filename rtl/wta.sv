// wta: winner-take-all stage of the read-out circuit.
//
// Each of the K inputs is the 1-bit comparator output of one coupled
// oscillator; it goes high when that oscillator has synchronized. In every
// cycle in which at least one oscillator that has not won before goes high,
// the WTA pulses `valid` for one cycle and reports on `index_now` the lowest
// index among the new ones (ties go to the smaller index). `index` holds the
// last winner until the next one, so it stays readable after the instruction
// ends. Simultaneous synchronizations produce a single `valid`, which is what
// makes the N-th *distinct* maximum/minimum instructions count equal samples
// once. `disable_i` (Execution Over) stops all further reporting.
//
// An oscillator is counted at most once per instruction: a sticky mask of
// winners, cleared by `clear` (the global controller's Reset Counter), masks
// inputs that stay high or pulse again. That mask, the lowest-index priority
// and the synchronous sampling of the inputs are this design's choices; the
// behaviour of reporting the first oscillator to synchronize and pulsing
// Valid on each synchronization follows the description of the read-out
// circuit.
//
// Timing: `valid`, `index_now` and `new_mask` are combinational from `sync`;
// `index` and the winner mask update at the next rising clock edge.
module wta #(
  parameter int unsigned K  = coproc_pkg::K_DEF,
  localparam int unsigned IW = $clog2(K)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          clear,
  input  logic [K-1:0]  sync,
  input  logic          disable_i,
  output logic          valid,
  output logic [IW-1:0] index_now,
  output logic [IW-1:0] index,
  output logic [K-1:0]  new_mask
);

  logic [K-1:0] seen_q;

  always_comb begin
    new_mask  = (disable_i || clear) ? '0 : (sync & ~seen_q);
    valid     = |new_mask;
    index_now = '0;
    for (int j = K - 1; j >= 0; j--) begin
      if (new_mask[j]) index_now = IW'(j);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      seen_q <= '0;
      index  <= '0;
    end else if (clear) begin
      seen_q <= '0;
      index  <= '0;
    end else begin
      seen_q <= seen_q | new_mask;
      if (valid) index <= index_now;
    end
  end

endmodule
