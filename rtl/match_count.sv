// match_count: match-counting (MC) variant of the winner-take-all stage.
//
// It reports what the WTA reports (a `valid` pulse per synchronization event,
// the lowest new index, the held last index) and in addition `match_count`,
// the number of oscillators that synchronized in that same cycle. Feeding
// `match_count` to the counter instead of 1 makes the N-th maximum/minimum
// count duplicate samples individually (N-th max rather than N-th distinct
// max), and leaves gaps in the sorted array where duplicates occurred.
//
// It is built from the `wta` module plus a population count of the newly
// synchronized oscillators, which is the simplest circuit that gives the
// described Match Count output; the population-count structure is this
// design's choice. Timing as `wta`: outputs are combinational from `sync`.
module match_count #(
  parameter int unsigned K  = coproc_pkg::K_DEF,
  localparam int unsigned IW = $clog2(K),
  localparam int unsigned CW = $clog2(K + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          clear,
  input  logic [K-1:0]  sync,
  input  logic          disable_i,
  output logic          valid,
  output logic [IW-1:0] index_now,
  output logic [IW-1:0] index,
  output logic [CW-1:0] mcount
);

  logic [K-1:0] new_mask;

  wta #(.K(K)) u_wta (
    .clk, .rst_n, .clear, .sync, .disable_i,
    .valid, .index_now, .index, .new_mask
  );

  always_comb begin
    mcount = '0;
    for (int j = 0; j < K; j++) mcount = mcount + CW'(new_mask[j]);
  end

endmodule
