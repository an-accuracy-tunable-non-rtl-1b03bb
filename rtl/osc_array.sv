// osc_array: behavioural model of the array of K two-input coupled
// oscillators. Oscillator j receives the pair (in_a[j], in_b[j]) from the
// latching circuitry and its comparator output drives input j of the
// read-out circuit's winner-take-all stage. See coupled_osc_pair for the
// timing model; the array adds nothing but the replication.
module osc_array #(
  parameter int unsigned K                = coproc_pkg::K_DEF,
  parameter int unsigned SW               = coproc_pkg::SW,
  parameter int unsigned LOCK_CYCLES      = 2,
  parameter int unsigned CYCLES_PER_LEVEL = 4,
  parameter int unsigned MAX_SYNC_DIFF    = 2**SW - 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 restart,
  input  logic [K-1:0][SW-1:0] in_a,
  input  logic [K-1:0][SW-1:0] in_b,
  output logic [K-1:0]         sync
);

  for (genvar j = 0; j < K; j++) begin : g_osc
    coupled_osc_pair #(
      .SW(SW), .LOCK_CYCLES(LOCK_CYCLES), .CYCLES_PER_LEVEL(CYCLES_PER_LEVEL),
      .MAX_SYNC_DIFF(MAX_SYNC_DIFF)
    ) u_pair (
      .clk, .rst_n, .restart, .in_a(in_a[j]), .in_b(in_b[j]), .sync(sync[j])
    );
  end

endmodule
