// coupled_osc_pair: behavioural model of one two-input coupled nano-oscillator
// together with the 1-bit comparator on its output.
//
// This is a model of an analog part, not logic to be synthesized. A pair of
// coupled oscillators fed with two input levels locks after a time that grows
// with the difference between the levels; a comparator on the coupled output
// then goes high ("synchronized"). The model counts clock cycles since the
// inputs were last applied (a change of either input, or `restart` when the
// latching circuitry re-applies them) and raises `sync` once
//     elapsed >= LOCK_CYCLES + |in_a - in_b| * CYCLES_PER_LEVEL,
// provided |in_a - in_b| <= MAX_SYNC_DIFF. MAX_SYNC_DIFF stands for the
// comparator threshold that sets the input resolution of a physical device:
// 2**SW-1 lets every pair lock eventually (like the Kuramoto soft model), 0
// lets only equal levels lock (like a HyperFET pair whose comparator only
// fires within one 12 mV step). The proportional lock time and the role of
// the threshold follow the device description; all cycle numbers are this
// model's own.
//
// `sync` is registered: it is high from the cycle after the condition is met
// until the inputs change or `restart` is asserted.
module coupled_osc_pair #(
  parameter int unsigned SW               = coproc_pkg::SW,
  parameter int unsigned LOCK_CYCLES      = 2,
  parameter int unsigned CYCLES_PER_LEVEL = 4,
  parameter int unsigned MAX_SYNC_DIFF    = 2**SW - 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          restart,
  input  logic [SW-1:0] in_a,
  input  logic [SW-1:0] in_b,
  output logic          sync
);

  localparam int unsigned EW = 16;

  logic [SW-1:0] a_q, b_q;
  logic [EW-1:0] elapsed_q;
  logic [SW-1:0] diff;
  logic [EW-1:0] lock_time;
  logic          applied;

  assign diff      = (in_a > in_b) ? (in_a - in_b) : (in_b - in_a);
  assign lock_time = EW'(LOCK_CYCLES) + EW'(diff) * EW'(CYCLES_PER_LEVEL);
  assign applied   = restart || (in_a != a_q) || (in_b != b_q);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_q       <= '0;
      b_q       <= '0;
      elapsed_q <= '0;
      sync      <= 1'b0;
    end else begin
      a_q <= in_a;
      b_q <= in_b;
      if (applied) begin
        elapsed_q <= '0;
        sync      <= 1'b0;
      end else begin
        if (elapsed_q != '1) elapsed_q <= elapsed_q + 1'b1;
        sync <= (int'(diff) <= int'(MAX_SYNC_DIFF)) && (elapsed_q + 1'b1 >= lock_time);
      end
    end
  end

endmodule
