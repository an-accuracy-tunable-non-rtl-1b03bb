// count_comparator: compares the Log(K)-counter with the Value-Register.
//
// `hit` is high while the count has reached the value N; `pulse` is its
// low-to-high edge, one cycle long, which is what ends an N-th min/max or
// sort instruction. The test is count >= value rather than equality: the two
// agree when the counter steps by one (WTA), and only >= works when the
// match-counting circuit makes the counter jump over N. A value of zero never
// hits. Both are this design's choices.
//
// The `count` input is meant to be the counter's next value, so `hit` rises
// combinationally in the cycle of the N-th synchronization; `pulse` compares
// with the registered previous `hit`.
module count_comparator #(
  parameter int unsigned K  = coproc_pkg::K_DEF,
  localparam int unsigned CW = $clog2(K + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [CW-1:0] count,
  input  logic [CW-1:0] value,
  output logic          hit,
  output logic          pulse
);

  logic hit_q;

  assign hit   = (value != '0) && (count >= value);
  assign pulse = hit && !hit_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) hit_q <= 1'b0;
    else        hit_q <= hit;
  end

endmodule
