// value_register: the Value-Register of the read-out circuit.
//
// Holds the argument N of an N-th minimum/maximum or sort instruction,
// written by the global controller with a one-cycle `write_value` strobe and
// compared with the Log(K)-counter. It is clog2(K+1) bits wide like the
// counter (so N = K fits) and resets to 0; both are this design's choices.
// The new value is visible the cycle after the strobe.
module value_register #(
  parameter int unsigned K  = coproc_pkg::K_DEF,
  localparam int unsigned CW = $clog2(K + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          write_value,
  input  logic [CW-1:0] value_in,
  output logic [CW-1:0] value
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)           value <= '0;
    else if (write_value) value <= value_in;
  end

endmodule
