// sync_timer: the 16-bit timer of the read-out circuit.
//
// Writing a Timer-Limit (`write_limit` strobe with `limit_in`) stores the
// limit and restarts the count from zero. After that the value advances by
// one on every cycle in which `tick` is high (every cycle for the time-based
// instructions, once per reference step in the voltage-sweep mode) until it
// equals the limit; `count_over` is then high and stays high, and the value
// stops. `freeze` (Execution Over) holds the value, so the time at which the
// deciding oscillator synchronized stays readable until the next instruction.
//
// The limit of 2**16 that the instructions ask for does not fit in 16 bits;
// the controller writes 16'hFFFF instead. The sticky `count_over` level and
// the `tick` enable are this design's choices. Registered outputs; the
// restart takes effect at the edge that samples `write_limit`, which wins
// over `freeze`.
module sync_timer #(
  parameter int unsigned TW = coproc_pkg::TW
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          write_limit,
  input  logic [TW-1:0] limit_in,
  input  logic          tick,
  input  logic          freeze,
  output logic          count_over,
  output logic [TW-1:0] value
);

  logic [TW-1:0] limit_q;
  logic          running_q;

  assign count_over = running_q && (value == limit_q);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      limit_q   <= '0;
      value     <= '0;
      running_q <= 1'b0;
    end else if (write_limit) begin
      limit_q   <= limit_in;
      value     <= '0;
      running_q <= 1'b1;
    end else if (running_q && tick && !freeze && !count_over) begin
      value <= value + 1'b1;
    end
  end

endmodule
