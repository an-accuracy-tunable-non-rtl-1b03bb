// tb_value_register: self-checking testbench for the Value-Register.
// Random writes and idle cycles; the register must follow only written values.
module tb_value_register;
  localparam int K = 32;
  logic clk = 0, rst_n = 0, we = 0;
  logic [5:0] din = 0, value;
  int checks = 0, failures = 0, ref_v = 0;

  value_register #(.K(K)) dut (.clk, .rst_n, .write_value(we), .value_in(din), .value);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    checks++; if (value != 0) failures++;
    for (int i = 0; i < 500; i++) begin
      @(negedge clk);
      we  = 1'($urandom_range(0, 1));
      din = 6'($urandom_range(0, K));
      @(posedge clk); #1;
      if (we) ref_v = int'(din);
      checks++;
      if (int'(value) != ref_v) begin failures++; $display("FAIL value %0d exp %0d", value, ref_v); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
