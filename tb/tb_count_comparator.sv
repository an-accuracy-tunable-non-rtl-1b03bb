// tb_count_comparator: self-checking testbench for the counter/Value-Register
// comparator: `hit` when count >= value (value non-zero) and a one-cycle
// `pulse` on its rising edge.
module tb_count_comparator;
  localparam int K = 32;
  logic clk = 0, rst_n = 0;
  logic [5:0] count = 0, value = 0;
  logic hit, pulse;
  int checks = 0, failures = 0, pulses = 0;
  bit prev_hit;

  count_comparator #(.K(K)) dut (.clk, .rst_n, .count, .value, .hit, .pulse);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bit exp_hit;
  initial begin
    prev_hit = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int run = 0; run < 60; run++) begin
      @(negedge clk);
      value = 6'($urandom_range(0, K)); count = 0;
      for (int c = 0; c < 40; c++) begin
        @(negedge clk);
        if ($urandom_range(0, 1) != 0 && int'(count) < K) count = count + 1;
        #1;
        exp_hit = (value != 0) && (count >= value);
        checks++; if (hit != exp_hit) begin failures++; $display("FAIL hit"); end
        checks++; if (pulse != (exp_hit && !prev_hit)) begin failures++; $display("FAIL pulse c=%0d v=%0d", count, value); end
        if (pulse) pulses++;
        @(posedge clk); prev_hit = exp_hit;
      end
    end
    checks++; if (pulses == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
