// tb_wta: self-checking testbench for the winner-take-all stage.
// Drives random rising comparator outputs and checks Valid, the lowest new
// index, the held index and the once-per-instruction rule against a
// reference model kept in the testbench; also checks Disable and clear.
module tb_wta;
  localparam int K = 32;
  logic clk = 0, rst_n = 0, clear = 0, dis = 0;
  logic [K-1:0] sync = '0;
  logic valid;
  logic [4:0] index_now, index;
  logic [K-1:0] new_mask;
  int checks = 0, failures = 0;
  int ties = 0;

  wta #(.K(K)) dut (.clk, .rst_n, .clear, .sync, .disable_i(dis), .valid, .index_now, .index, .new_mask);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  logic [K-1:0] seen, exp_new;
  int exp_idx, held;

  initial begin
    seen = '0; held = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int run = 0; run < 40; run++) begin
      // new instruction
      @(negedge clk); clear = 1; sync = '0;
      @(negedge clk); clear = 0; seen = '0; held = 0;
      for (int step = 0; step < 30; step++) begin
        @(negedge clk);
        // raise a random handful of oscillators (sticky, like a locked pair),
        // sometimes drop some to check that a re-rise is not counted again
        for (int r = 0; r < 2; r++) if ($urandom_range(0, 3) == 0) sync[$urandom_range(0, K-1)] = 1'b1;
        if ($urandom_range(0, 9) == 0) sync[$urandom_range(0, K-1)] = 1'b0;
        dis = (run % 5 == 4) && (step > 20);
        #1;
        exp_new = dis ? '0 : (sync & ~seen);
        exp_idx = 0;
        for (int j = K - 1; j >= 0; j--) if (exp_new[j]) exp_idx = j;
        if ($countones(exp_new) > 1) ties++;
        check(valid == (exp_new != 0), "valid");
        check(new_mask == exp_new, "new_mask");
        if (exp_new != 0) check(int'(index_now) == exp_idx, "index_now lowest");
        check(int'(index) == held, "held index");
        if (exp_new != 0) held = exp_idx;
        seen |= exp_new;
      end
    end
    check(ties > 0, "simultaneous synchronizations exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
