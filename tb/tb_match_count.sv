// tb_match_count: self-checking testbench for the match-counting stage.
// Random comparator patterns; checks that Match Count equals the number of
// oscillators newly synchronized in the cycle, together with Valid and the
// lowest new index, against a reference model in the testbench.
module tb_match_count;
  localparam int K = 32;
  logic clk = 0, rst_n = 0, clear = 0, dis = 0;
  logic [K-1:0] sync = '0;
  logic valid;
  logic [4:0] index_now, index;
  logic [5:0] mc;
  int checks = 0, failures = 0, multi = 0;

  match_count #(.K(K)) dut (.clk, .rst_n, .clear, .sync, .disable_i(dis), .valid, .index_now, .index, .mcount(mc));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  logic [K-1:0] seen, exp_new;
  int exp_idx;

  initial begin
    seen = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int run = 0; run < 40; run++) begin
      @(negedge clk); clear = 1; sync = '0;
      @(negedge clk); clear = 0; seen = '0;
      for (int step = 0; step < 20; step++) begin
        @(negedge clk);
        for (int r = 0; r < 4; r++) if ($urandom_range(0, 2) == 0) sync[$urandom_range(0, K-1)] = 1'b1;
        if (run == 0 && step == 5) sync = '1;   // all remaining at once
        #1;
        exp_new = sync & ~seen;
        exp_idx = 0;
        for (int j = K - 1; j >= 0; j--) if (exp_new[j]) exp_idx = j;
        if ($countones(exp_new) > 1) multi++;
        check(valid == (exp_new != 0), "valid");
        check(int'(mc) == $countones(exp_new), "match count");
        if (exp_new != 0) check(int'(index_now) == exp_idx, "index_now");
        seen |= exp_new;
      end
    end
    check(multi > 0, "multiple synchronizations in one cycle exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
