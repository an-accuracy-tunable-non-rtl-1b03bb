// tb_logk_counter: self-checking testbench for the Log(K)-counter.
// Random increments by 1 and by larger steps, resets, and saturation at K,
// checked against a reference count.
module tb_logk_counter;
  localparam int K = 32;
  logic clk = 0, rst_n = 0, rc = 0, incr = 0;
  logic [5:0] step = 1, count, count_next;
  int checks = 0, failures = 0, ref_count = 0, sat = 0;

  logk_counter #(.K(K)) dut (.clk, .rst_n, .reset_count(rc), .incr, .step, .count, .count_next);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t: count=%0d ref=%0d", what, $time, count, ref_count); end
  endtask

  int nxt;
  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      check(int'(count) == ref_count, "count");
      rc   = ($urandom_range(0, 40) == 0);
      incr = 1'($urandom_range(0, 1));
      step = (i % 3 == 0) ? 6'($urandom_range(0, 7)) : 6'd1;
      #1;
      if (rc) nxt = 0;
      else if (incr) nxt = (ref_count + int'(step) > K) ? K : ref_count + int'(step);
      else nxt = ref_count;
      if (incr && !rc && ref_count + int'(step) > K) sat++;
      check(int'(count_next) == nxt, "count_next");
      @(posedge clk);
      ref_count = nxt;
    end
    check(sat > 0, "saturation exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
