// tb_coupled_osc_pair: self-checking testbench for the coupled-oscillator
// behavioural model. For random input pairs it checks that `sync` rises
// exactly LOCK_CYCLES + |a-b|*CYCLES_PER_LEVEL + 1 cycles after the inputs
// are applied (the +1 being the registered comparator output), that it drops
// when the inputs change or `restart` is pulsed, and that a second model with
// MAX_SYNC_DIFF = 0 locks only for equal inputs.
module tb_coupled_osc_pair;
  localparam int L = 2, S = 4;
  logic clk = 0, rst_n = 0, restart = 0;
  logic [4:0] a = 0, b = 0;
  logic sync, sync_hf;
  int checks = 0, failures = 0;

  coupled_osc_pair #(.SW(5), .LOCK_CYCLES(L), .CYCLES_PER_LEVEL(S), .MAX_SYNC_DIFF(31)) dut (
    .clk, .rst_n, .restart, .in_a(a), .in_b(b), .sync);
  coupled_osc_pair #(.SW(5), .LOCK_CYCLES(L), .CYCLES_PER_LEVEL(S), .MAX_SYNC_DIFF(0)) dut_hf (
    .clk, .rst_n, .restart, .in_a(a), .in_b(b), .sync(sync_hf));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s a=%0d b=%0d at %0t", what, a, b, $time); end
  endtask

  int d, first, hf_first;
  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 150; i++) begin
      @(negedge clk);
      // apply a new pair (use restart when the pair happens to be unchanged)
      a = 5'($urandom_range(0, 31));
      b = (i % 4 == 0) ? a : 5'($urandom_range(0, 31));
      restart = 1;
      @(negedge clk); restart = 0;
      d = (a > b) ? int'(a) - int'(b) : int'(b) - int'(a);
      first = -1; hf_first = -1;
      for (int c = 1; c <= L + 31 * S + 4; c++) begin
        if (sync && first < 0) first = c;
        if (sync_hf && hf_first < 0) hf_first = c;
        @(negedge clk);
      end
      check(first == L + d * S + 1, "lock time");
      check(sync, "sync stays high");
      check((d == 0) ? (hf_first == L + 1) : (hf_first < 0), "threshold model");
      // change an input: sync must drop
      a = a + 5'd1;
      @(negedge clk); @(negedge clk);
      check(!sync || (L == 0), "sync drops on new input");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
