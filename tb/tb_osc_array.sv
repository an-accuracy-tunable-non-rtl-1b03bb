// tb_osc_array: self-checking testbench for the oscillator array model:
// every oscillator j must lock after the time its own input pair predicts,
// independent of the others.
module tb_osc_array;
  localparam int K = 32, L = 2, S = 4;
  logic clk = 0, rst_n = 0, restart = 0;
  logic [K-1:0][4:0] a, b;
  logic [K-1:0] sync;
  int checks = 0, failures = 0;

  osc_array #(.K(K), .SW(5), .LOCK_CYCLES(L), .CYCLES_PER_LEVEL(S), .MAX_SYNC_DIFF(31)) dut (
    .clk, .rst_n, .restart, .in_a(a), .in_b(b), .sync);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int first [K];
  int d;
  initial begin
    a = '0; b = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 20; i++) begin
      @(negedge clk);
      for (int j = 0; j < K; j++) begin a[j] = 5'($urandom); b[j] = 5'($urandom); first[j] = -1; end
      restart = 1;
      @(negedge clk); restart = 0;
      for (int c = 1; c <= L + 31 * S + 4; c++) begin
        for (int j = 0; j < K; j++) if (sync[j] && first[j] < 0) first[j] = c;
        @(negedge clk);
      end
      for (int j = 0; j < K; j++) begin
        d = (a[j] > b[j]) ? int'(a[j]) - int'(b[j]) : int'(b[j]) - int'(a[j]);
        checks++;
        if (first[j] != L + d * S + 1) begin failures++; $display("FAIL osc %0d first=%0d d=%0d", j, first[j], d); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
