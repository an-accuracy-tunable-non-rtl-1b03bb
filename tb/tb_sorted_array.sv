// tb_sorted_array: self-checking testbench for the sorted-array queue:
// writes at the counter address, writes of several consecutive entries,
// dropped out-of-range entries, read-back against a model array.
module tb_sorted_array;
  localparam int K = 32;
  logic clk = 0, we = 0;
  logic [5:0] ai = 0, wc = 1;
  logic [15:0] di = 0, dout;
  logic [4:0] ao = 0;
  logic [15:0] model [K];
  bit written [K];
  int checks = 0, failures = 0;

  sorted_array #(.K(K), .TW(16)) dut (.clk, .write_en(we), .addr_in(ai), .write_count(wc), .data_in(di), .addr_out(ao), .data_out(dout));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < K; i++) written[i] = 0;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      we = 1'($urandom_range(0, 1));
      ai = 6'($urandom_range(0, K + 4));
      wc = ($urandom_range(0, 2) == 0) ? 6'($urandom_range(0, 6)) : 6'd1;
      di = 16'($urandom);
      ao = 5'($urandom_range(0, K - 1));
      @(posedge clk); #1;
      if (we) for (int q = int'(ai); q < int'(ai) + int'(wc); q++) if (q < K) begin model[q] = di; written[q] = 1; end
      we = 0;
      for (int q = 0; q < K; q++) if (written[q]) begin
        ao = 5'(q); #1;
        checks++;
        if (dout != model[q]) begin failures++; $display("FAIL addr %0d got %h exp %h", q, dout, model[q]); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
