// tb_sync_timer: self-checking testbench for the read-out timer: restart on
// a Timer-Limit write, counting only on tick, stop and Count Over at the
// limit, and freeze.
module tb_sync_timer;
  logic clk = 0, rst_n = 0, wl = 0, tick = 0, frz = 0;
  logic [15:0] lim = 0, value;
  logic co;
  int checks = 0, failures = 0, ref_v = 0, overs = 0;
  int ref_lim = 0;
  bit running = 0;

  sync_timer #(.TW(16)) dut (.clk, .rst_n, .write_limit(wl), .limit_in(lim), .tick, .freeze(frz), .count_over(co), .value);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bit exp_co;
  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int run = 0; run < 40; run++) begin
      @(negedge clk);
      wl = 1; lim = 16'($urandom_range(1, 300)); tick = 0; frz = 0;
      @(posedge clk); #1; wl = 0; ref_v = 0; ref_lim = int'(lim); running = 1;
      for (int c = 0; c < 400; c++) begin
        @(negedge clk);
        tick = (run % 2 == 0) ? 1'b1 : 1'($urandom_range(0, 1));
        frz  = (run % 7 == 3) && (c > 50);
        #1;
        exp_co = running && (ref_v == ref_lim);
        checks++; if (co != exp_co) begin failures++; $display("FAIL count_over v=%0d", ref_v); end
        checks++; if (int'(value) != ref_v) begin failures++; $display("FAIL value %0d exp %0d", value, ref_v); end
        if (exp_co) overs++;
        @(posedge clk);
        if (tick && !frz && !exp_co) ref_v++;
      end
    end
    checks++; if (overs == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
