// tb_latch_tune: self-checking testbench for the latching circuitry: the
// second input follows the selection (a_MAX, a_MIN, B_j, V_ref), unused
// oscillators get <a_MIN, a_MAX>, outputs change only on a latch strobe and
// `restart` follows the strobe by one cycle.
module tb_latch_tune;
  import coproc_pkg::*;
  localparam int K = 32;
  logic clk = 0, rst_n = 0, latch = 0;
  ref_sel_e sel = REF_AMAX;
  logic [5:0] n_used = 0;
  logic [4:0] vref = 0;
  logic [K-1:0][4:0] sa, sb, oa, ob;
  logic restart;
  int checks = 0, failures = 0;

  latch_tune #(.K(K), .SW(5)) dut (.clk, .rst_n, .latch, .sel, .n_used, .vref,
    .samples_a(sa), .samples_b(sb), .osc_a(oa), .osc_b(ob), .restart);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  logic [K-1:0][4:0] ea, eb;
  int exp_b;
  initial begin
    sa = '0; sb = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 200; i++) begin
      @(negedge clk);
      for (int j = 0; j < K; j++) begin sa[j] = 5'($urandom); sb[j] = 5'($urandom); end
      sel = ref_sel_e'(i % 4);
      n_used = 6'($urandom_range(0, K));
      vref = 5'($urandom);
      latch = 1;
      for (int j = 0; j < K; j++) begin
        if (j < n_used) begin
          ea[j] = sa[j];
          case (i % 4)
            0: exp_b = 31;
            1: exp_b = 0;
            2: exp_b = int'(sb[j]);
            default: exp_b = int'(vref);
          endcase
          eb[j] = 5'(exp_b);
        end else begin
          ea[j] = 5'd0; eb[j] = 5'd31;
        end
      end
      @(negedge clk); latch = 0;
      check(restart, "restart after strobe");
      check(oa == ea, "first inputs");
      check(ob == eb, "second inputs");
      // without a strobe nothing changes
      for (int j = 0; j < K; j++) sa[j] = 5'($urandom);
      @(negedge clk);
      check(!restart, "restart is one cycle");
      check(oa == ea && ob == eb, "held without strobe");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
