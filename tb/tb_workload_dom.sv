// tb_workload_dom: the degree-of-match accuracy study (Timer-Limit against a
// threshold) run on the co-processor at its default size, with the testbench
// acting as host.
//
// Vectors have 40 elements with values in 1..32, entered as levels value-1.
// The reference is the plain degree of match with threshold T_h = 8: the
// number of positions i with |a_i - b_i| <= 8. Since 40 elements exceed the
// 32 oscillators, the host runs each DoM in two chunks (elements 0..31, then
// 32..39 with the other oscillators padded) and adds the counts.
//
// Part 1 sweeps the Timer-Limit over 0..124 for one vector pair. For every
// limit the count of each build must match the oscillator model (a pair of
// level difference d locks at LOCK + d*PER_LEVEL): the match-counting build
// (USE_MC = 1) counts every pair within the limit, the winner-take-all build
// (default) counts distinct lock times. The counts must grow with the limit,
// and at the limit LOCK + 8*PER_LEVEL, which corresponds to T_h = 8, the
// match-counting build must equal the reference exactly.
// Part 2 keeps that limit and runs 30 random vector pairs: match counting is
// exact on every pair; the winner-take-all build undercounts where several
// pairs share a difference, which is reported as its error.
// Part 3 models oscillators that lock only on equal inputs (MAX_SYNC_DIFF =
// 0, as for the HyperFET pairs): a match-counting build then gives the exact
// number of equal positions for any limit past the lock time, on 32-element
// vectors.
module tb_workload_dom;
  import coproc_pkg::*;
  localparam int K = 32, L = 2, S = 4, NV = 40, TH = 8;
  logic clk = 0, rst_n = 0, start = 0;
  opcode_e opcode = OP_DOM;
  logic [5:0] n_used = 32;
  logic [15:0] tlim = 0;
  logic [K-1:0][4:0] sa, sb;
  logic [4:0] ao = 0;
  logic [15:0] dout, dout_mc;
  logic busy, done, timed_out, busy_mc, done_mc, timed_out_mc;
  logic [5:0] status, status_mc;
  logic [15:0] time_value, time_value_mc;
  int checks = 0, failures = 0;

  coproc_top dut (
    .clk, .rst_n, .start, .opcode, .ord_inc(1'b0), .n(6'd0), .time_limit(tlim), .sweep(1'b0),
    .store_index(1'b0), .n_used, .samples_a(sa), .samples_b(sb), .addr_out(ao), .data_out(dout),
    .busy, .done, .timed_out, .status, .time_value);

  coproc_top #(.USE_MC(1'b1)) dut_mc (
    .clk, .rst_n, .start, .opcode, .ord_inc(1'b0), .n(6'd0), .time_limit(tlim), .sweep(1'b0),
    .store_index(1'b0), .n_used, .samples_a(sa), .samples_b(sb), .addr_out(ao), .data_out(dout_mc),
    .busy(busy_mc), .done(done_mc), .timed_out(timed_out_mc), .status(status_mc),
    .time_value(time_value_mc));

  logic [15:0] dout_eq, time_value_eq;
  logic busy_eq, done_eq, timed_out_eq;
  logic [5:0] status_eq;
  coproc_top #(.USE_MC(1'b1), .MAX_SYNC_DIFF(0)) dut_eq (
    .clk, .rst_n, .start, .opcode, .ord_inc(1'b0), .n(6'd0), .time_limit(tlim), .sweep(1'b0),
    .store_index(1'b0), .n_used, .samples_a(sa), .samples_b(sb), .addr_out(ao), .data_out(dout_eq),
    .busy(busy_eq), .done(done_eq), .timed_out(timed_out_eq), .status(status_eq),
    .time_value(time_value_eq));

  always #5 clk = ~clk;

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  int va [NV], vb [NV];

  // One two-chunk DoM on both builds; returns the summed counts.
  task automatic dom40(input int limit, output int cnt_wta, output int cnt_mc);
    cnt_wta = 0; cnt_mc = 0;
    for (int c = 0; c < 2; c++) begin
      int used;
      used = (c == 0) ? K : NV - K;
      @(negedge clk);
      sa = '0; sb = '0;
      for (int j = 0; j < used; j++) begin
        sa[j] = 5'(va[c * K + j] - 1);
        sb[j] = 5'(vb[c * K + j] - 1);
      end
      tlim = 16'(limit); n_used = 6'(used);
      start = 1;
      @(negedge clk); start = 0;
      while (!done) @(negedge clk);
      check(done_mc && time_value == 16'(limit) && time_value_mc == 16'(limit), "both builds end at the limit");
      cnt_wta += int'(status);
      cnt_mc += int'(status_mc);
    end
  endtask

  // Expected counts from the oscillator model and the plain reference.
  int exp_wta, exp_mc, exp_ref;
  task automatic expect_counts(input int limit);
    exp_wta = 0; exp_mc = 0; exp_ref = 0;
    for (int c = 0; c < 2; c++) begin
      bit seen [32];
      for (int d = 0; d < 32; d++) seen[d] = 0;
      for (int i = c * K; i < ((c == 0) ? K : NV); i++) begin
        int d;
        d = (va[i] > vb[i]) ? va[i] - vb[i] : vb[i] - va[i];
        if (d <= TH) exp_ref++;
        if (L + d * S <= limit) begin
          exp_mc++;
          if (!seen[d]) begin seen[d] = 1; exp_wta++; end
        end
      end
    end
  endtask

  task automatic random_pair();
    for (int i = 0; i < NV; i++) begin
      va[i] = int'($urandom_range(1, 32));
      vb[i] = (i % 2 == 1) ? va[i] + int'($urandom_range(0, 10)) - 5 : int'($urandom_range(1, 32));
      if (vb[i] < 1) vb[i] = 1;
      if (vb[i] > 32) vb[i] = 32;
    end
  endtask

  int cw, cm, prev_w, prev_m, wta_err, wta_exact, n_undercount;
  initial begin
    sa = '0; sb = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;

    // ---- part 1: Timer-Limit sweep for one pair
    random_pair();
    prev_w = 0; prev_m = 0;
    for (int limit = 0; limit <= 124; limit++) begin
      dom40(limit, cw, cm);
      expect_counts(limit);
      check(cw == exp_wta, "wta count matches the model");
      check(cm == exp_mc, "mc count matches the model");
      check(cw >= prev_w && cm >= prev_m, "counts grow with the limit");
      if (limit == L + TH * S) begin
        check(cm == exp_ref, "mc equals the T_h = 8 reference at the matching limit");
        $display("limit %0d: reference %0d, match counting %0d, winner-take-all %0d", limit, exp_ref, cm, cw);
      end
      prev_w = cw; prev_m = cm;
    end

    // ---- part 2: fixed limit over random pairs
    wta_err = 0; wta_exact = 0; n_undercount = 0;
    for (int p = 0; p < 30; p++) begin
      random_pair();
      dom40(L + TH * S, cw, cm);
      expect_counts(L + TH * S);
      check(cm == exp_ref, "mc exact on a random pair");
      check(cw == exp_wta && cw <= cm, "wta counts distinct lock times");
      wta_err += exp_ref - cw;
      if (cw == exp_ref) wta_exact++;
      else n_undercount++;
    end
    $display("30 random pairs at limit %0d: match counting exact on all, winner-take-all exact on %0d, total undercount %0d",
             L + TH * S, wta_exact, wta_err);
    check(n_undercount > 0, "duplicate differences exercised");

    // ---- part 3: equal-only locking, exact positional match count
    for (int p = 0; p < 20; p++) begin
      int eq;
      eq = 0;
      @(negedge clk);
      for (int j = 0; j < K; j++) begin
        sa[j] = 5'($urandom_range(0, 31));
        sb[j] = ($urandom_range(0, 2) == 0) ? sa[j] : 5'($urandom_range(0, 31));
        if (sa[j] == sb[j]) eq++;
      end
      tlim = 16'($urandom_range(L, 200)); n_used = 6'(K);
      start = 1;
      @(negedge clk); start = 0;
      while (!done_eq) @(negedge clk);
      check(int'(status_eq) == eq, "equal-only oscillators give the exact match count");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
