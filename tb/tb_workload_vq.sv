// tb_workload_vq: vector-quantization and nearest-centroid workloads run on
// the co-processor at its default size, with the testbench acting as host.
//
// Part 1, VQ training: 50 random vectors of 8 attributes (levels 0..31) are
// clustered into 3 clusters. For each vector the host issues a degree of
// match (DoM) against every centroid, with Timer-Limit = lock time of a
// level difference of 8, and assigns the vector to the best-matching
// cluster; it then recomputes every attribute of that cluster's centroid as
// the median of its members, using the N-th distinct maximum with N = half
// the number of distinct member values (at most 32 members are kept per
// cluster, the newest, so one pass suffices).
// Part 2, nearest-centroid classification: 10 centroids of 64 attributes
// (levels 0..15) and 40 noisy test vectors; each DoM is done in two passes
// of 32 attributes and the host adds the two counts. This part runs on a
// second co-processor built with the match-counting read-out, so that every
// matching attribute counts (with the winner-take-all read-out a DoM counts
// distinct level differences, which in this discrete model collide often).
// Every co-processor result is checked against a reference computed here
// from the samples: with the winner-take-all read-out a DoM counts distinct
// lock times (distinct level differences) within the limit, and the N-th
// distinct maximum returns the lowest index holding that value.
module tb_workload_vq;
  import coproc_pkg::*;
  localparam int K = 32, L = 2, S = 4;
  localparam int NV = 50, NA = 8, NC = 3, TH = 8;
  localparam int NA2 = 64, NC2 = 10, NT2 = 40;
  logic clk = 0, rst_n = 0, start = 0, ord_inc = 0, sweep = 0;
  opcode_e opcode = OP_NTH_MAX;
  logic [5:0] n = 1, n_used = 32;
  logic [15:0] tlim = 0;
  logic [K-1:0][4:0] sa, sb;
  logic [4:0] ao = 0;
  logic [15:0] dout;
  logic busy, done, timed_out;
  logic [5:0] status;
  logic [15:0] time_value;
  int checks = 0, failures = 0, instr = 0;

  coproc_top dut (
    .clk, .rst_n, .start, .opcode, .ord_inc, .n, .time_limit(tlim), .sweep, .store_index(1'b0), .n_used,
    .samples_a(sa), .samples_b(sb), .addr_out(ao), .data_out(dout),
    .busy, .done, .timed_out, .status, .time_value);

  // Part 2 runs on a co-processor built with the match-counting read-out,
  // so that a DoM counts every matching attribute.
  logic start_mc = 0, done_mc, busy_mc, timed_out_mc;
  logic [5:0] status_mc;
  logic [15:0] time_value_mc, dout_mc;
  coproc_top #(.USE_MC(1'b1)) dut_mc (
    .clk, .rst_n, .start(start_mc), .opcode, .ord_inc, .n, .time_limit(tlim), .sweep, .store_index(1'b0), .n_used,
    .samples_a(sa), .samples_b(sb), .addr_out(ao), .data_out(dout_mc),
    .busy(busy_mc), .done(done_mc), .timed_out(timed_out_mc), .status(status_mc), .time_value(time_value_mc));

  always #5 clk = ~clk;

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic issue(input opcode_e op, input int nn, input int lim, input int used, input bit mc = 0);
    @(negedge clk);
    opcode = op; ord_inc = 0; n = 6'(nn); tlim = 16'(lim); sweep = 0; n_used = 6'(used);
    if (mc) start_mc = 1; else start = 1;
    @(negedge clk); start = 0; start_mc = 0;
    while (!(mc ? done_mc : done)) @(negedge clk);
    instr++;
  endtask

  // reference DoM counting every matching pair (match-counting read-out)
  function automatic int ref_dom_mc(int used, int lim);
    int c, d;
    c = 0;
    for (int j = 0; j < used; j++) begin
      d = (sa[j] > sb[j]) ? int'(sa[j]) - int'(sb[j]) : int'(sb[j]) - int'(sa[j]);
      if (L + d * S <= lim) c++;
    end
    return c;
  endfunction

  // reference DoM of the first `used` pairs in sa/sb (distinct differences)
  function automatic int ref_dom(int used, int lim);
    bit seen [32];
    int c, d;
    c = 0;
    for (int i = 0; i < 32; i++) seen[i] = 0;
    for (int j = 0; j < used; j++) begin
      d = (sa[j] > sb[j]) ? int'(sa[j]) - int'(sb[j]) : int'(sb[j]) - int'(sa[j]);
      if (L + d * S <= lim && !seen[d]) begin seen[d] = 1; c++; end
    end
    return c;
  endfunction

  int vec [NV][NA];
  int cen [NC][NA];
  int members [NC][$];
  int cnt, best, best_c, used, nd, target, idx, dev, true_match;
  int cen2 [NC2][NA2];
  int test2 [NA2];
  int label, correct;
  bit vals [32];

  initial begin
    sa = '0; sb = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;

    // ------------------------------------------------ part 1: VQ training
    for (int v = 0; v < NV; v++) for (int a = 0; a < NA; a++) vec[v][a] = $urandom_range(0, 31);
    for (int c = 0; c < NC; c++) for (int a = 0; a < NA; a++) cen[c][a] = vec[c][a];
    for (int v = 0; v < NV; v++) begin
      best = 0; best_c = NC;   // NC = "no cluster"
      for (int c = 0; c < NC; c++) begin
        for (int a = 0; a < K; a++) begin
          sa[a] = (a < NA) ? 5'(vec[v][a]) : 5'd0;
          sb[a] = (a < NA) ? 5'(cen[c][a]) : 5'd0;
        end
        issue(OP_DOM, 0, L + TH * S, NA);
        check(int'(status) == ref_dom(NA, L + TH * S), "VQ DoM");
        if (int'(status) > best) begin best = int'(status); best_c = c; end
      end
      if (best_c == NC) best_c = v % NC;   // outlier: host assigns a cluster
      members[best_c].push_back(v);
      if (members[best_c].size() > K) void'(members[best_c].pop_front());
      used = members[best_c].size();
      // median of every attribute over the cluster members
      for (int a = 0; a < NA; a++) begin
        for (int i = 0; i < 32; i++) vals[i] = 0;
        for (int m = 0; m < used; m++) begin
          sa[m] = 5'(vec[members[best_c][m]][a]);
          vals[vec[members[best_c][m]][a]] = 1;
        end
        nd = 0;
        for (int i = 0; i < 32; i++) nd += vals[i];
        target = (nd + 1) / 2;
        issue(OP_NTH_MAX, target, 0, used);
        // reference: target-th distinct largest value, lowest index holding it
        cnt = 0; idx = -1;
        for (int i = 31; i >= 0 && idx < 0; i--) if (vals[i]) begin
          cnt++;
          if (cnt == target) for (int m = used - 1; m >= 0; m--) if (int'(sa[m]) == i) idx = m;
        end
        check(!timed_out && int'(status) == idx, "VQ median index");
        cen[best_c][a] = int'(sa[status]);
      end
    end
    dev = 0;
    for (int c = 0; c < NC; c++)
      foreach (members[c][m]) for (int a = 0; a < NA; a++)
        dev += (vec[members[c][m]][a] > cen[c][a]) ? vec[members[c][m]][a] - cen[c][a] : cen[c][a] - vec[members[c][m]][a];
    $display("VQ: %0d vectors in clusters of %0d/%0d/%0d, clustering deviation %0d",
             NV, members[0].size(), members[1].size(), members[2].size(), dev);

    // --------------------------------- part 2: nearest-centroid, 64 attributes
    for (int c = 0; c < NC2; c++) for (int a = 0; a < NA2; a++) cen2[c][a] = $urandom_range(0, 15);
    correct = 0;
    for (int t = 0; t < NT2; t++) begin
      label = t % NC2;
      for (int a = 0; a < NA2; a++) begin
        test2[a] = cen2[label][a] + $urandom_range(0, 2) - 1;
        if (test2[a] < 0) test2[a] = 0;
        if (test2[a] > 15) test2[a] = 15;
      end
      best = -1; best_c = 0;
      for (int c = 0; c < NC2; c++) begin
        cnt = 0;
        for (int half = 0; half < 2; half++) begin
          for (int a = 0; a < K; a++) begin
            sa[a] = 5'(test2[half * K + a]);
            sb[a] = 5'(cen2[c][half * K + a]);
          end
          issue(OP_DOM, 0, L + S, K, 1'b1);   // limit: levels at most 1 apart
          check(int'(status_mc) == ref_dom_mc(K, L + S), "64-attribute DoM pass");
          cnt += int'(status_mc);
        end
        if (cnt > best) begin best = cnt; best_c = c; end
      end
      if (best_c == label) correct++;
    end
    $display("nearest centroid: %0d of %0d test vectors classified to their own centroid", correct, NT2);
    $display("instructions executed: %0d", instr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
