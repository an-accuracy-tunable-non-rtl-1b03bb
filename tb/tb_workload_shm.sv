// tb_workload_shm: structural-health-monitoring peak detection run on the
// co-processor at its default size, with the testbench acting as host.
//
// Each trial has 50 strain samples in 0..300. The analog front end's scaling
// is modelled by the host as level = value * 32 / 301 (0..31). Since 50
// samples exceed the 32 oscillators, the host works in two chunks: Sort(2,
// decreasing) on the first 32 samples, then Sort(2, decreasing) on the two
// peaks found plus the remaining 18 samples. The two sorted-array entries
// are converted back to levels (time mode: level = 31 - (t - LOCK)/PER_LEVEL;
// sweep mode: level = 31 - step) and must equal the largest and second
// largest distinct levels of all 50 samples. Trials alternate between the
// time-based and the voltage-sweep mode.
// Each trial then finds the same two peaks with N-th Distinct Max, N = 1 and
// N = 2, using the index output instead of a time mapping. The host splits
// the samples into chunks of K - N = 30 new samples: the first chunk holds
// samples 0..29, the second the two peaks found so far plus samples 30..49.
// The host keeps track of which sample sits on which oscillator, so an
// index gives the sample itself; the levels of the two samples found must
// again be the two largest distinct levels.
module tb_workload_shm;
  import coproc_pkg::*;
  localparam int K = 32, L = 2, S = 4, NS = 50;
  logic clk = 0, rst_n = 0, start = 0, ord_inc = 0, sweep = 0;
  opcode_e opcode = OP_SORT;
  logic [5:0] n = 2, n_used = 32;
  logic [15:0] tlim = 0;
  logic [K-1:0][4:0] sa, sb;
  logic [4:0] ao = 0;
  logic [15:0] dout;
  logic busy, done, timed_out;
  logic [5:0] status;
  logic [15:0] time_value;
  int checks = 0, failures = 0;

  coproc_top dut (
    .clk, .rst_n, .start, .opcode, .ord_inc, .n, .time_limit(tlim), .sweep, .store_index(1'b0), .n_used,
    .samples_a(sa), .samples_b(sb), .addr_out(ao), .data_out(dout),
    .busy, .done, .timed_out, .status, .time_value);

  always #5 clk = ~clk;

  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // Sort(2, decreasing) on the first `used` entries of sa; returns both levels.
  task automatic top2(input int used, input bit swp, output int p1, output int p2);
    @(negedge clk);
    opcode = OP_SORT; ord_inc = 0; n = 6'd2; sweep = swp; n_used = 6'(used);
    start = 1;
    @(negedge clk); start = 0;
    while (!done) @(negedge clk);
    check(!timed_out, "sort found two distinct peaks");
    ao = 5'd0; #1;
    p1 = swp ? 31 - int'(dout) : 31 - (int'(dout) - L) / S;
    ao = 5'd1; #1;
    p2 = swp ? 31 - int'(dout) : 31 - (int'(dout) - L) / S;
  endtask

  // N-th Distinct Max on the first `used` entries of sa; returns the index.
  task automatic nth_max(input int used, input int nn, input bit swp, output int idx);
    @(negedge clk);
    opcode = OP_NTH_MAX; ord_inc = 0; n = 6'(nn); sweep = swp; n_used = 6'(used);
    start = 1;
    @(negedge clk); start = 0;
    while (!done) @(negedge clk);
    check(!timed_out, "N-th distinct max found");
    idx = int'(status);
  endtask

  int raw [NS], lvl [NS];
  int osc_sample [K];   // which sample each oscillator holds
  int i1, i2, s1, s2;
  int r1, r2, p1, p2, q1, q2;
  initial begin
    sa = '0; sb = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 20; t++) begin
      for (int i = 0; i < NS; i++) begin
        raw[i] = $urandom_range(0, 300);
        lvl[i] = raw[i] * 32 / 301;
      end
      // reference: largest and second largest distinct level
      r1 = -1; r2 = -1;
      for (int i = 0; i < NS; i++) if (lvl[i] > r1) r1 = lvl[i];
      for (int i = 0; i < NS; i++) if (lvl[i] > r2 && lvl[i] < r1) r2 = lvl[i];
      // chunk 1
      for (int i = 0; i < K; i++) sa[i] = 5'(lvl[i]);
      top2(K, t[0], p1, p2);
      // chunk 2: the two peaks so far plus the remaining samples
      sa = '0;
      sa[0] = 5'(p1); sa[1] = 5'(p2);
      for (int i = K; i < NS; i++) sa[2 + i - K] = 5'(lvl[i]);
      top2(2 + NS - K, t[0], q1, q2);
      check(q1 == r1, "primary peak");
      check(q2 == r2, "secondary peak");
      // same peaks from N-th Distinct Max and the index output
      sa = '0;
      for (int i = 0; i < K - 2; i++) begin sa[i] = 5'(lvl[i]); osc_sample[i] = i; end
      nth_max(K - 2, 1, t[1], i1);
      nth_max(K - 2, 2, t[1], i2);
      s1 = osc_sample[i1]; s2 = osc_sample[i2];
      sa = '0;
      sa[0] = 5'(lvl[s1]); osc_sample[0] = s1;
      sa[1] = 5'(lvl[s2]); osc_sample[1] = s2;
      for (int i = K - 2; i < NS; i++) begin sa[2 + i - (K - 2)] = 5'(lvl[i]); osc_sample[2 + i - (K - 2)] = i; end
      nth_max(2 + NS - (K - 2), 1, t[1], i1);
      nth_max(2 + NS - (K - 2), 2, t[1], i2);
      check(lvl[osc_sample[i1]] == r1, "primary peak by index");
      check(lvl[osc_sample[i2]] == r2, "secondary peak by index");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
