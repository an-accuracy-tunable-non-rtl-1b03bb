// tb_coproc_top: end-to-end testbench of the co-processor at its default
// size (32 oscillators, 5-bit levels, 16-bit timer, winner-take-all read-out).
//
// It plays the host: loads sample vectors, issues instructions and checks the
// results against a reference computed here from the samples alone:
//   N-th distinct max / min   index = lowest oscillator holding the N-th
//                             distinct largest / smallest sample, time = the
//                             oscillator model's lock time for that sample;
//   sort (both orders)        sorted-array entries = lock times of the first N
//                             distinct samples, read through addr_out;
//   sort storing indices      entries = lowest oscillator index per distinct
//                             sample, in order (also in sweep mode);
//   degree of match           number of distinct lock times within the limit;
//   swept degree of match     elements of B applied one by one to all
//                             oscillators holding A: number of B elements
//                             that meet a not yet matched equal A element;
//   voltage-sweep mode        the four-sample example (3rd maximum of
//                             652/544/500/400 mV as levels 27/18/14/6) returns
//                             the 500 mV sample after 17 sweep steps, plus
//                             random sweeps in both directions;
//   time-out                  an N larger than the number of distinct samples
//                             ends by the timer with timed_out set.
// Unused oscillators (n_used < 32) are padded by the latching circuitry.
// Each mechanism is counted and one that never happened is a failure.
module tb_coproc_top;
  import coproc_pkg::*;
  localparam int K = 32, L = 2, S = 4;
  logic clk = 0, rst_n = 0, start = 0, ord_inc = 0, sweep = 0, si = 0;
  opcode_e opcode = OP_NTH_MAX;
  logic [5:0] n = 1, n_used = 32;
  logic [15:0] tlim = 0;
  logic [K-1:0][4:0] sa, sb;
  logic [4:0] ao = 0;
  logic [15:0] dout;
  logic busy, done, timed_out;
  logic [5:0] status;
  logic [15:0] time_value;
  int checks = 0, failures = 0;
  int m_cmp = 0, m_dom = 0, m_sort = 0, m_sweep = 0, m_timeout = 0, m_tie = 0, m_pad = 0, m_min = 0, m_dom_sweep = 0, m_index = 0;

  coproc_top dut (
    .clk, .rst_n, .start, .opcode, .ord_inc, .n, .time_limit(tlim), .sweep, .store_index(si), .n_used,
    .samples_a(sa), .samples_b(sb), .addr_out(ao), .data_out(dout),
    .busy, .done, .timed_out, .status, .time_value);

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

  task automatic issue(input opcode_e op, input bit inc, input int nn, input int lim, input bit swp, input int used);
    @(negedge clk);
    opcode = op; ord_inc = inc; n = 6'(nn); tlim = 16'(lim); sweep = swp; n_used = 6'(used);
    start = 1;
    @(negedge clk); start = 0;
    while (!done) @(negedge clk);
  endtask

  // distinct "distance" values d (sample to reference) of the used samples,
  // in increasing order, and the lowest index holding each
  int dv [K], dfirst [K], nd;
  task automatic distinct_dist(input bit to_max, input int used);
    nd = 0;
    for (int d = 0; d < 32; d++) begin
      int first = -1;
      for (int j = 0; j < used; j++) begin
        int dj = to_max ? 31 - int'(sa[j]) : int'(sa[j]);
        if (dj == d && first < 0) first = j;
      end
      if (first >= 0) begin dv[nd] = d; dfirst[nd] = first; nd++; end
    end
  endtask

  int used, nn, lim, exp_cnt, dd;
  bit to_max, seen_d [32], matched [K];
  initial begin
    sa = '0; sb = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;

    // ---- time-based N-th distinct max / min
    for (int i = 0; i < 24; i++) begin
      used = (i % 3 == 0) ? $urandom_range(4, K - 1) : K;
      for (int j = 0; j < K; j++) sa[j] = 5'($urandom_range(0, (i % 2 != 0) ? 31 : 12));
      to_max = (i % 2 == 0);
      distinct_dist(to_max, used);
      if (nd < used) m_tie++;
      if (used < K) m_pad++;
      nn = $urandom_range(1, nd);
      issue(to_max ? OP_NTH_MAX : OP_NTH_MIN, 1'b0, nn, 0, 1'b0, used);
      check(!timed_out, "nth ends by comparator");
      check(int'(status) == dfirst[nn-1], "nth index");
      check(int'(time_value) == L + dv[nn-1] * S, "nth lock time");
      m_cmp++;
      if (!to_max) m_min++;
    end

    // ---- sort, decreasing and increasing
    for (int i = 0; i < 8; i++) begin
      used = (i % 2 != 0) ? K : 20;
      for (int j = 0; j < K; j++) sa[j] = 5'($urandom);
      to_max = (i % 2 == 0);
      distinct_dist(to_max, used);
      nn = $urandom_range(1, nd);
      issue(OP_SORT, !to_max, nn, 0, 1'b0, used);
      check(!timed_out && int'(status) == dfirst[nn-1], "sort last index");
      for (int k = 0; k < nn; k++) begin
        @(negedge clk); ao = 5'(k); #1;
        check(int'(dout) == L + dv[k] * S, "sorted array entry");
      end
      m_sort++;
    end

    // ---- sort storing oscillator indices instead of lock times
    si = 1;
    for (int i = 0; i < 4; i++) begin
      used = (i % 2 != 0) ? K : 24;
      for (int j = 0; j < K; j++) sa[j] = 5'($urandom);
      to_max = (i % 2 == 0);
      distinct_dist(to_max, used);
      nn = $urandom_range(1, nd);
      issue(OP_SORT, !to_max, nn, 0, 1'b0, used);
      check(!timed_out && int'(status) == dfirst[nn-1] && int'(time_value) == L + dv[nn-1] * S,
            "index sort results");
      for (int k = 0; k < nn; k++) begin
        @(negedge clk); ao = 5'(k); #1;
        check(int'(dout) == dfirst[k], "sorted array index entry");
      end
      m_index++;
    end
    si = 0;

    // ---- degree of match
    for (int i = 0; i < 12; i++) begin
      for (int j = 0; j < K; j++) begin
        sa[j] = 5'($urandom);
        sb[j] = (j % 3 == 0) ? sa[j] : 5'($urandom);
      end
      lim = $urandom_range(0, 110);
      exp_cnt = 0;
      for (int d = 0; d < 32; d++) seen_d[d] = 0;
      for (int j = 0; j < K; j++) begin
        dd = (sa[j] > sb[j]) ? int'(sa[j]) - int'(sb[j]) : int'(sb[j]) - int'(sa[j]);
        if (L + dd * S <= lim && !seen_d[dd]) begin seen_d[dd] = 1; exp_cnt++; end
      end
      issue(OP_DOM, 1'b0, 0, lim, 1'b0, K);
      check(int'(status) == exp_cnt, "degree of match");
      check(int'(time_value) == lim, "dom timer stopped at limit");
      m_dom++;
    end

    // ---- degree of match by sweeping the elements of B over all oscillators
    for (int i = 0; i < 6; i++) begin
      used = (i % 2 != 0) ? K : 12;
      for (int j = 0; j < K; j++) begin sa[j] = 5'($urandom_range(0, 15)); sb[j] = 5'($urandom_range(0, 15)); end
      exp_cnt = 0;
      for (int j = 0; j < K; j++) matched[j] = 0;
      for (int k = 0; k < used; k++) begin
        bit any;
        any = 0;
        for (int j = 0; j < used; j++) if (!matched[j] && sa[j] == sb[k]) begin matched[j] = 1; any = 1; end
        if (any) exp_cnt++;
      end
      issue(OP_DOM, 1'b0, 0, 0, 1'b1, used);
      check(int'(status) == exp_cnt, "swept degree of match");
      check(int'(time_value) == used, "one sweep step per element of B");
      m_dom_sweep++;
    end

    // ---- voltage-sweep example: 3rd maximum of four samples
    sa = '0;
    sa[0] = 5'd18; sa[1] = 5'd14; sa[2] = 5'd27; sa[3] = 5'd6;   // A, B, C, D
    issue(OP_NTH_MAX, 1'b0, 3, 0, 1'b1, 4);
    check(!timed_out && status == 6'd1, "sweep: 3rd max is B");
    check(time_value == 16'd17, "sweep: B found at step 17");
    issue(OP_SORT, 1'b0, 4, 0, 1'b1, 4);
    for (int k = 0; k < 4; k++) begin
      @(negedge clk); ao = 5'(k); #1;
      check(int'(dout) == ((k == 0) ? 4 : (k == 1) ? 13 : (k == 2) ? 17 : 25), "sweep sort steps");
    end
    si = 1;
    issue(OP_SORT, 1'b0, 4, 0, 1'b1, 4);
    si = 0;
    for (int k = 0; k < 4; k++) begin
      @(negedge clk); ao = 5'(k); #1;
      check(int'(dout) == ((k == 0) ? 2 : (k == 1) ? 0 : (k == 2) ? 1 : 3), "sweep sort order C, A, B, D");
    end
    m_index++;
    m_sweep++;
    // random sweeps, both directions
    for (int i = 0; i < 6; i++) begin
      for (int j = 0; j < K; j++) sa[j] = 5'($urandom);
      to_max = (i % 2 == 0);
      distinct_dist(to_max, K);
      nn = $urandom_range(1, nd);
      issue(to_max ? OP_NTH_MAX : OP_NTH_MIN, 1'b0, nn, 0, 1'b1, K);
      check(!timed_out && int'(status) == dfirst[nn-1], "sweep index");
      check(int'(time_value) == dv[nn-1], "sweep step count");
      m_sweep++;
    end

    // ---- time-outs: N larger than the number of distinct samples
    for (int j = 0; j < K; j++) sa[j] = 5'(j % 3);
    issue(OP_NTH_MAX, 1'b0, 5, 0, 1'b1, K);
    check(timed_out && time_value == 16'd32, "sweep time-out after 32 steps");
    m_timeout++;
    issue(OP_NTH_MIN, 1'b0, 5, 0, 1'b0, K);
    check(timed_out && time_value == 16'hFFFF, "time-mode time-out at the 16-bit limit");
    m_timeout++;

    $display("mechanisms: comparator-end %0d, min %0d, sort %0d, dom %0d, sweep %0d, timeout %0d, ties %0d, padding %0d, swept dom %0d, index sort %0d",
             m_cmp, m_min, m_sort, m_dom, m_sweep, m_timeout, m_tie, m_pad, m_dom_sweep, m_index);
    check(m_cmp > 0, "comparator end happened");
    check(m_min > 0, "minimum search happened");
    check(m_sort > 0, "sort happened");
    check(m_dom > 0, "degree of match happened");
    check(m_sweep > 0, "sweep happened");
    check(m_dom_sweep > 0, "swept degree of match happened");
    check(m_timeout > 0, "time-out happened");
    check(m_tie > 0, "duplicate samples happened");
    check(m_pad > 0, "padding happened");
    check(m_index > 0, "index storage happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
