// tb_coproc_top_mc: end-to-end testbench of the co-processor built with the
// match-counting read-out (USE_MC = 1). With duplicate samples the counter
// advances by the number of oscillators that lock together, so
//   N-th max / min  returns the N-th element of the sorted list counting
//                   duplicates (lowest index holding it, and its lock time);
//   sort            leaves gaps in the sorted array where duplicates were;
//                   a second instance with MC_MULTI_WRITE = 1 fills those
//                   gaps by writing the lock time p times for p duplicates;
//   degree of match counts every matching oscillator, not every distinct
//                   lock time.
// Results are checked against a reference computed from the samples.
module tb_coproc_top_mc;
  import coproc_pkg::*;
  localparam int K = 32, L = 2, S = 4;
  logic clk = 0, rst_n = 0, start = 0, ord_inc = 0, sweep = 0;
  opcode_e opcode = OP_NTH_MAX;
  logic [5:0] n = 1, n_used = 32;
  logic [15:0] tlim = 0;
  logic [K-1:0][4:0] sa, sb;
  logic [4:0] ao = 0;
  logic [15:0] dout, dout_f;
  logic busy, done, timed_out;
  logic busy_f, done_f, timed_out_f;
  logic [5:0] status, status_f;
  logic [15:0] time_value, time_value_f;
  int checks = 0, failures = 0, m_jump = 0, m_fill = 0;

  coproc_top #(.USE_MC(1'b1)) dut (
    .clk, .rst_n, .start, .opcode, .ord_inc, .n, .time_limit(tlim), .sweep, .store_index(1'b0), .n_used,
    .samples_a(sa), .samples_b(sb), .addr_out(ao), .data_out(dout),
    .busy, .done, .timed_out, .status, .time_value);

  coproc_top #(.USE_MC(1'b1), .MC_MULTI_WRITE(1'b1)) dut_fill (
    .clk, .rst_n, .start, .opcode, .ord_inc, .n, .time_limit(tlim), .sweep, .store_index(1'b0), .n_used,
    .samples_a(sa), .samples_b(sb), .addr_out(ao), .data_out(dout_f),
    .busy(busy_f), .done(done_f), .timed_out(timed_out_f), .status(status_f), .time_value(time_value_f));

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

  task automatic issue(input opcode_e op, input bit inc, input int nn, input int lim);
    @(negedge clk);
    opcode = op; ord_inc = inc; n = 6'(nn); tlim = 16'(lim); sweep = 0; n_used = 6'(K);
    start = 1;
    @(negedge clk); start = 0;
    while (!done) @(negedge clk);
  endtask

  int cum, exp_d, exp_first, addr, dj, nn, lim, exp_cnt;
  bit to_max;
  initial begin
    sa = '0; sb = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 16; i++) begin
      for (int j = 0; j < K; j++) sa[j] = 5'($urandom_range(0, 9));   // many duplicates
      to_max = (i % 2 == 0);
      nn = $urandom_range(1, K);
      // N-th element counting duplicates
      cum = 0; exp_d = -1; exp_first = -1;
      for (int d = 0; d < 32 && exp_d < 0; d++) begin
        int cnt;
        cnt = 0;
        for (int j = K - 1; j >= 0; j--) begin
          dj = to_max ? 31 - int'(sa[j]) : int'(sa[j]);
          if (dj == d) begin cnt++; exp_first = j; end
        end
        if (cnt > 1 && cum < nn && cum + cnt > nn) m_jump++;
        cum += cnt;
        if (cum >= nn) exp_d = d;
      end
      issue(OP_SORT, !to_max, nn, 0);
      check(!timed_out, "ends by comparator");
      check(int'(time_value) == L + exp_d * S, "N-th with duplicates: lock time");
      check(done_f && status_f == status && time_value_f == time_value, "multi-write instance agrees");
      // sorted array: each distinct value at the running count
      addr = 0;
      for (int d = 0; d <= exp_d; d++) begin
        int cnt;
        cnt = 0;
        for (int j = 0; j < K; j++) begin
          dj = to_max ? 31 - int'(sa[j]) : int'(sa[j]);
          if (dj == d) cnt++;
        end
        if (cnt > 0) begin
          @(negedge clk); ao = 5'(addr); #1;
          check(int'(dout) == L + d * S, "sorted array entry after gap");
          for (int q = addr; q < addr + cnt && q < K; q++) begin
            ao = 5'(q); #1;
            check(int'(dout_f) == L + d * S, "multi-write fills the gap");
            if (q > addr) m_fill++;
          end
          addr += cnt;
        end
      end
      issue(to_max ? OP_NTH_MAX : OP_NTH_MIN, 1'b0, nn, 0);
      check(int'(status) == exp_first, "N-th with duplicates: index");
    end
    // degree of match counts every matching oscillator
    for (int i = 0; i < 8; i++) begin
      for (int j = 0; j < K; j++) begin sa[j] = 5'($urandom); sb[j] = (j % 2 != 0) ? sa[j] : 5'($urandom); end
      lim = $urandom_range(0, 100);
      exp_cnt = 0;
      for (int j = 0; j < K; j++) begin
        dj = (sa[j] > sb[j]) ? int'(sa[j]) - int'(sb[j]) : int'(sb[j]) - int'(sa[j]);
        if (L + dj * S <= lim) exp_cnt++;
      end
      issue(OP_DOM, 1'b0, 0, lim);
      check(int'(status) == exp_cnt, "degree of match counts oscillators");
    end
    $display("counter jumps over N: %0d", m_jump);
    $display("gap entries filled by multiple writes: %0d", m_fill);
    check(m_jump > 0, "counter jump exercised");
    check(m_fill > 0, "multiple writes exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
