// tb_readout: self-checking testbench for the read-out circuit.
// Three read-out circuits see the same oscillator comparator outputs: one
// with the winner-take-all stage, one with the match-counting stage, and one
// with match counting plus multiple sorted-array writes. The first and the
// third also switch at random between storing times and storing indices. Each
// oscillator j is given a random synchronization time t_j (duplicates are
// likely) and its input rises when the timer shows t_j. A reference model in
// the testbench derives the expected results:
//   mode 0 (min/max/sort): Execution Over at the event that brings the count
//     to N, Output Status = lowest index of that event, Timer Value = its
//     time, sorted array entry k = time of event k (MC: at the running
//     count, leaving gaps for duplicates; with multiple writes: the p
//     entries of an event of p oscillators all hold its time); in index
//     mode the entries hold the event's lowest index instead;
//   mode 1 (degree of match): count of events (WTA) or of oscillators (MC)
//     whose time is within the limit, Timer Value = limit.
module tb_readout;
  localparam int K  = 32;
  localparam int TW = 16;
  logic clk = 0, rst_n = 0;
  logic rc = 0, wv = 0, wl = 0, mux = 0;
  logic [5:0] vin = 0;
  logic [15:0] lim = 0;
  logic [4:0] ao = 0;
  logic [K-1:0] sync = '0;
  logic si = 0;
  logic [5:0] st0, st1, st2;
  logic [15:0] do0, do1, do2, tv0, tv1, tv2;
  logic eo0, eo1, eo2, co0, co1, co2;
  int checks = 0, failures = 0;
  int n_cmp_end = 0, n_dom_end = 0, n_dup = 0, n_index = 0;

  readout #(.K(K), .TW(TW), .USE_MC(1'b0)) dut0 (
    .clk, .rst_n, .reset_counter(rc), .write_value(wv), .value_in(vin), .write_limit(wl),
    .limit_in(lim), .timer_tick(1'b1), .mux_input(mux), .store_index(si), .addr_out(ao), .osc_sync(sync),
    .output_status(st0), .data_out(do0), .execution_over(eo0), .timer_value(tv0), .count_over(co0));
  readout #(.K(K), .TW(TW), .USE_MC(1'b1)) dut1 (
    .clk, .rst_n, .reset_counter(rc), .write_value(wv), .value_in(vin), .write_limit(wl),
    .limit_in(lim), .timer_tick(1'b1), .mux_input(mux), .store_index(1'b0), .addr_out(ao), .osc_sync(sync),
    .output_status(st1), .data_out(do1), .execution_over(eo1), .timer_value(tv1), .count_over(co1));
  readout #(.K(K), .TW(TW), .USE_MC(1'b1), .MC_MULTI_WRITE(1'b1)) dut2 (
    .clk, .rst_n, .reset_counter(rc), .write_value(wv), .value_in(vin), .write_limit(wl),
    .limit_in(lim), .timer_tick(1'b1), .mux_input(mux), .store_index(si), .addr_out(ao), .osc_sync(sync),
    .output_status(st2), .data_out(do2), .execution_over(eo2), .timer_value(tv2), .count_over(co2));

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  int t [K];
  int ev_time [K];   // distinct times in increasing order
  int ev_first [K];  // lowest index per event
  int ev_size [K];   // oscillators per event
  int n_ev;

  task automatic make_events();
    int used [int];
    n_ev = 0;
    for (int v = 0; v < 200; v++) begin
      int sz = 0, first = -1;
      for (int j = 0; j < K; j++) if (t[j] == v) begin sz++; if (first < 0) first = j; end
      if (sz > 0) begin
        ev_time[n_ev] = v; ev_first[n_ev] = first; ev_size[n_ev] = sz; n_ev++;
        if (sz > 1) n_dup++;
      end
    end
  endtask

  // Runs one instruction; raises sync[j] when the timer shows t[j].
  task automatic run(input bit m, input int nval, input int limit);
    @(negedge clk);
    sync = '0; rc = 1; wv = 1; wl = 1; mux = m; vin = 6'(nval); lim = 16'(limit);
    @(negedge clk);
    rc = 0; wv = 0; wl = 0;
    for (int c = 0; c < 300; c++) begin
      for (int j = 0; j < K; j++) if (t[j] == c) sync[j] = 1'b1;
      @(negedge clk);
    end
  endtask

  int exp_ev, cum, exp_cnt0, exp_cnt1, nval, limit;
  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int run_i = 0; run_i < 60; run_i++) begin
      for (int j = 0; j < K; j++) t[j] = $urandom_range(0, (run_i % 2 != 0) ? 40 : 150);
      make_events();
      if (run_i % 3 != 2) begin
        // ---- mode 0: N-th distinct (WTA) / N-th with duplicates (MC)
        nval = $urandom_range(1, n_ev);
        si = 1'($urandom_range(0, 1));
        if (si) n_index++;
        run(1'b0, nval, 32'hFFFF);
        exp_ev = nval - 1;
        check(eo0, "wta execution over");
        check(int'(st0) == ev_first[exp_ev], "wta index of N-th distinct");
        check(int'(tv0) == ev_time[exp_ev], "wta timer value held");
        for (int k = 0; k < nval; k++) begin
          ao = 5'(k); #1;
          check(int'(do0) == (si ? ev_first[k] : ev_time[k]), "wta sorted array entry");
        end
        // MC: first event at which the running count reaches N
        cum = 0; exp_ev = -1;
        for (int e = 0; e < n_ev; e++) begin
          if (exp_ev < 0) begin
            ao = 5'(cum); #1;
            check(int'(do1) == ev_time[e], "mc sorted array entry");
            for (int q = cum; q < cum + ev_size[e] && q < K; q++) begin
              ao = 5'(q); #1;
              check(int'(do2) == (si ? ev_first[e] : ev_time[e]), "mc multi-write entry");
            end
            cum += ev_size[e];
            if (cum >= nval) exp_ev = e;
          end
        end
        check(eo1, "mc execution over");
        check(int'(st1) == ev_first[exp_ev], "mc index");
        check(int'(tv1) == ev_time[exp_ev], "mc timer value");
        check(eo2 && st2 == st1 && tv2 == tv1, "mc multi-write results");
        n_cmp_end++;
      end else begin
        // ---- mode 1: degree of match within a time limit
        limit = $urandom_range(0, 120);
        run(1'b1, 0, limit);
        exp_cnt0 = 0; exp_cnt1 = 0;
        for (int e = 0; e < n_ev; e++) if (ev_time[e] <= limit) begin exp_cnt0++; exp_cnt1 += ev_size[e]; end
        check(eo0 && eo1, "dom execution over");
        check(co0, "dom count over");
        check(int'(st0) == exp_cnt0, "wta dom count");
        check(int'(st1) == exp_cnt1, "mc dom count");
        check(eo2 && int'(st2) == exp_cnt1, "mc multi-write dom count");
        check(int'(tv0) == limit, "dom timer at limit");
        n_dom_end++;
      end
    end
    check(n_cmp_end > 0 && n_dom_end > 0 && n_dup > 0 && n_index > 0, "all mechanisms exercised");
    $display("comparator ends %0d, time-limit ends %0d, duplicate events %0d, index-mode runs %0d",
             n_cmp_end, n_dom_end, n_dup, n_index);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
