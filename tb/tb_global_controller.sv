// tb_global_controller: self-checking testbench for the global controller.
// The read-out side is played by the testbench. For every instruction it
// checks the set-up sequence (latch + Reset Counter, then Reset Counter +
// Write Value + Write Time-limit), the oscillator pair selection, MUX Input,
// the Timer-Limit written, the reference sweep (one latch and one timer tick
// every SWEEP_DWELL cycles, levels stepping in the right direction), the
// capture of Output Status and Timer Value on Execution Over, and the
// time-out when only Count Over arrives. In the degree-of-match sweep the
// reference must walk through the elements of vector B.
module tb_global_controller;
  import coproc_pkg::*;
  localparam int K = 32, DW = 4;
  logic clk = 0, rst_n = 0, start = 0, ord_inc = 0, sweep = 0;
  opcode_e opcode = OP_NTH_MAX;
  logic [5:0] n = 0, n_used_in = 0;
  logic [15:0] tlim = 0;
  logic busy, done, timed_out;
  logic [5:0] status;
  logic [15:0] time_value;
  logic latch;
  ref_sel_e sel;
  logic [5:0] n_used;
  logic [4:0] vref;
  logic rc, wv, wl, tick, mux;
  logic [5:0] value_out;
  logic [15:0] limit_out;
  logic eo = 0, co = 0;
  logic [5:0] ostat = 0;
  logic [15:0] tval = 0;
  logic [K-1:0][4:0] sb;
  int nu, bk;
  int checks = 0, failures = 0, n_sweep = 0, n_timeout = 0;

  global_controller #(.K(K), .SW(5), .TW(16), .SWEEP_DWELL(DW)) dut (
    .clk, .rst_n, .start, .opcode, .ord_inc, .n, .time_limit(tlim), .sweep, .n_used_in, .samples_b(sb),
    .busy, .done, .timed_out, .status, .time_value,
    .latch, .sel, .n_used, .vref,
    .reset_counter(rc), .write_value(wv), .value_out, .write_limit(wl), .limit_out,
    .timer_tick(tick), .mux_input(mux),
    .execution_over(eo), .count_over(co), .output_status(ostat), .timer_value(tval));

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

  int exp_sel, exp_lim, lvl, step_cnt, dur, ticks, cyc;
  bit desc, swp;
  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 80; i++) begin
      @(negedge clk);
      opcode = opcode_e'(i % 4); ord_inc = i[2]; sweep = i[3]; n = 6'($urandom_range(1, K));
      tlim = 16'($urandom_range(5, 200)); n_used_in = 6'($urandom_range(1, 40));
      swp  = sweep;
      for (int j = 0; j < K; j++) sb[j] = 5'($urandom);
      nu = (int'(n_used_in) > K) ? K : int'(n_used_in);
      desc = (opcode == OP_NTH_MAX) || (opcode == OP_SORT && !ord_inc);
      exp_sel = swp ? 3 : (opcode == OP_DOM) ? 2 : desc ? 0 : 1;
      exp_lim = (opcode == OP_DOM && swp) ? nu : (opcode == OP_DOM) ? int'(tlim) : swp ? 32 : 32'hFFFF;
      start = 1;
      @(negedge clk); start = 0;
      // LATCH
      check(busy && latch && rc && !wv && !wl, "latch cycle");
      check(int'(sel) == exp_sel, "pair selection");
      check(int'(n_used) == ((int'(n_used_in) > K) ? K : int'(n_used_in)), "n_used clipped to K");
      if (swp) check(int'(vref) == ((opcode == OP_DOM) ? int'(sb[0]) : desc ? 31 : 0), "first sweep level");
      @(negedge clk);
      // ARM
      check(rc && wv && wl && !latch, "arm cycle");
      check(value_out == n && int'(limit_out) == exp_lim, "N and Timer-Limit");
      check(mux == (opcode == OP_DOM), "mux input");
      // RUN: react after a random time, either by Execution Over or Count Over only
      dur = $urandom_range(3, 60);
      lvl = desc ? 31 : 0; ticks = 0; cyc = 0; bk = 0;
      while (cyc < dur) begin
        @(negedge clk); cyc++;
        if (swp) begin
          check(latch == tick, "sweep: latch with tick");
          if (latch) begin
            if (opcode == OP_DOM) begin
              bk = (bk + 1 < nu) ? bk + 1 : bk;
              lvl = int'(sb[bk]);
            end else lvl = desc ? ((lvl > 0) ? lvl - 1 : 0) : ((lvl < 31) ? lvl + 1 : 31);
            check(int'(vref) == lvl, "sweep level steps");
            check((cyc + 1) % DW == 0, "sweep dwell");
            ticks++;
          end
        end else begin
          check(tick && !latch, "time mode ticks every cycle");
        end
      end
      if (swp) begin check(ticks == (dur + 1) / DW, "sweep step count"); n_sweep++; end
      ostat = 6'($urandom); tval = 16'($urandom);
      if (i % 5 == 4 && opcode != OP_DOM) begin
        co = 1;  // limit reached, N never reached
        @(negedge clk); @(negedge clk);
        check(done && timed_out, "time-out ends instruction");
        n_timeout++;
      end else begin
        eo = 1;
        @(negedge clk);
        check(done && !timed_out, "execution over ends instruction");
      end
      check(status == ostat && time_value == tval, "results captured");
      @(negedge clk);
      check(!busy && !done, "back to idle");
      eo = 0; co = 0;
    end
    check(n_sweep > 0 && n_timeout > 0, "sweep and time-out exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
