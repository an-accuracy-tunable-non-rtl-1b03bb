// global_controller: executes one co-processor instruction for the host.
//
// Host handshake: with `busy` low the host presents an instruction and pulses
// `start`. The controller then
//   LATCH : has the latching circuitry apply the oscillator input pairs the
//           instruction needs and clears the read-out counter;
//   ARM   : clears the counter again (the oscillators' comparators from the
//           previous instruction have now dropped), writes N into the
//           Value-Register, writes the Timer-Limit (which restarts the timer)
//           and selects the read-out multiplexers;
//   RUN   : waits for Execution Over. In the voltage-sweep mode it steps the
//           common reference input one level every SWEEP_DWELL cycles, from
//           a_MAX down (maximum, decreasing sort) or from a_MIN up (minimum,
//           increasing sort), and ticks the timer once per step, so the timer
//           counts sweep steps instead of cycles. For degree of match the
//           sweep instead applies the elements of vector B one after the
//           other to all oscillators (which hold vector A), so the count is
//           the number of B elements that match some not yet matched A
//           element, whatever their positions; the timer limit is then the
//           number of samples. An N-th min/max or sort
//           whose N is never reached ends when the timer hits its limit;
//   DONE  : copies Output Status and Timer Value to `status` / `time_value`,
//           pulses `done` for one cycle and returns to idle.
// Results: for N-th max/min `status` is the oscillator index of the N-th
// distinct extreme and `time_value` its synchronization time; for degree of
// match `status` is the number of oscillators synchronized within
// `time_limit`; for sort the times are in the read-out's sorted array.
//
// The set-up actions per instruction (pair assignment, MUX Input 0 for
// min/max/sort and 1 for degree of match, Timer-Limit of 2**16 written as
// 16'hFFFF for min/max/sort, N in the Value-Register) follow the instruction
// algorithms, and the sweep follows the HyperFET validation. The state
// machine, the handshake, the instruction encoding, the time-out and the
// sweep timing are this design's choices. In sweep mode the timer limit is
// the number of levels, 2**SW; SWEEP_DWELL must lie between the oscillator
// model's lock time + 2 and lock time + one level + 1 so that exactly the
// oscillators whose sample equals the reference synchronize in a step.
module global_controller
  import coproc_pkg::opcode_e, coproc_pkg::ref_sel_e;
#(
  parameter int unsigned K           = coproc_pkg::K_DEF,
  parameter int unsigned SW          = coproc_pkg::SW,
  parameter int unsigned TW          = coproc_pkg::TW,
  parameter int unsigned SWEEP_DWELL = 4,
  localparam int unsigned IW = $clog2(K),
  localparam int unsigned CW = $clog2(K + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  // host interface
  input  logic          start,
  input  opcode_e       opcode,
  input  logic          ord_inc,
  input  logic [CW-1:0] n,
  input  logic [TW-1:0] time_limit,
  input  logic          sweep,
  input  logic [CW-1:0] n_used_in,
  input  logic [K-1:0][SW-1:0] samples_b,
  output logic          busy,
  output logic          done,
  output logic          timed_out,
  output logic [CW-1:0] status,
  output logic [TW-1:0] time_value,
  // latching circuitry
  output logic          latch,
  output ref_sel_e      sel,
  output logic [CW-1:0] n_used,
  output logic [SW-1:0] vref,
  // read-out circuitry
  output logic          reset_counter,
  output logic          write_value,
  output logic [CW-1:0] value_out,
  output logic          write_limit,
  output logic [TW-1:0] limit_out,
  output logic          timer_tick,
  output logic          mux_input,
  input  logic          execution_over,
  input  logic          count_over,
  input  logic [CW-1:0] output_status,
  input  logic [TW-1:0] timer_value
);

  typedef enum logic [1:0] {S_IDLE, S_LATCH, S_ARM, S_RUN} state_e;

  localparam int unsigned DW = $clog2(SWEEP_DWELL + 1);
  localparam logic [SW-1:0] LO = '0;
  localparam logic [SW-1:0] HI = '1;

  state_e        state_q;
  opcode_e       op_q;
  logic          ord_inc_q, sweep_q, count_over_q;
  logic [CW-1:0] n_q;
  logic [TW-1:0] limit_q;
  logic [DW-1:0] dwell_q;
  logic          descending;
  logic [IW-1:0] bidx_q, bidx_next;
  logic [SW-1:0] vref_next;
  logic          step_now;

  // Max and decreasing sort look for samples close to a_MAX.
  assign descending = (op_q == coproc_pkg::OP_NTH_MAX) || (op_q == coproc_pkg::OP_SORT && !ord_inc_q);

  always_comb begin
    if (sweep_q)                               sel = coproc_pkg::REF_VREF;
    else if (op_q == coproc_pkg::OP_DOM)       sel = coproc_pkg::REF_VECB;
    else if (descending)           sel = coproc_pkg::REF_AMAX;
    else                           sel = coproc_pkg::REF_AMIN;
  end

  assign busy          = (state_q != S_IDLE);
  assign mux_input     = (op_q == coproc_pkg::OP_DOM);
  assign value_out     = n_q;
  assign limit_out     = limit_q;
  assign reset_counter = (state_q == S_LATCH) || (state_q == S_ARM);
  assign write_value   = (state_q == S_ARM);
  assign write_limit   = (state_q == S_ARM);

  // A sweep step happens every SWEEP_DWELL cycles, counted from LATCH.
  assign step_now = sweep_q && (state_q == S_RUN) &&
                    !execution_over && (dwell_q == DW'(SWEEP_DWELL));
  assign latch      = (state_q == S_LATCH) || step_now;
  assign timer_tick = sweep_q ? step_now : 1'b1;

  // Level the next sweep strobe applies: one level further for min/max/sort,
  // the next element of vector B for degree of match.
  always_comb begin
    bidx_next = bidx_q;
    if (op_q == coproc_pkg::OP_DOM) begin
      if (32'(bidx_q) + 1 < 32'(n_used)) bidx_next = bidx_q + 1'b1;
      vref_next = samples_b[bidx_next];
    end else if (descending) begin
      vref_next = (vref != LO) ? vref - 1'b1 : vref;
    end else begin
      vref_next = (vref != HI) ? vref + 1'b1 : vref;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q      <= S_IDLE;
      op_q         <= coproc_pkg::OP_NTH_MAX;
      ord_inc_q    <= 1'b0;
      sweep_q      <= 1'b0;
      n_q          <= '0;
      n_used       <= '0;
      limit_q      <= '0;
      vref         <= HI;
      bidx_q       <= '0;
      dwell_q      <= '0;
      count_over_q <= 1'b0;
      done         <= 1'b0;
      timed_out    <= 1'b0;
      status       <= '0;
      time_value   <= '0;
    end else begin
      done         <= 1'b0;
      count_over_q <= count_over && (state_q == S_RUN);
      unique case (state_q)
        S_IDLE: begin
          if (start) begin
            op_q      <= opcode;
            ord_inc_q <= ord_inc;
            sweep_q   <= sweep;
            n_q       <= n;
            n_used    <= (n_used_in > CW'(K)) ? CW'(K) : n_used_in;
            if (opcode == coproc_pkg::OP_DOM && sweep)
                                   limit_q <= TW'((n_used_in > CW'(K)) ? CW'(K) : n_used_in);
            else if (opcode == coproc_pkg::OP_DOM)  limit_q <= time_limit;
            else if (sweep)        limit_q <= TW'(2**SW);
            else                   limit_q <= '1;
            bidx_q    <= '0;
            if (opcode == coproc_pkg::OP_DOM) vref <= samples_b[0];
            else vref <= (opcode == coproc_pkg::OP_NTH_MAX || (opcode == coproc_pkg::OP_SORT && !ord_inc)) ? HI : LO;
            state_q   <= S_LATCH;
          end
        end
        S_LATCH: begin
          // vref always holds the level the next strobe will apply.
          vref    <= vref_next;
          bidx_q  <= bidx_next;
          dwell_q <= DW'(1);
          state_q <= S_ARM;
        end
        S_ARM: begin
          dwell_q <= dwell_q + 1'b1;
          state_q <= S_RUN;
        end
        S_RUN: begin
          if (step_now) begin
            dwell_q <= DW'(1);
            vref    <= vref_next;
            bidx_q  <= bidx_next;
          end else begin
            dwell_q <= dwell_q + 1'b1;
          end
          // count_over_q: the limit was reached a cycle ago and the
          // comparator did not end the instruction in that cycle.
          if (execution_over || (count_over_q && !mux_input)) begin
            timed_out  <= !execution_over;
            status     <= output_status;
            time_value <= timer_value;
            done       <= 1'b1;
            state_q    <= S_IDLE;
          end
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) done |-> !busy);

endmodule
