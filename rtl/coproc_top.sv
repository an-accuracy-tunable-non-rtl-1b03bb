// coproc_top: the coupled-oscillator co-processor.
//
// An array of K two-input coupled oscillators does the comparing: each pair
// locks after a time that grows with the difference of its two input levels,
// so the order in which the oscillators lock orders the samples by their
// distance to a common reference (a_MAX, a_MIN or a swept level) or, for
// degree of match, says which sample pairs are close. The digital part around
// the array only times and counts those lock events:
//   global_controller  runs one instruction for the host (start/busy/done);
//   latch_tune         applies the oscillator input pairs;
//   osc_array          behavioural model of the K oscillators + comparators;
//   readout            WTA / counter / Value-Register / comparator / timer /
//                      sorted array, producing Output Status, Timer Value,
//                      Execution Over and Data Out.
// The block structure follows the co-processor block diagram. The host and
// the analog front end (sensors, matching cells, DC offset and amplitude
// tuning) are outside: samples enter as SW-bit level codes on `samples_a` /
// `samples_b`, and the host reads the sorted array through `addr_out` /
// `data_out`.
//
// `store_index` = 1 makes a min/max/sort instruction store the index of each
// synchronizing oscillator in the sorted array instead of its Timer Value
// (the description's alternative for sorting); it is sampled with `start`,
// like the other instruction fields, by a register in this module.
//
// Parameters: K oscillators (32), SW-bit levels (5), TW-bit timer (16),
// USE_MC selects the match-counting read-out (0: winner-take-all),
// MC_MULTI_WRITE makes it fill the sorted array for simultaneous
// synchronizations instead of leaving gaps (0: gaps), the
// oscillator model timing (LOCK_CYCLES, CYCLES_PER_LEVEL, MAX_SYNC_DIFF) and
// the sweep dwell SWEEP_DWELL. One clock, asynchronous active-low reset.
module coproc_top
  import coproc_pkg::opcode_e, coproc_pkg::ref_sel_e;
#(
  parameter int unsigned K                = coproc_pkg::K_DEF,
  parameter int unsigned SW               = coproc_pkg::SW,
  parameter int unsigned TW               = coproc_pkg::TW,
  parameter bit          USE_MC           = 1'b0,
  parameter bit          MC_MULTI_WRITE   = 1'b0,
  parameter int unsigned LOCK_CYCLES      = 2,
  parameter int unsigned CYCLES_PER_LEVEL = 4,
  parameter int unsigned MAX_SYNC_DIFF    = 2**SW - 1,
  parameter int unsigned SWEEP_DWELL      = 4,
  localparam int unsigned IW = $clog2(K),
  localparam int unsigned CW = $clog2(K + 1)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // instruction from the host
  input  logic                 start,
  input  opcode_e              opcode,
  input  logic                 ord_inc,
  input  logic [CW-1:0]        n,
  input  logic [TW-1:0]        time_limit,
  input  logic                 sweep,
  input  logic                 store_index,
  input  logic [CW-1:0]        n_used,
  // analog samples, as level codes
  input  logic [K-1:0][SW-1:0] samples_a,
  input  logic [K-1:0][SW-1:0] samples_b,
  // results
  input  logic [IW-1:0]        addr_out,
  output logic [TW-1:0]        data_out,
  output logic                 busy,
  output logic                 done,
  output logic                 timed_out,
  output logic [CW-1:0]        status,
  output logic [TW-1:0]        time_value
);

  logic                 latch, restart;
  ref_sel_e             sel;
  logic [CW-1:0]        n_used_q;
  logic [SW-1:0]        vref;
  logic [K-1:0][SW-1:0] osc_a, osc_b;
  logic [K-1:0]         osc_sync;
  logic                 reset_counter, write_value, write_limit, timer_tick, mux_input;
  logic [CW-1:0]        value_out, output_status;
  logic [TW-1:0]        limit_out, timer_value;
  logic                 execution_over, count_over;
  logic                 store_index_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)              store_index_q <= 1'b0;
    else if (start && !busy) store_index_q <= store_index;
  end

  global_controller #(.K(K), .SW(SW), .TW(TW), .SWEEP_DWELL(SWEEP_DWELL)) u_ctrl (
    .clk, .rst_n,
    .start, .opcode, .ord_inc, .n, .time_limit, .sweep, .n_used_in(n_used),
    .samples_b,
    .busy, .done, .timed_out, .status, .time_value,
    .latch, .sel, .n_used(n_used_q), .vref,
    .reset_counter, .write_value, .value_out, .write_limit, .limit_out,
    .timer_tick, .mux_input,
    .execution_over, .count_over, .output_status, .timer_value
  );

  latch_tune #(.K(K), .SW(SW)) u_latch (
    .clk, .rst_n, .latch, .sel, .n_used(n_used_q), .vref,
    .samples_a, .samples_b, .osc_a, .osc_b, .restart
  );

  osc_array #(
    .K(K), .SW(SW), .LOCK_CYCLES(LOCK_CYCLES), .CYCLES_PER_LEVEL(CYCLES_PER_LEVEL),
    .MAX_SYNC_DIFF(MAX_SYNC_DIFF)
  ) u_osc (
    .clk, .rst_n, .restart, .in_a(osc_a), .in_b(osc_b), .sync(osc_sync)
  );

  readout #(.K(K), .TW(TW), .USE_MC(USE_MC), .MC_MULTI_WRITE(MC_MULTI_WRITE)) u_readout (
    .clk, .rst_n,
    .reset_counter, .write_value, .value_in(value_out),
    .write_limit, .limit_in(limit_out), .timer_tick, .mux_input,
    .store_index(store_index_q), .addr_out,
    .osc_sync,
    .output_status, .data_out, .execution_over, .timer_value, .count_over
  );

endmodule
