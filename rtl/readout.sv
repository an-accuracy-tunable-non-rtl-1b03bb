// readout: the read-out circuit that turns oscillator synchronizations into
// instruction results.
//
// The K oscillator comparator outputs drive a winner-take-all stage (or, with
// USE_MC = 1, the match-counting stage). Each synchronization event pulses
// Valid, which increments the Log(K)-counter and writes the current Timer
// Value into the sorted array at the counter's address. Two multiplexers,
// selected by MUX Input, choose the result:
//   mux_input = 0 (N-th min/max, sort): Execution Over comes from the
//     comparator of counter and Value-Register (count reached N) and Output
//     Status is the index of the oscillator that synchronized last;
//   mux_input = 1 (degree of match): Execution Over comes from the timer's
//     Count Over and Output Status is the counter, i.e. how many oscillators
//     synchronized within the Timer-Limit.
// Execution Over disables the WTA and freezes the timer, so Output Status and
// Timer Value hold until the next instruction.
//
// The structure and the wiring follow the read-out block diagram. This
// design's own choices: Execution Over is a sticky level cleared by
// `reset_counter`; it is asserted in the same cycle as the N-th
// synchronization (the comparator looks at the counter's next value) so the
// held Timer Value is exactly the time of that synchronization; Output Status
// and the counter are clog2(K+1) bits so a degree of match of K fits; and
// `count_over` is also brought out so the controller can end an instruction
// whose N is never reached.
//
// Two options the description offers as alternatives are built in as well:
// `store_index` = 1 makes the sorted array take the index of the oscillator
// that synchronized instead of the Timer Value, so a sort leaves the sample
// indices in order; and, with USE_MC = 1 and MC_MULTI_WRITE = 1, a Match
// Count of p writes p consecutive entries instead of leaving p-1 gaps. Only
// the lowest index of such a group is known, so in index mode all p entries
// hold that index. The selection by an input and by a parameter is this
// design's choice.
//
// Control inputs are one-cycle strobes from the global controller; the
// controller asserts `reset_counter`, `write_value` and `write_limit`
// together to start an instruction.
module readout #(
  parameter int unsigned K      = coproc_pkg::K_DEF,
  parameter int unsigned TW     = coproc_pkg::TW,
  parameter bit          USE_MC = 1'b0,
  parameter bit          MC_MULTI_WRITE = 1'b0,
  localparam int unsigned IW = $clog2(K),
  localparam int unsigned CW = $clog2(K + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  // from the global controller
  input  logic          reset_counter,
  input  logic          write_value,
  input  logic [CW-1:0] value_in,
  input  logic          write_limit,
  input  logic [TW-1:0] limit_in,
  input  logic          timer_tick,
  input  logic          mux_input,
  input  logic          store_index,
  input  logic [IW-1:0] addr_out,
  // from the oscillator array
  input  logic [K-1:0]  osc_sync,
  // to the global controller / host
  output logic [CW-1:0] output_status,
  output logic [TW-1:0] data_out,
  output logic          execution_over,
  output logic [TW-1:0] timer_value,
  output logic          count_over
);

  logic          valid;
  logic [IW-1:0] index_now, index;
  logic [CW-1:0] step;
  logic [CW-1:0] count, count_next;
  logic [CW-1:0] value;
  logic          cmp_hit, cmp_pulse;
  logic          exec_over_q;
  logic          done_now;

  if (USE_MC) begin : g_mc
    match_count #(.K(K)) u_mc (
      .clk, .rst_n, .clear(reset_counter), .sync(osc_sync), .disable_i(exec_over_q),
      .valid, .index_now, .index, .mcount(step)
    );
  end else begin : g_wta
    logic [K-1:0] unused_mask;
    wta #(.K(K)) u_wta (
      .clk, .rst_n, .clear(reset_counter), .sync(osc_sync), .disable_i(exec_over_q),
      .valid, .index_now, .index, .new_mask(unused_mask)
    );
    assign step = CW'(1);
  end

  logk_counter #(.K(K)) u_counter (
    .clk, .rst_n, .reset_count(reset_counter), .incr(valid), .step,
    .count, .count_next
  );

  value_register #(.K(K)) u_value (
    .clk, .rst_n, .write_value, .value_in, .value
  );

  count_comparator #(.K(K)) u_cmp (
    .clk, .rst_n, .count(count_next), .value, .hit(cmp_hit), .pulse(cmp_pulse)
  );

  // Execution Over source multiplexer.
  assign done_now = !reset_counter && (mux_input ? count_over : cmp_pulse);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)             exec_over_q <= 1'b0;
    else if (reset_counter) exec_over_q <= 1'b0;
    else if (done_now)      exec_over_q <= 1'b1;
  end

  assign execution_over = exec_over_q;

  sync_timer #(.TW(TW)) u_timer (
    .clk, .rst_n, .write_limit, .limit_in, .tick(timer_tick),
    .freeze(exec_over_q || done_now), .count_over, .value(timer_value)
  );

  // Sorted-array data: Timer Value, or the winner's index.
  logic [TW-1:0] array_data;
  logic [CW-1:0] array_count;
  assign array_data  = store_index ? TW'(index_now) : timer_value;
  assign array_count = (USE_MC && MC_MULTI_WRITE) ? step : CW'(1);

  sorted_array #(.K(K), .TW(TW)) u_array (
    .clk, .write_en(valid), .addr_in(count), .write_count(array_count),
    .data_in(array_data), .addr_out, .data_out
  );

  // Output Status multiplexer: winner index (0) or synchronization count (1).
  always_comb begin
    if (mux_input) output_status = count;
    else           output_status = CW'(valid ? index_now : index);
  end

  // The comparator only ends an instruction at its rising edge.
  property p_over_needs_cause;
    @(posedge clk) disable iff (!rst_n)
      $rose(exec_over_q) |-> $past(mux_input ? count_over : cmp_hit);
  endproperty
  assert property (p_over_needs_cause);

endmodule
