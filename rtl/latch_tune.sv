// latch_tune: latching circuitry in front of the oscillator array.
//
// On a one-cycle `latch` strobe it captures, for every oscillator j, the pair
// of levels the instruction needs: the first input is sample A_j, the second
// is chosen by `sel`:
//   coproc_pkg::REF_AMAX  <A_j, a_MAX>  (N-th maximum, decreasing sort)
//   coproc_pkg::REF_AMIN  <A_j, a_MIN>  (N-th minimum, increasing sort)
//   coproc_pkg::REF_VECB  <A_j, B_j>    (degree of match of vectors A and B)
//   coproc_pkg::REF_VREF  <A_j, vref>   (voltage-sweep mode, vref stepped by the controller)
// Oscillators j >= n_used, for which there is no sample, receive the extreme
// pair <a_MIN, a_MAX> so that they are the last to synchronize. `restart`
// pulses in the cycle after the strobe, together with the new outputs, and
// tells the oscillators that their inputs were applied afresh.
//
// The pair assignments and the padding of unused oscillators follow the
// instruction descriptions. The DC offset / amplitude tuning that maps a
// sensor signal into the oscillators' input range is analog and is not
// modelled: samples arrive already as SW-bit level codes. Registered outputs,
// reset to the extreme pair.
module latch_tune
  import coproc_pkg::opcode_e, coproc_pkg::ref_sel_e;
#(
  parameter int unsigned K  = coproc_pkg::K_DEF,
  parameter int unsigned SW = coproc_pkg::SW,
  localparam int unsigned CW = $clog2(K + 1)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 latch,
  input  ref_sel_e             sel,
  input  logic [CW-1:0]        n_used,
  input  logic [SW-1:0]        vref,
  input  logic [K-1:0][SW-1:0] samples_a,
  input  logic [K-1:0][SW-1:0] samples_b,
  output logic [K-1:0][SW-1:0] osc_a,
  output logic [K-1:0][SW-1:0] osc_b,
  output logic                 restart
);

  localparam logic [SW-1:0] LO = '0;
  localparam logic [SW-1:0] HI = '1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int j = 0; j < K; j++) begin
        osc_a[j] <= LO;
        osc_b[j] <= HI;
      end
      restart <= 1'b0;
    end else begin
      restart <= latch;
      if (latch) begin
        for (int j = 0; j < K; j++) begin
          if (j < int'(n_used)) begin
            osc_a[j] <= samples_a[j];
            unique case (sel)
              coproc_pkg::REF_AMAX: osc_b[j] <= HI;
              coproc_pkg::REF_AMIN: osc_b[j] <= LO;
              coproc_pkg::REF_VECB: osc_b[j] <= samples_b[j];
              coproc_pkg::REF_VREF: osc_b[j] <= vref;
            endcase
          end else begin
            osc_a[j] <= LO;
            osc_b[j] <= HI;
          end
        end
      end
    end
  end

endmodule
