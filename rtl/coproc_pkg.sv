// coproc_pkg: constants and types shared by the oscillator co-processor.
//
// The co-processor has K two-input coupled oscillators (32 by default, the
// size the design targets) whose analog inputs are represented here by SW-bit
// level codes: 32 distinct input levels, code 0 standing for the lowest level
// a_MIN and code 2**SW-1 for the highest level a_MAX. The read-out timer is
// TW = 16 bits wide. The four instructions (N-th distinct minimum, N-th
// distinct maximum, degree of match, sort) are what the co-processor is built
// for; their binary encoding below is this design's own choice.
package coproc_pkg;

  localparam int unsigned K_DEF = 32;   // oscillators in the array
  localparam int unsigned SW    = 5;    // sample level code width (32 levels)
  localparam int unsigned TW    = 16;   // timer / sorted-array data width


  // Instruction set.
  typedef enum logic [1:0] {
    OP_NTH_MAX = 2'd0,   // index and time of the N-th distinct maximum
    OP_NTH_MIN = 2'd1,   // index and time of the N-th distinct minimum
    OP_DOM     = 2'd2,   // degree of match of two vectors within a time limit
    OP_SORT    = 2'd3    // times of the N largest / smallest samples, in order
  } opcode_e;

  // Selection of the second input of every oscillator (latching circuitry).
  typedef enum logic [1:0] {
    REF_AMAX = 2'd0,     // <A_i, a_MAX>: maximum search
    REF_AMIN = 2'd1,     // <A_i, a_MIN>: minimum search
    REF_VECB = 2'd2,     // <A_i, B_i>  : degree of match
    REF_VREF = 2'd3      // <A_i, V_ref>: swept reference
  } ref_sel_e;

endpackage
