// Shared types and constants of the Tyche p-circuit accelerator.
//
// Number formats:
//   * J, h and the weight-logic result I_i are signed fixed point, D = 24 bits:
//     one sign bit, 11 integer bits and FRAC = 12 fraction bits (Q11.12), as the
//     accelerator's datapath is specified.
//   * tanh(I_i) and the LFSR word are 32-bit signed values read as Q0.31, so the
//     range [-1, +1] maps onto [-(2^31-1), +(2^31-1)]. The Q0.31 reading is a
//     choice of this implementation; only the 32-bit width is given.
//   * A p-bit is one bit: 0 stands for -1 and 1 for +1.
// The controller state encoding (S0..S5) follows the six states of the
// accelerator's state machine; the numeric codes are this design's choice.
package tyche_pkg;

  localparam int unsigned D        = 24;    // J / h / I_i width
  localparam int unsigned FRAC     = 12;    // fraction bits of J / h / I_i
  localparam int unsigned TANH_W   = 32;    // tanh LUT word and LFSR width
  localparam int unsigned LUT_AW   = 10;    // 1024-entry tanh table
  localparam int unsigned LUT_STEP = 4;     // LUT index = |I| bits [LUT_STEP+LUT_AW-1 : LUT_STEP]

  // +4.0 in Q11.12: the clamp limit of I_i
  localparam logic signed [D-1:0] I_LIMIT = D'(4 << FRAC);
  // 1.0 in Q11.12: the default interconnection strength I0
  localparam logic signed [D-1:0] ONE_Q   = D'(1 << FRAC);

  // +1 and -1 in the 32-bit tanh format
  localparam logic signed [TANH_W-1:0] TANH_POS_ONE = 32'sh7FFF_FFFF;
  localparam logic signed [TANH_W-1:0] TANH_NEG_ONE = -32'sh7FFF_FFFF;

  typedef enum logic [2:0] {
    S0_CONFIG  = 3'd0,  // configure and wait for start
    S1_GETSEQ  = 3'd1,  // fetch the i-th p-bit index from the sequence, read J/h row
    S2_WEIGHT  = 3'd2,  // weight logic: adder tree, +h, x I0, clamp -> I_i register
    S3_UPDATE  = 3'd3,  // tanh, threshold, compare with LFSR, write m_Reg
    S4_SAMPLE  = 3'd4,  // sample complete: next update sequence
    S5_DONE    = 3'd5   // all samples completed
  } state_t;

endpackage
