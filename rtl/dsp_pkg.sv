// dsp_pkg: widths, coefficient names and controller states shared by the
// signal-processor modules.
//
// The processor works on N = 16-bit two's-complement samples and forms
// 2N = 32-bit products and sums, the sizes of the 16-bit multiplier and the
// 32-bit adder/subtractor of the filter datapath. Samples are Q1.15
// fractions. Coefficients are 16-bit two's complement with FRAC_DEF = 14
// fraction bits (Q2.14), so that the feedback coefficients of a stable
// second-order section (|a1| < 2) can be held; that fraction width is this
// design's choice.
package dsp_pkg;

  localparam int unsigned N_DEF    = 16;  // sample and coefficient width
  localparam int unsigned ACC_DEF  = 32;  // product / adder width (2*N)
  localparam int unsigned FRAC_DEF = 14;  // coefficient fraction bits

  // Coefficient index used on the coefficient write port.
  typedef enum logic [2:0] {
    C_B0 = 3'd0,
    C_B1 = 3'd1,
    C_B2 = 3'd2,
    C_A1 = 3'd3,
    C_A2 = 3'd4
  } coef_e;

  // Operand selector for the delay line w(n), w(n-1), w(n-2).
  typedef enum logic [1:0] {
    W_N0 = 2'd0,   // w(n)
    W_N1 = 2'd1,   // w(n-1)
    W_N2 = 2'd2    // w(n-2)
  } wsel_e;

  // Filter controller states.
  typedef enum logic [1:0] {
    S_IDLE  = 2'd0,  // waiting for a sample
    S_START = 2'd1,  // launch one multiply-accumulate step
    S_WAIT  = 2'd2   // wait for the multiplier to finish
  } ctrl_state_e;

endpackage
