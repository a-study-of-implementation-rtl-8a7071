// aa_pkg: widths, types and small helpers shared by the adaptive array DSP.
//
// The receiver side (downconversion, weight calculation, maximal ratio
// combining) follows the word lengths of its specification table: 12-bit ADC
// samples, 12-bit baseband I/Q, 16-bit weights and a 16-bit combined output.
// The EVD side uses 16-bit matrix words (B = 16) and an angle format in which
// the value 2**(ANG_W-1) stands for pi radians.
package aa_pkg;

  localparam int ADC_W = 12;   // ADC sample, offset binary 0..4095
  localparam int IQ_W  = 12;   // baseband I / Q sample, two's complement
  localparam int WGT_W = 16;   // MRC weight word
  localparam int Y_W   = 16;   // MRC output word

  typedef logic signed [IQ_W-1:0]  iq_t;
  typedef logic signed [WGT_W-1:0] wgt_t;
  typedef logic signed [Y_W-1:0]   y_t;

  // One complex baseband sample.
  typedef struct packed {
    iq_t i;
    iq_t q;
  } cplx_iq_t;

  // Weights of the 2-element MRC: W1* is real, W2* is complex.
  typedef struct packed {
    wgt_t w1;
    wgt_t w2_re;
    wgt_t w2_im;
  } mrc_weights_t;

  // Combined output y(n).
  typedef struct packed {
    y_t re;
    y_t im;
  } cplx_y_t;

  // Which matrix of the EVD processor a memory access refers to.
  typedef enum logic {
    MAT_R = 1'b0,   // correlation matrix, converging to the eigenvalues
    MAT_E = 1'b1    // eigenvector matrix, stored transposed (row k = k-th eigenvector)
  } evd_mat_e;

endpackage
