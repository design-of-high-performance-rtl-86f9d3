// svm_pkg: sizes, fixed-point formats and shared types of the unified
// linear / RBF SVM classifier.
//
// The classifier works on 3,780-dimension vectors (HOG features of one
// sliding window and one support vector), 112 dimensions per clock, so one
// vector pair takes 34 cycles; the last beat carries 84 dimensions and the
// remaining 28 lanes are forced to zero. Data are 25-bit signed fixed point.
// Lane count, dimension, data width and the 34-cycle beat count follow the
// published design; the position of the binary point and the widths of the
// internal formats are this implementation's choice:
//   data X, Y        : signed   Q4.20  (DATA_W=25, FRAC_W=20)
//   inner products   : signed   ACC_W=64 bits, 40 fraction bits
//   gamma=1/(2s^2)   : unsigned Q5.20
//   kernel argument z: unsigned Q8.24 (saturates at 256, exp(-256) ~ 0)
//   kernel value K   : unsigned Q1.24
//   alpha            : unsigned Q5.20, y is a sign bit (1 means y = -1)
//   bias b           : signed   Q4.20
//   d(x)             : signed   ACC_W bits, 40 fraction bits
package svm_pkg;

  localparam int unsigned LANES   = 112;   // dimensions per clock
  localparam int unsigned DIM     = 3780;  // HOG feature / support vector dimension
  localparam int unsigned DATA_W  = 25;    // fixed-point data width
  localparam int unsigned FRAC_W  = 20;    // fraction bits of the data
  localparam int unsigned ACC_W   = 64;    // inner product / d(x) width
  localparam int unsigned SVCNT_W = 16;    // width of svnum

  localparam int unsigned GAMMA_W = 25;    // 1/(2 sigma^2), unsigned Q5.20
  localparam int unsigned GAMMA_F = 20;
  localparam int unsigned ALPHA_W = 25;    // Lagrange multiplier, unsigned Q5.20
  localparam int unsigned ALPHA_F = 20;
  localparam int unsigned Z_W     = 32;    // kernel argument, unsigned Q8.24
  localparam int unsigned Z_F     = 24;
  localparam int unsigned K_W     = 25;    // kernel value, unsigned Q1.24
  localparam int unsigned K_F     = 24;

  // Mode select, as the kernel_type input of the published circuit.
  typedef enum logic {
    KT_LINEAR = 1'b0,
    KT_RBF    = 1'b1
  } kernel_type_e;

  // Per-support-vector values that travel with a finished inner product
  // down the kernel / ACCUM_2 pipeline.
  typedef struct packed {
    logic [ACC_W-1:0]   xx;       // precomputed X.X, 40 fraction bits
    logic [ALPHA_W-1:0] alpha;    // Lagrange multiplier
    logic               y_neg;    // 1: class label y = -1
    logic               first_sv; // first support vector of the window
    logic               last_sv;  // last support vector of the window
  } sv_side_t;

  // Number of beats needed for a vector of dim dimensions at lanes per beat.
  function automatic int unsigned beats_of(int unsigned dim, int unsigned lanes);
    return (dim + lanes - 1) / lanes;
  endfunction

endpackage
