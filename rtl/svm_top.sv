// svm_top: unified linear / non-linear (RBF) SVM classifier.
//
// Computes, for one sliding window, either
//   linear : d(x) = X.Y + b                       (kernel_type = 0)
//   RBF    : d(x) = sum_sv alpha*y*exp(-gamma*||X-Y||^2) + b
//                                                 (kernel_type = 1)
// where Y is the window's HOG feature vector and X the weight vector
// (linear) or each support vector in turn (RBF). Both modes share one
// datapath:
//   svm_ctrl        -> counts beats and support vectors
//   uipc            -> 112 lanes of Y*(Y-2X) or X*Y plus an adder tree
//   accum1          -> ACCUM_1, sums the 34 beats of one vector pair
//   kernel_function -> RBF mode only: adds X.X, scales by gamma,
//                      table-driven exp, 4 cycles
//   accum2          -> alpha*y weighting, ACCUM_2 and the bias
//
// Use: with busy low, pulse start with the configuration. While in_ready
// is high, present on in_x / in_y the 112-dimension slice beat_idx of
// support vector sv_idx and of the features (lanes beyond dimension 3,780
// are ignored), with in_xx = X.X, in_alpha and in_y_neg of that support
// vector (they are sampled on the vector's last beat), and raise in_valid;
// a beat is taken on every cycle with in_valid and in_ready high. d_valid
// marks the result on d_out (signed, 40 fraction bits) and d_pos
// (d(x) >= 0). Without stalls a window takes 36 cycles in linear mode and
// 34*svnum + 6 cycles in RBF mode (7,248 for 213 support vectors), counted
// from the first beat to the cycle before d_valid rises.
// The block structure, lane count, vector size, mode sharing and cycle
// counts follow the published design; ports, handshake and number formats
// are this implementation's choice (see svm_pkg).
module svm_top #(
  parameter int unsigned LANES   = svm_pkg::LANES,
  parameter int unsigned DIM     = svm_pkg::DIM,
  localparam int unsigned DATA_W  = svm_pkg::DATA_W,
  localparam int unsigned ACC_W   = svm_pkg::ACC_W,
  localparam int unsigned SVCNT_W = svm_pkg::SVCNT_W,
  localparam int unsigned GAMMA_W = svm_pkg::GAMMA_W,
  localparam int unsigned ALPHA_W = svm_pkg::ALPHA_W,
  localparam int unsigned BEATS   = svm_pkg::beats_of(DIM, LANES),
  localparam int unsigned BEAT_W  = (BEATS > 1) ? $clog2(BEATS) : 1,
  localparam int unsigned NL_W    = $clog2(LANES + 1),
  localparam int unsigned SUM_W   = 2 * DATA_W + 2 + $clog2(LANES)
) (
  input  logic                          clk,
  input  logic                          rst_n,
  // configuration, taken on start
  input  logic                          start,
  input  logic                          cfg_kernel_type,  // 0 linear, 1 RBF
  input  logic [SVCNT_W-1:0]            cfg_svnum,
  input  logic signed [DATA_W-1:0]      cfg_bias,         // Q4.20
  input  logic [GAMMA_W-1:0]            cfg_gamma,        // 1/(2 sigma^2), Q5.20
  output logic                          busy,
  // input stream
  input  logic                          in_valid,
  output logic                          in_ready,
  output logic [BEAT_W-1:0]             beat_idx,
  output logic [SVCNT_W-1:0]            sv_idx,
  input  logic [LANES-1:0][DATA_W-1:0]  in_x,       // support vector / weights, Q4.20
  input  logic [LANES-1:0][DATA_W-1:0]  in_y,       // HOG features, Q4.20
  input  logic [ACC_W-1:0]              in_xx,      // X.X, 40 fraction bits
  input  logic [ALPHA_W-1:0]            in_alpha,   // Q5.20
  input  logic                          in_y_neg,   // label y = -1
  // result
  output logic                          d_valid,
  output logic signed [ACC_W-1:0]       d_out,
  output logic                          d_pos
);

  svm_pkg::kernel_type_e    kernel_type;
  logic signed [DATA_W-1:0] bias;
  logic [GAMMA_W-1:0]       gamma;
  logic                     beat_valid, beat_first, beat_last, first_sv, last_sv;
  logic [NL_W-1:0]          n_lanes;
  svm_pkg::sv_side_t        in_side;

  svm_ctrl #(.LANES(LANES), .DIM(DIM)) u_ctrl (
    .clk, .rst_n,
    .start,
    .cfg_kernel_type (svm_pkg::kernel_type_e'(cfg_kernel_type)),
    .cfg_svnum, .cfg_bias, .cfg_gamma,
    .busy, .kernel_type, .bias, .gamma,
    .in_valid, .in_ready, .beat_idx, .sv_idx,
    .beat_valid, .beat_first, .beat_last, .n_lanes, .first_sv, .last_sv,
    .d_valid
  );

  always_comb begin
    in_side.xx       = in_xx;
    in_side.alpha    = in_alpha;
    in_side.y_neg    = in_y_neg;
    in_side.first_sv = first_sv;
    in_side.last_sv  = last_sv;
  end

  // ---- unified inner product calculator ----
  logic                    ps_valid, ps_first, ps_last;
  svm_pkg::sv_side_t       ps_side;
  logic signed [SUM_W-1:0] ps_sum;

  uipc #(.LANES(LANES), .DATA_W(DATA_W)) u_uipc (
    .clk, .rst_n, .kernel_type,
    .in_valid (beat_valid), .in_first (beat_first), .in_last (beat_last),
    .n_lanes, .in_x, .in_y, .in_side,
    .ps_valid, .ps_first, .ps_last, .ps_side, .ps_sum
  );

  // ---- ACCUM_1 ----
  logic                    acc_valid;
  svm_pkg::sv_side_t       acc_side;
  logic signed [ACC_W-1:0] acc;

  accum1 #(.IN_W(SUM_W), .ACC_W(ACC_W)) u_accum1 (
    .clk, .rst_n,
    .ps_valid, .ps_first, .ps_last, .ps_side, .ps_sum,
    .acc_valid, .acc_side, .acc
  );

  // ---- kernel function (RBF mode only) ----
  logic                      k_valid, k_sat;
  svm_pkg::sv_side_t         k_side;
  logic [svm_pkg::K_W-1:0]   k_value;

  kernel_function u_kernel (
    .clk, .rst_n,
    .in_valid (acc_valid && kernel_type == svm_pkg::KT_RBF),
    .in_acc   (acc),
    .in_side  (acc_side),
    .gamma,
    .k_valid, .k_side, .k_value, .k_sat
  );

  // ---- alpha*y, ACCUM_2 and bias ----
  accum2 u_accum2 (
    .clk, .rst_n, .kernel_type, .bias,
    .acc_valid, .acc_side, .acc,
    .k_valid, .k_side, .k_value,
    .d_valid, .d_out, .d_pos
  );

endmodule
