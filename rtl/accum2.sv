// accum2: alpha*y weighting, the ACCUM_2 register and the bias addition.
//
// RBF mode: every kernel value K of a support vector is multiplied by its
// Lagrange multiplier alpha and by its label y (y = -1 negates the product)
// and added into ACCUM_2, giving d(x) = sum(alpha*y*K) + b over svnum
// support vectors. Linear mode: the single ACCUM_1 result X.Y (X is the
// weight vector) is the addend, giving d(x) = X.Y + b.
// The bias is folded in without a cycle of its own: the addend of the
// first support vector of a window is added to b instead of to the
// register. After the addend of the last support vector, d_valid is high
// for one cycle with d(x) on d_out and the class decision on d_pos
// (d(x) >= 0).
//
// Timing: an addend presented in cycle t is in d_out in cycle t+1. The
// published design gives the multiplication by alpha and y, ACCUM_2 and
// the bias addition; the single shared adder, the bias preload and the
// formats are this implementation's choice.
module accum2 #(
  parameter int unsigned ACC_W   = svm_pkg::ACC_W,
  parameter int unsigned ACC_F   = 2 * svm_pkg::FRAC_W,
  parameter int unsigned DATA_W  = svm_pkg::DATA_W,
  parameter int unsigned FRAC_W  = svm_pkg::FRAC_W,
  parameter int unsigned ALPHA_W = svm_pkg::ALPHA_W,
  parameter int unsigned ALPHA_F = svm_pkg::ALPHA_F,
  parameter int unsigned K_W     = svm_pkg::K_W,
  parameter int unsigned K_F     = svm_pkg::K_F
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  svm_pkg::kernel_type_e    kernel_type,
  input  logic signed [DATA_W-1:0] bias,       // b, FRAC_W fraction bits
  // linear path: finished ACCUM_1 value
  input  logic                     acc_valid,
  input  svm_pkg::sv_side_t        acc_side,
  input  logic signed [ACC_W-1:0]  acc,
  // RBF path: kernel value
  input  logic                     k_valid,
  input  svm_pkg::sv_side_t        k_side,
  input  logic [K_W-1:0]           k_value,
  // result
  output logic                     d_valid,
  output logic signed [ACC_W-1:0]  d_out,      // d(x), ACC_F fraction bits
  output logic                     d_pos
);

  localparam int unsigned TP_W = K_W + ALPHA_W;
  localparam int unsigned SH_T = K_F + ALPHA_F - ACC_F;   // to ACC_F bits
  localparam int unsigned SH_B = ACC_F - FRAC_W;

  logic                     lin;
  logic                     add_valid;
  svm_pkg::sv_side_t        side;
  logic [TP_W-1:0]          tprod;
  logic signed [ACC_W-1:0]  term, addend, base, b_ext, sum;

  always_comb begin
    lin       = (kernel_type == svm_pkg::KT_LINEAR);
    add_valid = lin ? acc_valid : k_valid;
    side      = lin ? acc_side  : k_side;
    tprod     = TP_W'(k_value) * TP_W'(side.alpha);
    term      = ACC_W'(tprod >> SH_T);
    if (side.y_neg) term = -term;
    addend    = lin ? acc : term;
    b_ext     = ACC_W'(bias) <<< SH_B;
    base      = side.first_sv ? b_ext : d_out;
    sum       = base + addend;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      d_out   <= '0;
      d_valid <= 1'b0;
    end else begin
      d_valid <= add_valid && side.last_sv;
      if (add_valid) d_out <= sum;
    end
  end

  assign d_pos = ~d_out[ACC_W-1];

endmodule
