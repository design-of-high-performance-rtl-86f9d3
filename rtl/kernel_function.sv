// kernel_function: RBF kernel K = exp(-||X-Y||^2 / (2 sigma^2)), four
// pipeline stages.
//
// Input is the ACCUM_1 result Y.(Y-2X) of one support vector, the side
// record carrying its precomputed X.X, and gamma = 1/(2 sigma^2).
//   K1: d2 = acc + X.X (the squared distance, clamped at 0), realigned to
//       24 fraction bits; z = d2 * gamma, saturated to Q8.24.
//   K2: t = z * log2(e), so exp(-z) = 2^(-t). t splits into an integer
//       part k, a 5-bit table index j and a remainder f < 1/32;
//       u = f * ln 2, so 2^(-f) = exp(-u).
//   K3: table entry T = 2^(-j/32) (exp_table) and the cubic
//       p = 1 - u(1 - u(1/2 - u/6)) ~ exp(-u), good to about 2^-24 for
//       u < 0.022.
//   K4: K = (T * p) >> k, unsigned Q1.24 (0 once k >= 25).
// All products truncate; the result is within a few units of 2^-24 of
// exp(-z). A value presented in cycle t (in_valid) appears in cycle t+4
// (k_valid) with its side record; the pipeline accepts one value per
// cycle and never stalls.
// The published design calls for a table-driven fixed-point exponential
// taking four clock cycles after the distance has been divided by
// 2 sigma^2; the reciprocal gamma input, the base-2 range reduction, the
// 32-entry table, the cubic and all formats are this implementation's
// choice.
module kernel_function #(
  parameter int unsigned ACC_W   = svm_pkg::ACC_W,
  parameter int unsigned ACC_F   = 2 * svm_pkg::FRAC_W,
  parameter int unsigned GAMMA_W = svm_pkg::GAMMA_W,
  parameter int unsigned GAMMA_F = svm_pkg::GAMMA_F,
  localparam int unsigned Z_W    = svm_pkg::Z_W,
  localparam int unsigned Z_F    = svm_pkg::Z_F,
  localparam int unsigned K_W    = svm_pkg::K_W
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     in_valid,
  input  logic signed [ACC_W-1:0]  in_acc,    // Y.(Y-2X), ACC_F fraction bits
  input  svm_pkg::sv_side_t        in_side,   // carries X.X
  input  logic [GAMMA_W-1:0]       gamma,     // 1/(2 sigma^2)
  output logic                     k_valid,
  output svm_pkg::sv_side_t        k_side,
  output logic [K_W-1:0]           k_value,   // exp(-z), Q1.24
  output logic                     k_sat      // z saturated (K rounds to 0)
);

  localparam int unsigned F      = Z_F;           // working fraction bits
  localparam int unsigned SH_D   = ACC_F - F;     // realign d2 to F bits
  localparam int unsigned D2_W   = ACC_W - SH_D;
  localparam int unsigned ZP_W   = D2_W + GAMMA_W;
  localparam int unsigned T_W    = Z_W + 1;       // t = z*log2e < 2^(Z_W-F+1)
  localparam int unsigned KI_W   = T_W - F;       // integer part of t
  localparam int unsigned J_W    = 5;
  localparam int unsigned U_W    = F - J_W;       // remainder bits
  localparam logic [24:0] LOG2E  = 25'd24204406;  // log2(e) * 2^24
  localparam logic [23:0] LN2    = 24'd11629080;  // ln(2)   * 2^24
  localparam logic [23:0] SIXTH  = 24'd2796203;   // 2^24 / 6
  localparam logic [24:0] ONE    = 25'd1 << F;
  localparam logic [24:0] HALF   = 25'd1 << (F - 1);

  // ---------------- K1: distance and division by 2 sigma^2 ----------------
  logic signed [ACC_W:0]  d2_s;
  logic [D2_W-1:0]        d2;
  logic [ZP_W-1:0]        zp;
  logic [ZP_W-GAMMA_F-1:0] zq;
  logic [Z_W-1:0]         z_d, z_q;
  logic                   sat_d, sat_q;

  always_comb begin
    d2_s  = (ACC_W+1)'(in_acc) + (ACC_W+1)'(signed'({1'b0, in_side.xx}));
    d2    = d2_s[ACC_W] ? '0 : D2_W'(d2_s >>> SH_D);
    zp    = ZP_W'(d2) * ZP_W'(gamma);
    zq    = zp[ZP_W-1:GAMMA_F];
    sat_d = |zq[ZP_W-GAMMA_F-1:Z_W];
    z_d   = sat_d ? '1 : zq[Z_W-1:0];
  end

  // ---------------- K2: range reduction ----------------
  logic [Z_W+25-1:0]  tp;
  logic [T_W-1:0]     t;
  logic [KI_W-1:0]    ki_d, ki_q;
  logic [J_W-1:0]     j_d, j_q;
  logic [U_W+24-1:0]  up;
  logic [U_W-1:0]     u_d, u_q;

  always_comb begin
    tp   = (Z_W+25)'(z_q) * (Z_W+25)'(LOG2E);
    t    = T_W'(tp >> 24);
    ki_d = t[T_W-1:F];
    j_d  = t[F-1:F-J_W];
    up   = (U_W+24)'(t[U_W-1:0]) * (U_W+24)'(LN2);
    u_d  = U_W'(up >> 24);
  end

  // ---------------- K3: table and polynomial ----------------
  logic [24:0]  tbl_d, tbl_q;
  logic [48:0]  m1, m2, m3;
  logic [24:0]  h1, h2, p_d, p_q;
  logic [KI_W-1:0] ki_q3;

  exp_table #(.VAL_W(25)) u_table (.idx(j_q), .value(tbl_d));

  always_comb begin
    m1  = 49'(u_q) * 49'(SIXTH);
    h1  = HALF - 25'(m1 >> 24);
    m2  = 49'(u_q) * 49'(h1);
    h2  = ONE - 25'(m2 >> 24);
    m3  = 49'(u_q) * 49'(h2);
    p_d = ONE - 25'(m3 >> 24);
  end

  // ---------------- K4: combine and scale ----------------
  logic [49:0]    mp;
  logic [24:0]    mant;
  logic [K_W-1:0] k_d;

  always_comb begin
    mp   = 50'(tbl_q) * 50'(p_q);
    mant = 25'(mp >> 24);
    k_d  = (ki_q3 >= KI_W'(K_W)) ? '0 : K_W'(mant >> ki_q3);
  end

  // ---------------- pipeline registers ----------------
  logic [3:0]        v_q;
  svm_pkg::sv_side_t side_q [4];
  logic              sat_q2, sat_q3;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v_q     <= '0;
      side_q  <= '{default: '0};
      z_q     <= '0;
      sat_q   <= 1'b0;
      sat_q2  <= 1'b0;
      sat_q3  <= 1'b0;
      ki_q    <= '0;
      j_q     <= '0;
      u_q     <= '0;
      ki_q3   <= '0;
      tbl_q   <= '0;
      p_q     <= '0;
      k_value <= '0;
      k_sat   <= 1'b0;
    end else begin
      v_q       <= {v_q[2:0], in_valid};
      side_q[0] <= in_side;
      side_q[1] <= side_q[0];
      side_q[2] <= side_q[1];
      side_q[3] <= side_q[2];
      // K1
      z_q    <= z_d;
      sat_q  <= sat_d;
      // K2
      ki_q   <= ki_d;
      j_q    <= j_d;
      u_q    <= u_d;
      sat_q2 <= sat_q;
      // K3
      ki_q3  <= ki_q;
      tbl_q  <= tbl_d;
      p_q    <= p_d;
      sat_q3 <= sat_q2;
      // K4
      k_value <= k_d;
      k_sat   <= sat_q3;
    end
  end

  assign k_valid = v_q[3];
  assign k_side  = side_q[3];

endmodule
