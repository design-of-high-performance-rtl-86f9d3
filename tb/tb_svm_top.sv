// tb_svm_top: end-to-end test of the unified SVM classifier at its full
// size (112 lanes, 3,780 dimensions, 213 support vectors per RBF window).
//
// A behavioural source answers the circuit's beat_idx / sv_idx requests
// with slices of randomly generated support vectors, weights and HOG
// features (lanes past dimension 3,780 carry garbage that must be
// ignored), with the precomputed X.X of each support vector. Windows run
// in the order: linear, RBF with 213 support vectors, linear, RBF with
// input stalls, RBF with a gamma large enough that every kernel value
// underflows, and so on. Reference results:
//   linear: d = b + X.Y, exact integer arithmetic, must match bit for bit;
//   RBF   : the squared distances and z = gamma * d2 exactly in integers,
//           exp(-z) and the alpha*y weighting in real arithmetic; d must
//           agree within 8 units of 2^-24 per support vector and term,
//           and the class bit must agree wherever |d| exceeds that bound.
// Without stalls a window must take 36 cycles (linear) or 34*svnum + 6
// (RBF; 7,248 for 213) from its first beat to the result. The test counts
// linear and RBF windows, mode switches, source stalls, masked last
// beats, saturated kernel arguments and both class decisions, and fails
// if any never happened.
module tb_svm_top;
  localparam int unsigned LANES  = svm_pkg::LANES;
  localparam int unsigned DIM    = svm_pkg::DIM;
  localparam int unsigned DATA_W = svm_pkg::DATA_W;
  localparam int unsigned ACC_W  = svm_pkg::ACC_W;
  localparam int unsigned BEATS  = svm_pkg::beats_of(DIM, LANES);
  localparam int unsigned MAXSV  = 213;

  logic clk = 1'b0, rst_n = 1'b0;
  logic start, cfg_kernel_type, busy, in_valid, in_ready, in_y_neg;
  logic [svm_pkg::SVCNT_W-1:0] cfg_svnum, sv_idx;
  logic signed [DATA_W-1:0] cfg_bias;
  logic [svm_pkg::GAMMA_W-1:0] cfg_gamma;
  logic [$clog2(BEATS)-1:0] beat_idx;
  logic [LANES-1:0][DATA_W-1:0] in_x, in_y;
  logic [ACC_W-1:0] in_xx;
  logic [svm_pkg::ALPHA_W-1:0] in_alpha;
  logic d_valid, d_pos;
  logic signed [ACC_W-1:0] d_out;

  int checks = 0, failures = 0;

  svm_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // window data
  int     sv_x [MAXSV][DIM];
  int     feat [DIM];
  longint sv_xx [MAXSV];
  int     sv_alpha [MAXSV];
  bit     sv_neg [MAXSV];

  // coverage counters
  int n_lin = 0, n_rbf = 0, n_switch = 0, n_stall = 0, n_masked = 0;
  int n_sat = 0, n_pos = 0, n_neg = 0;
  bit last_mode_valid = 0, last_mode;

  always @(posedge clk) begin
    if (dut.u_kernel.k_valid && dut.u_kernel.k_sat) n_sat++;
    if (dut.beat_valid && dut.n_lanes != LANES) n_masked++;
  end

  // Fill the window data. near: fraction (0..100) of support vectors
  // placed close to the features.
  task automatic make_data(int nsv, int near_pct, int max_alpha);
    for (int d = 0; d < DIM; d++) feat[d] = $urandom_range(0, (1 << 18) - 1);
    for (int s = 0; s < nsv; s++) begin
      bit near;
      near = ($urandom_range(0, 99) < near_pct);
      sv_xx[s] = 0;
      for (int d = 0; d < DIM; d++) begin
        if (near) sv_x[s][d] = feat[d] + $urandom_range(0, 1 << 12) - (1 << 11);
        else      sv_x[s][d] = $urandom_range(0, (1 << 18) - 1);
        sv_xx[s] += longint'(sv_x[s][d]) * longint'(sv_x[s][d]);
      end
      sv_alpha[s] = $urandom_range(1, max_alpha);
      sv_neg[s]   = $urandom_range(0, 1);
    end
  endtask

  // Signed random weight vector for the linear mode, |w| < 2.
  task automatic make_weights();
    for (int d = 0; d < DIM; d++) begin
      feat[d]     = $urandom_range(0, (1 << 18) - 1);
      sv_x[0][d]  = int'($urandom_range(0, (1 << 22) - 1)) - (1 << 21);
    end
    sv_xx[0] = 0; sv_alpha[0] = 0; sv_neg[0] = 0;
  endtask

  // Drive the source for the current request.
  task automatic drive_source(int stall_pct);
    int s, b;
    s = int'(sv_idx); b = int'(beat_idx);
    in_valid = ($urandom_range(0, 99) >= stall_pct);
    if (in_ready && !in_valid) n_stall++;
    for (int l = 0; l < LANES; l++) begin
      int d;
      d = b * LANES + l;
      if (d < DIM && s < MAXSV) begin
        in_x[l] = DATA_W'(sv_x[s][d]);
        in_y[l] = DATA_W'(feat[d]);
      end else begin
        in_x[l] = DATA_W'($urandom);
        in_y[l] = DATA_W'($urandom);
      end
    end
    in_xx    = (s < MAXSV) ? ACC_W'(sv_xx[s]) : '0;
    in_alpha = (s < MAXSV) ? svm_pkg::ALPHA_W'(sv_alpha[s]) : '0;
    in_y_neg = (s < MAXSV) ? sv_neg[s] : 1'b0;
  endtask

  task automatic run_window(bit rbf, int nsv, int gamma, int b, int stall_pct);
    int  cyc, c_first, c_res;
    bit  seen_first;
    real d_ref, tol, got;
    int  nsv_eff;

    if (last_mode_valid && last_mode != rbf) n_switch++;
    last_mode_valid = 1; last_mode = rbf;
    nsv_eff = rbf ? nsv : 1;

    // reference
    if (!rbf) begin
      longint acc;
      acc = longint'(b) <<< 20;
      for (int d = 0; d < DIM; d++) acc += longint'(sv_x[0][d]) * longint'(feat[d]);
      d_ref = real'(acc) / 1099511627776.0;
      tol = 0.0;
    end else begin
      d_ref = real'(b) / 1048576.0;
      tol = 0.0;
      for (int s = 0; s < nsv; s++) begin
        longint d2, d2q;
        logic [127:0] zw;
        real z, k;
        d2 = 0;
        for (int d = 0; d < DIM; d++)
          d2 += longint'(sv_x[s][d] - feat[d]) * longint'(sv_x[s][d] - feat[d]);
        d2q = d2 >>> 16;
        zw = (128'(d2q) * 128'(gamma)) >> 20;
        z = (zw >= (128'd1 << 32)) ? 256.0 : real'(zw[63:0]) / 16777216.0;
        k = $exp(-z);
        d_ref += (sv_neg[s] ? -1.0 : 1.0) * real'(sv_alpha[s]) / 1048576.0 * k;
        tol += real'(sv_alpha[s]) / 1048576.0 * 8.0 / 16777216.0 + 1.0 / 1099511627776.0;
      end
    end

    // configure and start
    @(posedge clk); #1;
    check(!busy, "idle before start");
    cfg_kernel_type = rbf; cfg_svnum = svm_pkg::SVCNT_W'(nsv);
    cfg_gamma = svm_pkg::GAMMA_W'(gamma); cfg_bias = DATA_W'(b);
    start = 1;
    @(posedge clk); #1;
    start = 0;
    cyc = 0; seen_first = 0; c_first = 0; c_res = -1;
    while (cyc < 20000) begin
      drive_source(stall_pct);
      if (in_valid && in_ready && !seen_first) begin
        seen_first = 1; c_first = cyc;
      end
      @(posedge clk); #1;
      cyc++;
      if (d_valid) begin
        c_res = cyc;
        break;
      end
    end
    in_valid = 0;
    check(c_res >= 0, "result produced");
    got = real'(d_out) / 1099511627776.0;
    if (!rbf) check(d_ref == got, $sformatf("linear d %f exp %f", got, d_ref));
    else      check(got - d_ref <= tol && d_ref - got <= tol,
                    $sformatf("rbf d %f exp %f tol %e", got, d_ref, tol));
    if (d_ref > tol || d_ref < -tol) check(d_pos == (d_ref > 0), "class");
    if (d_pos) n_pos++; else n_neg++;
    if (stall_pct == 0) begin
      int exp_cyc;
      exp_cyc = rbf ? BEATS * nsv_eff + 6 : BEATS + 2;
      check(c_res - c_first == exp_cyc,
            $sformatf("cycles %0d exp %0d", c_res - c_first, exp_cyc));
    end
    $display("%s svnum=%0d gamma=%0d d=%f ref=%f cycles=%0d", rbf ? "rbf   " : "linear",
             nsv_eff, gamma, got, d_ref, c_res - c_first);
    if (rbf) n_rbf++; else n_lin++;
  endtask

  initial begin
    start = 0; cfg_kernel_type = 0; cfg_svnum = '0; cfg_bias = '0; cfg_gamma = '0;
    in_valid = 0; in_x = '0; in_y = '0; in_xx = '0; in_alpha = '0; in_y_neg = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;

    make_weights();
    run_window(0, 0, 0, 12345, 0);
    make_data(213, 30, 1 << 21);
    run_window(1, 213, 1 << 15, -200000, 0);     // gamma = 1/32
    make_weights();
    run_window(0, 5, 0, -777777, 30);
    make_data(20, 50, 1 << 22);
    run_window(1, 20, 1 << 16, 300000, 40);     // stalls
    make_data(7, 0, 1 << 22);
    run_window(1, 7, (1 << 25) - 1, -5000, 0);  // every kernel value underflows
    make_data(16, 100, 1 << 22);
    run_window(1, 16, 1 << 18, 1000, 0);        // near vectors, K close to 1
    make_weights();
    run_window(0, 0, 0, 0, 0);
    make_data(213, 40, 1 << 21);
    run_window(1, 213, 1 << 14, 100000, 0);

    check(n_lin >= 1 && n_rbf >= 1, "both modes");
    check(n_switch >= 2, "mode switches");
    check(n_stall >= 1, "source stalls");
    check(n_masked >= 1, "masked last beats");
    check(n_sat >= 1, "kernel saturation");
    check(n_pos >= 1 && n_neg >= 1, "both classes");
    $display("linear=%0d rbf=%0d switches=%0d stalls=%0d masked_beats=%0d saturated=%0d pos=%0d neg=%0d",
             n_lin, n_rbf, n_switch, n_stall, n_masked, n_sat, n_pos, n_neg);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
