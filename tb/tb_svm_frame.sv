// tb_svm_frame: one full 640x480 frame in RBF mode.
//
// A frame is 609 sliding windows (64x64 windows at stride 20: 29 x 21
// positions), each classified against the same 213 support vectors of
// 3,780 dimensions. The support vectors, alphas and labels are generated
// once; every window gets fresh random HOG features, and one window in
// eight gets features close to one support vector so that both classes
// occur. Windows are started back to back as soon as the circuit is idle,
// with a source that never stalls. Each result is checked against a
// reference (exact integer squared distances and kernel arguments,
// real-valued exp and weighting, tolerance 8 units of 2^-24 per term); each
// window must take 7,248 cycles from first beat to result. The test prints
// the cycles spent on the whole frame, including the two idle cycles
// between windows, and the frame rate this gives at 152 MHz.
module tb_svm_frame;
  localparam int unsigned LANES   = svm_pkg::LANES;
  localparam int unsigned DIM     = svm_pkg::DIM;
  localparam int unsigned DATA_W  = svm_pkg::DATA_W;
  localparam int unsigned ACC_W   = svm_pkg::ACC_W;
  localparam int unsigned BEATS   = svm_pkg::beats_of(DIM, LANES);
  localparam int unsigned NSV     = 213;
  localparam int unsigned WINDOWS = 609;
  localparam int          GAMMA   = 1 << 20;   // 1.0 in Q5.20

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
    repeat (WINDOWS * (BEATS * NSV + 20) + 1000) @(posedge clk);
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

  int     sv_x [NSV][DIM];
  longint sv_xx [NSV];
  int     sv_alpha [NSV];
  bit     sv_neg [NSV];
  int     feat [DIM];

  // source: answers the current request combinationally from the arrays
  always_comb begin
    for (int l = 0; l < LANES; l++) begin
      int d;
      d = int'(beat_idx) * LANES + l;
      in_x[l] = (d < DIM && int'(sv_idx) < NSV) ? DATA_W'(sv_x[sv_idx][d]) : '0;
      in_y[l] = (d < DIM) ? DATA_W'(feat[d]) : '0;
    end
    in_xx    = (int'(sv_idx) < NSV) ? ACC_W'(sv_xx[sv_idx]) : '0;
    in_alpha = (int'(sv_idx) < NSV) ? svm_pkg::ALPHA_W'(sv_alpha[sv_idx]) : '0;
    in_y_neg = (int'(sv_idx) < NSV) ? sv_neg[sv_idx] : 1'b0;
  end

  longint frame_cycles = 0;
  int n_pos = 0, n_neg = 0;

  initial begin
    start = 0; cfg_kernel_type = 1; cfg_svnum = svm_pkg::SVCNT_W'(NSV);
    cfg_bias = DATA_W'(-150000); cfg_gamma = svm_pkg::GAMMA_W'(GAMMA); in_valid = 0;
    for (int s = 0; s < NSV; s++) begin
      sv_xx[s] = 0;
      for (int d = 0; d < DIM; d++) begin
        sv_x[s][d] = $urandom_range(0, (1 << 18) - 1);
        sv_xx[s] += longint'(sv_x[s][d]) * longint'(sv_x[s][d]);
      end
      sv_alpha[s] = $urandom_range(1, 1 << 21);
      sv_neg[s]   = $urandom_range(0, 1);
    end
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int w = 0; w < WINDOWS; w++) begin
      real d_ref, tol, got;
      int  cyc, c_first;
      bit  seen;
      if (w % 8 == 0) begin
        int s;
        s = $urandom_range(0, NSV - 1);
        for (int d = 0; d < DIM; d++) feat[d] = sv_x[s][d] + $urandom_range(0, 1 << 10) - (1 << 9);
      end else begin
        for (int d = 0; d < DIM; d++) feat[d] = $urandom_range(0, (1 << 18) - 1);
      end
      d_ref = -150000.0 / 1048576.0;
      tol = 0.0;
      for (int s = 0; s < NSV; s++) begin
        longint d2;
        logic [127:0] zw;
        real z;
        d2 = 0;
        for (int d = 0; d < DIM; d++)
          d2 += longint'(sv_x[s][d] - feat[d]) * longint'(sv_x[s][d] - feat[d]);
        zw = (128'(d2 >>> 16) * 128'(GAMMA)) >> 20;
        z = (zw >= (128'd1 << 32)) ? 256.0 : real'(zw[63:0]) / 16777216.0;
        d_ref += (sv_neg[s] ? -1.0 : 1.0) * real'(sv_alpha[s]) / 1048576.0 * $exp(-z);
        tol += real'(sv_alpha[s]) / 1048576.0 * 8.0 / 16777216.0 + 1.0 / 1099511627776.0;
      end
      // start as soon as the circuit is idle
      while (busy) begin
        @(posedge clk); #1;
        frame_cycles++;
      end
      start = 1;
      @(posedge clk); #1;
      frame_cycles++;
      start = 0;
      in_valid = 1;
      cyc = 0; seen = 0; c_first = 0;
      while (!d_valid) begin
        if (in_ready && !seen) begin
          seen = 1; c_first = cyc;
        end
        @(posedge clk); #1;
        frame_cycles++;
        cyc++;
      end
      in_valid = 0;
      got = real'(d_out) / 1099511627776.0;
      check(got - d_ref <= tol && d_ref - got <= tol,
            $sformatf("window %0d d %f exp %f", w, got, d_ref));
      if (d_ref > tol || d_ref < -tol) check(d_pos == (d_ref > 0), "class");
      check(cyc - c_first == BEATS * NSV + 6, $sformatf("window %0d cycles %0d", w, cyc - c_first));
      if (d_pos) n_pos++; else n_neg++;
    end
    check(n_pos > 0 && n_neg > 0, "both classes");
    $display("frame: %0d windows, %0d cycles, %0d positive, %0d negative, %f frames/s at 152 MHz",
             WINDOWS, frame_cycles, n_pos, n_neg, 152.0e6 / real'(frame_cycles));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
