// tb_svm_ctrl: self-checking test of the window sequencer.
//
// Starts linear windows and RBF windows of 0 to 6 support vectors, feeds
// beats with random stalls (in_valid low) and checks for every accepted
// beat its index, its support vector, the first/last beat and vector
// flags and the live lane count (112, or 84 on beat 33). It checks that
// the stream closes after exactly 34 * (number of support vectors) beats,
// that a start pulse during a window is ignored, that the configuration
// is latched, and that busy falls only after d_valid.
module tb_svm_ctrl;
  localparam int unsigned LANES = svm_pkg::LANES;
  localparam int unsigned DIM   = svm_pkg::DIM;
  localparam int unsigned BEATS = svm_pkg::beats_of(DIM, LANES);
  localparam int unsigned NL_W  = $clog2(LANES + 1);

  logic clk = 1'b0, rst_n = 1'b0;
  logic start;
  svm_pkg::kernel_type_e cfg_kernel_type, kernel_type;
  logic [svm_pkg::SVCNT_W-1:0] cfg_svnum, sv_idx;
  logic signed [svm_pkg::DATA_W-1:0] cfg_bias, bias;
  logic [svm_pkg::GAMMA_W-1:0] cfg_gamma, gamma;
  logic busy, in_valid, in_ready;
  logic [5:0] beat_idx;
  logic beat_valid, beat_first, beat_last, first_sv, last_sv, d_valid;
  logic [NL_W-1:0] n_lanes;

  int checks = 0, failures = 0;

  svm_ctrl dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
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

  int n_stall = 0, n_ignored = 0;

  initial begin
    start = 0; cfg_kernel_type = svm_pkg::KT_LINEAR; cfg_svnum = '0;
    cfg_bias = '0; cfg_gamma = '0; in_valid = 0; d_valid = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int w = 0; w < 40; w++) begin
      int nsv, taken;
      logic signed [svm_pkg::DATA_W-1:0] b;
      logic [svm_pkg::GAMMA_W-1:0] g;
      bit rbf;
      rbf = (w % 3 != 0);
      cfg_kernel_type = rbf ? svm_pkg::KT_RBF : svm_pkg::KT_LINEAR;
      cfg_svnum = svm_pkg::SVCNT_W'($urandom_range(0, 6));
      nsv = (!rbf || cfg_svnum == 0) ? 1 : int'(cfg_svnum);
      b = svm_pkg::DATA_W'($urandom); g = svm_pkg::GAMMA_W'($urandom);
      cfg_bias = b; cfg_gamma = g;
      check(!busy && !in_ready, "idle before start");
      start = 1;
      @(posedge clk); #1;
      start = 0;
      cfg_bias = '0; cfg_gamma = '0; cfg_svnum = 7;
      check(busy && kernel_type == cfg_kernel_type && bias == b && gamma == g, "config latched");
      taken = 0;
      while (taken < nsv * BEATS) begin
        int sv, bt;
        sv = taken / BEATS; bt = taken % BEATS;
        in_valid = ($urandom_range(0, 4) != 0);
        if (!in_valid) n_stall++;
        if (taken == 5) begin
          start = 1;  // must be ignored
          n_ignored++;
        end
        #1;
        check(in_ready, "ready while running");
        check(beat_valid == in_valid, "beat_valid");
        if (in_valid) begin
          check(int'(beat_idx) == bt && int'(sv_idx) == sv, $sformatf("index %0d/%0d", sv, bt));
          check(beat_first == (bt == 0) && beat_last == (bt == BEATS - 1), "beat flags");
          check(first_sv == (sv == 0) && last_sv == (sv == nsv - 1), "sv flags");
          check(int'(n_lanes) == ((bt == BEATS - 1) ? DIM - (BEATS - 1) * LANES : LANES),
                "lane count");
          taken++;
        end
        @(posedge clk); #1;
        start = 0;
        in_valid = 0;
      end
      // stream closed, pipeline drains
      for (int i = 0; i < $urandom_range(1, 8); i++) begin
        check(busy && !in_ready && !beat_valid, "drain");
        @(posedge clk); #1;
      end
      d_valid = 1;
      @(posedge clk); #1;
      d_valid = 0;
      check(!busy, "idle after result");
      repeat ($urandom_range(0, 3)) @(posedge clk);
      #1;
    end
    check(n_stall > 50 && n_ignored > 10, "stalls and ignored starts");
    $display("stalls=%0d ignored_starts=%0d", n_stall, n_ignored);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
