// tb_accum2: self-checking test of the alpha*y weighting, ACCUM_2 and the
// bias addition.
//
// Runs windows of 1 to 12 addends in linear mode (ACCUM_1 values) and RBF
// mode (kernel values with random alpha and label), with random gaps, and
// with the unused path of each mode driven with random traffic that must
// be ignored. After each addend d_out must equal the integer reference
// b*2^20 + sum(addends), with alpha*K truncated to 40 fraction bits and
// negated for y = -1; d_valid must pulse exactly after the window's last
// addend and d_pos must give the sign.
module tb_accum2;
  localparam int unsigned ACC_W = svm_pkg::ACC_W;

  logic clk = 1'b0, rst_n = 1'b0;
  svm_pkg::kernel_type_e kernel_type;
  logic signed [svm_pkg::DATA_W-1:0] bias;
  logic acc_valid, k_valid, d_valid, d_pos;
  svm_pkg::sv_side_t acc_side, k_side;
  logic signed [ACC_W-1:0] acc, d_out;
  logic [svm_pkg::K_W-1:0] k_value;

  int checks = 0, failures = 0;

  accum2 dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
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

  longint ref_d;
  int n_pos = 0, n_neg = 0, n_lin = 0, n_rbf = 0;

  initial begin
    kernel_type = svm_pkg::KT_LINEAR;
    bias = '0; acc_valid = 0; k_valid = 0; acc_side = '0; k_side = '0;
    acc = '0; k_value = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int w = 0; w < 300; w++) begin
      int n;
      bit lin;
      lin = (w % 2 == 0);
      kernel_type = lin ? svm_pkg::KT_LINEAR : svm_pkg::KT_RBF;
      bias = svm_pkg::DATA_W'($urandom);
      n = lin ? 1 : $urandom_range(1, 12);
      if (lin) n_lin++; else n_rbf++;
      ref_d = longint'(bias) <<< 20;
      for (int i = 0; i < n; i++) begin
        while ($urandom_range(0, 2) == 0) begin
          acc_valid = 0; k_valid = 0;
          @(posedge clk); #1;
          check(d_valid == 0, "d_valid idle");
        end
        acc_side = {$urandom, $urandom, $urandom};
        k_side   = {$urandom, $urandom, $urandom};
        acc      = ACC_W'(signed'({$urandom, $urandom}) >>> 4);
        k_value  = svm_pkg::K_W'($urandom_range(0, 1 << 24));
        if (lin) begin
          acc_valid = 1; k_valid = $urandom_range(0, 1);
          acc_side.first_sv = (i == 0); acc_side.last_sv = (i == n - 1);
          ref_d = ((i == 0) ? (longint'(bias) <<< 20) : ref_d) + longint'(acc);
        end else begin
          longint t;
          k_valid = 1; acc_valid = $urandom_range(0, 1);
          k_side.first_sv = (i == 0); k_side.last_sv = (i == n - 1);
          t = (longint'(k_value) * longint'(k_side.alpha)) >>> 4;
          if (k_side.y_neg) t = -t;
          ref_d = ((i == 0) ? (longint'(bias) <<< 20) : ref_d) + t;
        end
        @(posedge clk); #1;
        acc_valid = 0; k_valid = 0;
        check(longint'(d_out) == ref_d, $sformatf("d_out %0d exp %0d", d_out, ref_d));
        check(d_valid == (i == n - 1), "d_valid");
        check(d_pos == (ref_d >= 0), "d_pos");
        if (i == n - 1) begin
          if (ref_d >= 0) n_pos++; else n_neg++;
        end
      end
    end
    check(n_pos > 20 && n_neg > 20, "both classes");
    $display("linear=%0d rbf=%0d pos=%0d neg=%0d", n_lin, n_rbf, n_pos, n_neg);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
