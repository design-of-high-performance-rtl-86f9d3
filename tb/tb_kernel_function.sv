// tb_kernel_function: self-checking test of the RBF kernel pipeline.
//
// Feeds random inner products, X.X values and gammas (one per cycle, with
// random gaps) covering exponents z from 0 to well past saturation, plus
// negative squared distances that must clamp to K = 1. For every value the
// exact fixed-point argument z is formed here with integer arithmetic and
// exp(-z) with real arithmetic; the kernel output must be within 8 units
// of 2^-24 of it, must appear exactly 4 cycles after the input and must
// carry the input's side record. The saturation flag is checked too.
module tb_kernel_function;
  localparam int unsigned ACC_W = svm_pkg::ACC_W;
  localparam int unsigned LAT   = 4;
  localparam int unsigned N     = 3000;

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid;
  logic signed [ACC_W-1:0] in_acc;
  svm_pkg::sv_side_t in_side, k_side;
  logic [svm_pkg::GAMMA_W-1:0] gamma;
  logic k_valid, k_sat;
  logic [svm_pkg::K_W-1:0] k_value;

  int checks = 0, failures = 0;

  kernel_function dut (.*);

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

  // expected outputs, indexed by the cycle they must appear in
  bit                exp_v    [0:N+LAT+8];
  real               exp_k    [0:N+LAT+8];
  bit                exp_sat  [0:N+LAT+8];
  svm_pkg::sv_side_t exp_side [0:N+LAT+8];
  int n_sat = 0, n_clamp = 0, n_mid = 0;
  real max_err = 0.0;

  initial begin
    in_valid = 0; in_acc = '0; in_side = '0; gamma = '0;
    for (int i = 0; i <= N + LAT + 8; i++) exp_v[i] = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int cyc = 0; cyc < N + LAT + 4; cyc++) begin
      // check this cycle's output (state after the previous edge)
      if (cyc >= 1) begin
        check(k_valid == exp_v[cyc], $sformatf("k_valid cycle %0d", cyc));
        if (exp_v[cyc]) begin
          real got, err;
          got = real'(k_value) / 16777216.0;
          err = got - exp_k[cyc];
          if (err < 0) err = -err;
          if (err > max_err) max_err = err;
          check(err <= 8.0 / 16777216.0, $sformatf("K %f exp %f", got, exp_k[cyc]));
          check(k_side == exp_side[cyc] && k_sat == exp_sat[cyc], "side/sat");
        end
      end
      if (cyc < N) begin
        longint d2, xx, d2q, zq;
        longint g;
        int kind;
        in_valid = ($urandom_range(0, 4) != 0);
        kind = $urandom_range(0, 9);
        g  = longint'($urandom_range(1, (1 << 25) - 1));
        xx = longint'({$urandom, $urandom} >> 14);   // up to 2^50
        if (kind == 0) begin
          d2 = -longint'($urandom_range(1, 1 << 30));  // negative distance
        end else if (kind == 1) begin
          d2 = longint'({$urandom, $urandom} >> 2);     // huge: saturates
        end else begin
          // z target in [0, 40): d2 = z / gamma
          real zt;
          zt = 40.0 * real'($urandom) / 4294967296.0;
          d2 = longint'(zt / (real'(g) / 1048576.0) * 1099511627776.0);
        end
        in_acc = ACC_W'(d2 - xx);
        in_side = {$urandom, $urandom, $urandom};
        in_side.xx = ACC_W'(xx);
        gamma = svm_pkg::GAMMA_W'(g);
        if (in_valid) begin
          bit sat;
          logic [127:0] zw;
          real z;
          d2q = (d2 < 0) ? 0 : (d2 >>> 16);
          zw  = (128'(d2q) * 128'(g)) >> 20;
          sat = (zw >= (128'd1 << 32));
          zq  = longint'(zw[63:0]);
          z = sat ? 4294967295.0 / 16777216.0 : real'(zq) / 16777216.0;
          exp_v[cyc + LAT]    = 1;
          exp_k[cyc + LAT]    = $exp(-z);
          exp_sat[cyc + LAT]  = sat;
          exp_side[cyc + LAT] = in_side;
          if (sat) n_sat++; else if (d2 < 0) n_clamp++; else n_mid++;
        end
      end else begin
        in_valid = 0;
      end
      @(posedge clk); #1;
    end
    check(n_sat > 10 && n_clamp > 10 && n_mid > 100, "coverage");
    $display("values=%0d saturated=%0d clamped=%0d max_err=%e", n_sat + n_clamp + n_mid,
             n_sat, n_clamp, max_err);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
