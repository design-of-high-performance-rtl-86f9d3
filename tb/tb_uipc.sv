// tb_uipc: self-checking test of the unified inner product calculator.
//
// Drives random 25-bit signed slices X, Y in both modes with a random
// number of live lanes and random idle cycles, and checks one cycle later
// that the partial sum equals sum(X*Y) (linear) or sum(Y*(Y-2X)) (RBF)
// over the live lanes, computed here with 64-bit integers, and that the
// beat flags and side record follow the data with one cycle of latency.
module tb_uipc;
  localparam int unsigned LANES  = svm_pkg::LANES;
  localparam int unsigned DATA_W = svm_pkg::DATA_W;
  localparam int unsigned SUM_W  = 2 * DATA_W + 2 + $clog2(LANES);
  localparam int unsigned NL_W   = $clog2(LANES + 1);

  logic clk = 1'b0, rst_n = 1'b0;
  svm_pkg::kernel_type_e kernel_type;
  logic in_valid, in_first, in_last;
  logic [NL_W-1:0] n_lanes;
  logic [LANES-1:0][DATA_W-1:0] in_x, in_y;
  svm_pkg::sv_side_t in_side, ps_side;
  logic ps_valid, ps_first, ps_last;
  logic signed [SUM_W-1:0] ps_sum;

  int checks = 0, failures = 0;

  uipc dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint sx(logic [DATA_W-1:0] v);
    return longint'(signed'(v));
  endfunction

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  longint exp_sum;
  logic   exp_first, exp_last;
  svm_pkg::sv_side_t exp_side;
  int n_lin = 0, n_rbf = 0;

  initial begin
    kernel_type = svm_pkg::KT_LINEAR;
    in_valid = 0; in_first = 0; in_last = 0; n_lanes = '0;
    in_x = '0; in_y = '0; in_side = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int it = 0; it < 400; it++) begin
      @(posedge clk); #1;
      in_valid    = ($urandom_range(0, 3) != 0);
      kernel_type = svm_pkg::kernel_type_e'($urandom_range(0, 1));
      in_first    = $urandom_range(0, 1);
      in_last     = $urandom_range(0, 1);
      n_lanes     = (it % 3 == 0) ? NL_W'($urandom_range(0, LANES)) : NL_W'(LANES);
      in_side     = {$urandom, $urandom, $urandom};
      for (int l = 0; l < LANES; l++) begin
        if (it % 5 == 0) begin  // extreme values
          in_x[l] = {1'b1, {(DATA_W-1){1'b0}}};
          in_y[l] = (l % 2) ? {1'b0, {(DATA_W-1){1'b1}}} : {1'b1, {(DATA_W-1){1'b0}}};
        end else begin
          in_x[l] = DATA_W'($urandom);
          in_y[l] = DATA_W'($urandom);
        end
      end
      exp_sum = 0;
      for (int l = 0; l < LANES; l++) begin
        if (l < int'(n_lanes)) begin
          if (kernel_type == svm_pkg::KT_RBF) exp_sum += sx(in_y[l]) * (sx(in_y[l]) - 2 * sx(in_x[l]));
          else                                exp_sum += sx(in_x[l]) * sx(in_y[l]);
        end
      end
      exp_first = in_first; exp_last = in_last; exp_side = in_side;
      if (in_valid) begin
        if (kernel_type == svm_pkg::KT_RBF) n_rbf++; else n_lin++;
      end
      begin
        bit v;
        v = in_valid;
        @(posedge clk); #1;
        check(ps_valid == v, "ps_valid");
        if (v) begin
          check(longint'(ps_sum) == exp_sum, $sformatf("sum %0d exp %0d", ps_sum, exp_sum));
          check(ps_first == exp_first && ps_last == exp_last && ps_side == exp_side, "flags");
        end
        in_valid = 0;
      end
    end
    check(n_lin > 50 && n_rbf > 50, "both modes exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
