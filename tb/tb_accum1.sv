// tb_accum1: self-checking test of the ACCUM_1 register.
//
// Streams vector pairs of random length (1 to 40 beats) with random idle
// cycles between beats. Each beat's partial sum is random; the test keeps
// its own 64-bit running sum and checks, one cycle after each last beat,
// that acc_valid pulses exactly then, that acc equals the running sum
// (the first beat reloading it) and that the side record is the one given
// with the last beat. acc_valid must stay low at all other times.
module tb_accum1;
  localparam int unsigned IN_W  = 59;
  localparam int unsigned ACC_W = svm_pkg::ACC_W;

  logic clk = 1'b0, rst_n = 1'b0;
  logic ps_valid, ps_first, ps_last;
  svm_pkg::sv_side_t ps_side, acc_side;
  logic signed [IN_W-1:0] ps_sum;
  logic acc_valid;
  logic signed [ACC_W-1:0] acc;

  int checks = 0, failures = 0;

  accum1 dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
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

  longint ref_sum;
  bit exp_pulse;
  svm_pkg::sv_side_t exp_side;
  int pairs = 0;

  initial begin
    ps_valid = 0; ps_first = 0; ps_last = 0; ps_side = '0; ps_sum = '0;
    ref_sum = 0; exp_pulse = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int p = 0; p < 300; p++) begin
      int len;
      len = $urandom_range(1, 40);
      for (int b = 0; b < len; b++) begin
        // optional idle cycles
        while ($urandom_range(0, 3) == 0) begin
          ps_valid = 0;
          @(posedge clk); #1;
          check(acc_valid == 1'b0, "acc_valid idle");
        end
        ps_valid = 1;
        ps_first = (b == 0);
        ps_last  = (b == len - 1);
        ps_sum   = IN_W'({$urandom, $urandom}) >>> 3;
        ps_side  = {$urandom, $urandom, $urandom};
        ref_sum   = (b == 0 ? 0 : ref_sum) + longint'(ps_sum);
        exp_pulse = (b == len - 1);
        exp_side  = ps_side;
        @(posedge clk); #1;
        ps_valid  = 0;
        check(acc_valid == exp_pulse, "acc_valid");
        if (exp_pulse) check(acc == ref_sum && acc_side == exp_side, "acc after pair");
      end
      pairs++;
    end
    @(posedge clk); #1;
    check(acc_valid == 1'b0, "acc_valid end");
    $display("pairs=%0d", pairs);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
