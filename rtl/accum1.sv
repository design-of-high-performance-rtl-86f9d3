// accum1: the ACCUM_1 register of the unified SVM circuit.
//
// Adds the per-beat partial sum of the inner product calculator into a
// running sum. The first beat of a vector pair replaces the register
// contents instead of adding to them, so consecutive support vectors
// stream back to back with no clearing cycle. After the last beat of a
// pair (34 beats for 3,780 dimensions at 112 lanes) the register holds
// X.Y (linear mode) or Y.(Y-2X) (RBF mode), and acc_valid is high for one
// cycle together with the support vector's side record.
//
// Timing: the beat shown on ps_* in cycle t is in acc in cycle t+1; the
// register is the end of the inner product calculator's second pipeline
// stage. The published design gives the register and its 34-cycle
// accumulation; the first-beat reload and the valid pulse are this
// implementation's choice.
module accum1 #(
  parameter int unsigned IN_W  = 59,
  parameter int unsigned ACC_W = svm_pkg::ACC_W
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     ps_valid,
  input  logic                     ps_first,
  input  logic                     ps_last,
  input  svm_pkg::sv_side_t        ps_side,
  input  logic signed [IN_W-1:0]   ps_sum,
  output logic                     acc_valid,  // acc holds a finished sum
  output svm_pkg::sv_side_t        acc_side,
  output logic signed [ACC_W-1:0]  acc
);

  logic signed [ACC_W-1:0] base;

  assign base = ps_first ? '0 : acc;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc       <= '0;
      acc_valid <= 1'b0;
      acc_side  <= '0;
    end else begin
      acc_valid <= ps_valid && ps_last;
      if (ps_valid) begin
        acc <= base + ACC_W'(ps_sum);
        if (ps_last) acc_side <= ps_side;
      end
    end
  end

endmodule
