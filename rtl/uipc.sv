// uipc: Unified Inner Product Calculator, LANES dimensions per clock.
//
// One multiplier per lane serves both classification modes. The squared
// Euclidean distance is rewritten as
//     ||X - Y||^2 = X.X + Y.(Y - 2X)
// so that with X.X precomputed per support vector, each lane needs one
// adder and one multiplier, exactly like the plain inner product X.Y:
//   stage 1 (registered): operand A = Y; operand B = Y - 2X in RBF mode
//                         (the lane adders, with -2X formed as a shifted
//                         two's complement) or B = X in linear mode.
//   stage 2 (combinational, registered by ACCUM_1 downstream): A*B in every
//                         lane, then a balanced adder tree over the lanes.
// Lanes at or above n_lanes are forced to zero in stage 1 (the last beat of
// a 3,780-dimension vector fills 84 of the 112 lanes).
//
// Interface: one beat is taken when in_valid is high. The beat flags and
// the per-support-vector side record are delayed with the data; ps_* show
// stage 2 of the beat taken in the previous cycle (latency one clock).
// Lane count, mode sharing, the rewrite of the distance and the two
// pipeline stages follow the published design; the lane masking, the
// flags and the widths are this implementation's own.
module uipc #(
  parameter int unsigned LANES  = svm_pkg::LANES,
  parameter int unsigned DATA_W = svm_pkg::DATA_W,
  localparam int unsigned OPB_W  = DATA_W + 2,            // Y - 2X
  localparam int unsigned PROD_W = DATA_W + OPB_W,
  localparam int unsigned SUM_W  = PROD_W + $clog2(LANES),
  localparam int unsigned NL_W   = $clog2(LANES + 1)
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  svm_pkg::kernel_type_e                  kernel_type,
  // input beat
  input  logic                          in_valid,
  input  logic                          in_first,  // first beat of a vector pair
  input  logic                          in_last,   // last beat of a vector pair
  input  logic [NL_W-1:0]               n_lanes,   // lanes carrying data
  input  logic [LANES-1:0][DATA_W-1:0]  in_x,      // support vector (signed)
  input  logic [LANES-1:0][DATA_W-1:0]  in_y,      // HOG feature (signed)
  input  svm_pkg::sv_side_t                    in_side,
  // partial sum of the beat in stage 2
  output logic                          ps_valid,
  output logic                          ps_first,
  output logic                          ps_last,
  output svm_pkg::sv_side_t                    ps_side,
  output logic signed [SUM_W-1:0]       ps_sum
);

  // ---------------- stage 1: lane adders ----------------
  logic [LANES-1:0][DATA_W-1:0] opa_d, opa_q;
  logic [LANES-1:0][OPB_W-1:0]  opb_d, opb_q;

  always_comb begin
    for (int unsigned l = 0; l < LANES; l++) begin
      logic signed [OPB_W-1:0] x_e, y_e;
      x_e = OPB_W'(signed'(in_x[l]));
      y_e = OPB_W'(signed'(in_y[l]));
      if (l < n_lanes) begin
        opa_d[l] = in_y[l];
        opb_d[l] = (kernel_type == svm_pkg::KT_RBF) ? (y_e + ~(x_e <<< 1) + OPB_W'(1))
                                           : x_e;
      end else begin
        opa_d[l] = '0;
        opb_d[l] = '0;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ps_valid <= 1'b0;
      ps_first <= 1'b0;
      ps_last  <= 1'b0;
      ps_side  <= '0;
      opa_q    <= '0;
      opb_q    <= '0;
    end else begin
      ps_valid <= in_valid;
      if (in_valid) begin
        ps_first <= in_first;
        ps_last  <= in_last;
        ps_side  <= in_side;
        opa_q    <= opa_d;
        opb_q    <= opb_d;
      end
    end
  end

  // ---------------- stage 2: multipliers and adder tree ----------------
  logic [LANES-1:0][PROD_W-1:0] prod;

  always_comb begin
    for (int unsigned l = 0; l < LANES; l++) begin
      prod[l] = PROD_W'(signed'(opa_q[l]) * signed'(opb_q[l]));
    end
  end

  adder_tree #(.N(LANES), .IN_W(PROD_W), .OUT_W(SUM_W)) u_tree (
    .operands (prod),
    .sum      (ps_sum)
  );

endmodule
