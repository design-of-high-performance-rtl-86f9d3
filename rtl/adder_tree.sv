// adder_tree: balanced, purely combinational sum of N signed operands.
//
// The operands are sign-extended to OUT_W and padded with zeros to the
// next power of two, NP. Level 0 holds these NP values; every further level
// adds neighbouring pairs of the level below, so the sum leaves level
// ceil(log2 N) after that many adder delays (7 levels for the 112 lanes of
// the inner product calculator; the padding adders fold away in
// synthesis). OUT_W must hold the full sum: IN_W + ceil(log2 N) bits
// suffice. The published design sums the 112 products in its second
// pipeline stage; the balanced-tree arrangement is this implementation's
// choice.
module adder_tree #(
  parameter int unsigned N     = 112,
  parameter int unsigned IN_W  = 52,
  parameter int unsigned OUT_W = 59,
  localparam int unsigned LEVELS = (N > 1) ? $clog2(N) : 0,
  localparam int unsigned NP     = 1 << LEVELS
) (
  input  logic [N-1:0][IN_W-1:0]  operands,   // N signed operands
  output logic signed [OUT_W-1:0] sum
);

  for (genvar k = 0; k <= LEVELS; k++) begin : g_lvl
    logic signed [OUT_W-1:0] v [NP >> k];
    for (genvar i = 0; i < (NP >> k); i++) begin : g_node
      if (k == 0) begin : g_leaf
        if (i < N) begin : g_op
          assign v[i] = OUT_W'(signed'(operands[i]));
        end else begin : g_pad
          assign v[i] = '0;
        end
      end else begin : g_add
        assign v[i] = g_lvl[k-1].v[2*i] + g_lvl[k-1].v[2*i+1];
      end
    end
  end

  assign sum = g_lvl[LEVELS].v[0];

endmodule
