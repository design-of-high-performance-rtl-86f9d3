// exp_table: 32-entry table of 2^(-j/32), j = 0..31, unsigned Q1.24.
//
// Used by the table-driven exponential of the RBF kernel: the integer part
// of an exponent selects a shift, its top five fraction bits select one of
// these entries and the rest is left to a short polynomial. The table is
// built at elaboration by a constant function: starting from 2^40 (1.0 with
// 40 fraction bits) each entry is the previous one times round(2^(-1/32)
// * 2^40) = 1075951360882, truncated back to 40 fraction bits; the stored
// value is that rounded to 24 fraction bits, which equals
// round(2^(24 - j/32)) for every j. Combinational read, no clock.
// Table size and format are this implementation's choice.
module exp_table #(
  parameter int unsigned VAL_W = 25,   // Q1.(VAL_W-1), at most 40
  localparam int unsigned IDX_W   = 5,
  localparam int unsigned ENTRIES = 1 << IDX_W
) (
  input  logic [IDX_W-1:0] idx,
  output logic [VAL_W-1:0] value
);

  typedef logic [ENTRIES-1:0][VAL_W-1:0] table_t;

  function automatic table_t build_table();
    localparam logic [127:0] STEP = 128'd1075951360882;  // 2^(-1/32) * 2^40
    table_t     t;
    logic [127:0] v;
    v = 128'd1 << 40;
    for (int unsigned j = 0; j < ENTRIES; j++) begin
      t[j] = VAL_W'((v + (128'd1 << (40 - VAL_W))) >> (41 - VAL_W));
      v    = (v * STEP) >> 40;
    end
    return t;
  endfunction

  localparam table_t TABLE = build_table();

  assign value = TABLE[idx];

endmodule
