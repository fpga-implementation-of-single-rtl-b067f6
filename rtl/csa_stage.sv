// csa_stage: one addition stage of the partial-product array.
//
// A row of W full adders, one per bit column, reduces three W-bit operands to a sum
// vector s and a carry vector c without any carry travelling along the row: column j
// gives s[j] (weight 2^j) and c[j] (weight 2^(j+1)). The next stage consumes c shifted
// left by one place, which is the "diagonal" carry path of the array: each carry goes
// one column to the left and one stage down. The carry out of the top column is dropped
// because the product is taken modulo 2^W.
//
// In the first stage the operands are ROW#0, the correction row ROW#-1 and ROW#2 << 2;
// in every later stage they are the previous sum, the previous carries << 1 and the next
// row. Where an operand bit is a constant 0 the paper draws a half adder; here every
// column uses a full adder, which synthesis reduces the same way.
//
// Timing: purely combinational.
module csa_stage #(
  parameter int unsigned W = 64
) (
  input  logic [W-1:0] x,
  input  logic [W-1:0] y,
  input  logic [W-1:0] z,
  output logic [W-1:0] s,
  output logic [W-1:0] c
);

  for (genvar j = 0; j < W; j++) begin : g_col
    full_adder u_fa (
      .x  (x[j]),
      .y  (y[j]),
      .z  (z[j]),
      .s  (s[j]),
      .co (c[j])
    );
  end

endmodule
