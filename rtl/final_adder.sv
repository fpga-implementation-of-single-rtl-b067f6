// final_adder: last stage of the partial-product addition array.
//
// After the last row has been absorbed there is no further stage to take the carries
// down, so they are propagated horizontally: a ripple-carry chain adds the sum vector s
// to the carry vector c shifted left by one (c[j] has weight 2^(j+1)). Column 0 adds
// s[0] to a constant 0; column j > 0 adds s[j], c[j-1] and the ripple carry from column
// j-1. The carry out of the top column is dropped (result modulo 2^W).
//
// Interface: s and c are the sum and carry vectors of the last carry-save stage, m the
// final W-bit result. Timing: purely combinational (a W-bit ripple chain).
module final_adder #(
  parameter int unsigned W = 64
) (
  input  logic [W-1:0] s,
  input  logic [W-1:0] c,
  output logic [W-1:0] m
);

  logic [W:0]   rc;     // ripple carries, rc[j] enters column j
  logic [W-1:0] cin;    // diagonal carry from the last carry-save stage
  logic [W-1:0] co;

  assign rc[0] = 1'b0;
  assign cin   = {c[W-2:0], 1'b0};

  for (genvar j = 0; j < W; j++) begin : g_col
    full_adder u_fa (
      .x  (s[j]),
      .y  (cin[j]),
      .z  (rc[j]),
      .s  (m[j]),
      .co (co[j])
    );
    assign rc[j+1] = co[j];
  end

endmodule
