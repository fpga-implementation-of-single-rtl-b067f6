// pp_adder: partial-product addition unit.
//
// Adds the NG = N/2+1 Booth rows ROW#0, ROW#2, ..., ROW#N (row i aligned 2i places to the
// left) plus the correction row ROW#-1. A negative Booth digit makes its row the one's
// complement of |digit|*b, so the +1 that completes the two's complement is collected in
// ROW#-1: bit 2i of ROW#-1 is the negate flag of row i, all other bits are 0.
//
// Structure (array multiplier style, no tree):
//   stage 1     : csa_stage(ROW#0, ROW#-1, ROW#2 << 2)          -> S#2,  C#2
//   stage k     : csa_stage(S#(2k-2), C#(2k-2) << 1, ROW#2k << 2k) -> S#2k, C#2k
//   final stage : final_adder(S#N, C#N), a ripple-carry adder     -> prod
// Each carry-save stage passes its carries one column left and one stage down; only the
// final stage propagates carries along the row. Everything is modulo 2^(2N).
//
// Interface: rows[i] is the unshifted, sign-extended row of F block F(2i); neg[i] its
// negate flag; prod the 2N-bit sum. Timing: purely combinational.
// The stage order, alignment and correction row follow the paper; its worst path runs
// through N/2 carry-save stages and the 2N-bit ripple chain, and is not pipelined.
module pp_adder #(
  parameter int unsigned N = 32
) (
  input  logic [N/2:0][2*N-1:0] rows,
  input  logic [N/2:0]          neg,
  output logic [2*N-1:0]        prod
);

  localparam int unsigned NG = booth_pkg::num_groups(N);
  localparam int unsigned W  = 2 * N;

  logic [W-1:0] row_m1;          // ROW#-1
  logic [W-1:0] s [1:NG-1];      // s[k] is S#2k
  logic [W-1:0] c [1:NG-1];      // c[k] is C#2k

  always_comb begin
    row_m1 = '0;
    for (int i = 0; i < NG; i++) row_m1[2*i] = neg[i];
  end

  csa_stage #(.W(W)) u_stage1 (
    .x (rows[0]),
    .y (row_m1),
    .z (rows[1] << 2),
    .s (s[1]),
    .c (c[1])
  );

  for (genvar k = 2; k < NG; k++) begin : g_stage
    csa_stage #(.W(W)) u_stage (
      .x (s[k-1]),
      .y (c[k-1] << 1),
      .z (rows[k] << (2*k)),
      .s (s[k]),
      .c (c[k])
    );
  end

  final_adder #(.W(W)) u_final (
    .s (s[NG-1]),
    .c (c[NG-1]),
    .m (prod)
  );

endmodule
