// bit33_ext: operand extension unit ("33rd bit" unit).
//
// The multiplier core is a signed one. To let it also multiply unsigned numbers, each
// N-bit operand is widened by one bit at the top: for a signed operand the new bit copies
// the operand's sign bit, for an unsigned one it is 0. The widened operands are therefore
// always correct two's-complement values of N+1 bits, and the signed core covers the
// full unsigned range too. One 2:1 select per operand, driven by its own signed flag,
// as in the paper's extension-unit diagram.
//
// Interface: mplier/mplicand are the N-bit operands, *_s_u = 1 marks an operand as
// signed. a is the widened multiplier, b the widened multiplicand.
// Timing: purely combinational.
// The select structure follows the paper; the width parameter N is this design's choice.
module bit33_ext #(
  parameter int unsigned N = 32
) (
  input  logic [N-1:0] mplier,
  input  logic         mplier_s_u,
  input  logic [N-1:0] mplicand,
  input  logic         mplicand_s_u,
  output logic [N:0]   a,
  output logic [N:0]   b
);

  logic a_top, b_top;

  always_comb begin
    a_top = mplier_s_u   ? mplier[N-1]   : 1'b0;
    b_top = mplicand_s_u ? mplicand[N-1] : 1'b0;
    a     = {a_top, mplier};
    b     = {b_top, mplicand};
  end

endmodule
