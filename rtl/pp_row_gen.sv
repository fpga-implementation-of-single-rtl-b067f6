// pp_row_gen: one partial-product row of the radix-4 Booth multiplier.
//
// The widened multiplicand b (N+1 bits, two's complement) is first sign-extended to N+2
// bits. Per bit, a 2:1 select driven by "two" picks either b or b shifted left by one
// (bit 0 then takes 0). The result is ANDed with "one", so a zero digit gives an all-zero
// row, and XORed with "neg", which forms the one's complement for a negative digit. The
// missing +1 of the two's complement is not added here; it is supplied to the adder
// array as a separate correction row. The (N+2)-bit result is sign-extended to 2N bits by
// repeating its top bit. The row is produced unshifted; the adder array aligns row F(2i)
// by 2i places.
//
// So row = digit * b                when the digit is >= 0, and
//    row = digit * b - 1            when it is negative (all modulo 2^(2N)).
//
// Interface: b widened multiplicand, sel select lines of this row's F block, row output.
// Timing: purely combinational.
// The select / gate / invert order per bit and the sign extension follow the paper.
module pp_row_gen
  import booth_pkg::*;
#(
  parameter int unsigned N = 32
) (
  input  logic [N:0]     b,
  input  booth_sel_t     sel,
  output logic [2*N-1:0] row
);

  logic [N+1:0] b1;    // b sign-extended to N+2 bits (x1 choice)
  logic [N+1:0] b2;    // b shifted left by one       (x2 choice)
  logic [N+1:0] core;

  always_comb begin
    b1   = {b[N], b};
    b2   = {b, 1'b0};
    core = ((sel.two ? b2 : b1) & {(N+2){sel.one}}) ^ {(N+2){sel.neg}};
    row  = {{(N-2){core[N+1]}}, core};
  end

endmodule
