// booth_recoder: radix-4 Booth recoding cell for one F block.
//
// Input f = {a(2i+1), a(2i), a(2i-1)}. The cell produces the three select lines of the
// Booth digit f(2i) = -2*a(2i+1) + a(2i) + a(2i-1), exactly as the recoding truth table:
//   neg (F bar) : a(2i+1) is set and the block is not 111 (digit -1 or -2)
//   one (F^1)   : the three bits are not all equal       (digit non-zero)
//   two (F^2)   : block is 011 or 100                    (digit +2 or -2)
// The paper gives a gate-level drawing of these; the expressions below are the same
// functions written as Boolean equations, with F^2 selected by a(2i+1) as in the drawing.
// Timing: purely combinational.
module booth_recoder
  import booth_pkg::*;
(
  input  logic [2:0]  f,
  output booth_sel_t  sel
);

  logic hi, mid, lo;

  always_comb begin
    {hi, mid, lo} = f;
    sel.neg = hi & ~(mid & lo);
    sel.one = ~((hi & mid & lo) | ~(hi | mid | lo));
    sel.two = hi ? ~(mid | lo) : (mid & lo);
  end

endmodule
