// booth_encoder: F-block formation and recoding of the widened multiplier.
//
// The (N+1)-bit multiplier a is first rewired into an (N+3)-bit string
//   {a[N], a[N:0], 1'b0}
// i.e. a 0 appended below the LSB and the top bit repeated once more above the MSB, so
// that an odd-width operand can be cut into whole overlapping 3-bit blocks. Block F(2i),
// i = 0 .. N/2, is bits [2i+2 : 2i] of that string, so F0 = {a1, a0, 0} and the last block
// (F32 for N = 32) is {a[N], a[N], a[N-1]}. Each block goes through a booth_recoder cell.
// With N = 32 there are 17 blocks, F0, F2, ..., F32.
//
// Interface: a is the widened multiplier; sel[i] holds the select lines of block F(2i).
// Timing: purely combinational.
// The block layout follows the paper's F-block table; the generic-N indexing is this
// design's own generalisation of it.
module booth_encoder
  import booth_pkg::*;
#(
  parameter int unsigned N = 32
) (
  input  logic [N:0]                  a,
  output booth_sel_t [N/2:0]          sel
);

  localparam int unsigned NG = booth_pkg::num_groups(N);

  logic [N+2:0] ap;   // pre-processed multiplier string

  assign ap = {a[N], a, 1'b0};

  for (genvar i = 0; i < NG; i++) begin : g_rec
    booth_recoder u_rec (
      .f   (ap[2*i+2 -: 3]),
      .sel (sel[i])
    );
  end

endmodule
