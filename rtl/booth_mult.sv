// booth_mult: single-cycle signed/unsigned N x N multiplier using radix-4 Booth recoding.
//
// Top level. Computes prod = mplier * mplicand with a 2N-bit result, where each operand
// is read as signed (two's complement) or unsigned according to its own flag. The design
// is purely combinational: a product is valid one propagation delay after the inputs
// change, with no clock, register or handshake.
//
// Datapath:
//   bit33_ext     widens both operands to N+1 bits (sign bit copied when signed, 0 when
//                 unsigned) so one signed core serves all four signed/unsigned mixes.
//   booth_encoder rewires the widened multiplier into N/2+1 overlapping 3-bit F blocks and
//                 recodes each into select lines neg / one / two (digit in -2..+2).
//   pp_row_gen    one per F block: builds the row (0, b or 2b, one's complemented for a
//                 negative digit, sign-extended to 2N bits).
//   pp_adder      sums the rows plus the +1 correction row with a chain of carry-save
//                 stages and a final ripple-carry stage.
// With N = 32 (the default) there are 17 rows, 16 carry-save stages and 130 I/O bits.
//
// Port names follow the paper's signal table.
// Follows the paper: the port set, the operand widening, the 17-row radix-4 Booth
// scheme with one's-complement rows plus a correction row, and the array of carry-save
// stages ending in a ripple stage. This implementation's own choices: the width is a
// parameter N (even, default 32) and there is no register anywhere, as the paper shows
// none; add registers around it if a clocked interface is needed.
module booth_mult
  import booth_pkg::*;
#(
  parameter int unsigned N = 32
) (
  input  logic [N-1:0]   mplier,
  input  logic           mplier_s_u,
  input  logic [N-1:0]   mplicand,
  input  logic           mplicand_s_u,
  output logic [2*N-1:0] prod
);

  localparam int unsigned NG = booth_pkg::num_groups(N);

  // The F-block layout needs an even operand width; rows need at least N+2 <= 2N bits.
  if (N < 4 || N % 2 != 0) begin : g_bad_n
    $error("booth_mult: N must be even and at least 4");
  end

  logic [N:0]                a;      // widened multiplier
  logic [N:0]                b;      // widened multiplicand
  booth_sel_t [NG-1:0]       sel;
  logic [NG-1:0][2*N-1:0]    rows;
  logic [NG-1:0]             neg;

  bit33_ext #(.N(N)) u_ext (
    .mplier       (mplier),
    .mplier_s_u   (mplier_s_u),
    .mplicand     (mplicand),
    .mplicand_s_u (mplicand_s_u),
    .a            (a),
    .b            (b)
  );

  booth_encoder #(.N(N)) u_enc (
    .a   (a),
    .sel (sel)
  );

  for (genvar i = 0; i < NG; i++) begin : g_row
    pp_row_gen #(.N(N)) u_row (
      .b   (b),
      .sel (sel[i]),
      .row (rows[i])
    );
    assign neg[i] = sel[i].neg;
  end

  pp_adder #(.N(N)) u_add (
    .rows (rows),
    .neg  (neg),
    .prod (prod)
  );

endmodule
