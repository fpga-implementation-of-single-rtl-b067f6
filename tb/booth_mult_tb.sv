// booth_mult_tb: end-to-end test of the multiplier.
//
// The multiplier runs at its default size (32 x 32 -> 64), with no parameter override.
// It is driven with the four operand pairs of the paper's simulation waveform, corner
// values (0, 1, -1, most negative, largest positive, a mixed pattern) in all four
// signed/unsigned mixes, and 1000000 random operand pairs with random flags.
// (booth_mult_small_tb covers an 8 x 8 instance exhaustively.)
// Reference: both operands are turned into 64-bit integers according to their flags and
// multiplied with the simulator's own arithmetic.
// Timing: the design is single cycle (combinational). Inputs change on the falling clock
// edge and the product is checked on the next rising edge, i.e. within one cycle.
// Mechanism coverage: every signed/unsigned mix, every Booth digit value -2..+2, a
// non-zero top digit (only possible for an unsigned multiplier with its MSB set), a
// negative digit in the lowest row (uses the +1 correction row) and a negative product
// must each occur at least once, otherwise a failure is counted.
module booth_mult_tb;
  localparam int N  = 32;
  localparam int NG = N / 2 + 1;

  logic           clk = 0;
  logic [N-1:0]   mplier, mplicand;
  logic           mplier_s_u, mplicand_s_u;
  logic [2*N-1:0] prod;

  int checks = 0, failures = 0;
  int mix_seen [4];
  int digit_seen [5];
  int top_digit_nonzero = 0, low_row_negated = 0, neg_product = 0, fig_vectors = 0;

  booth_mult dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint value_of(input logic [N-1:0] v, input logic s);
    return s ? longint'($signed(v)) : longint'(v);
  endfunction

  // Booth digits of the multiplier as the tb sees them (independent of the DUT).
  task automatic count_digits(input logic [N-1:0] m, input logic s);
    logic [N+2:0] ap;
    int d;
    ap = {s & m[N-1], s & m[N-1], m, 1'b0};
    for (int i = 0; i < NG; i++) begin
      d = -2 * int'(ap[2*i+2]) + int'(ap[2*i+1]) + int'(ap[2*i]);
      digit_seen[d+2]++;
      if (i == NG - 1 && d != 0) top_digit_nonzero++;
      if (i == 0 && d < 0) low_row_negated++;
    end
  endtask

  task automatic apply(input logic [N-1:0] m, input logic ms, input logic [N-1:0] c,
                       input logic cs);
    logic [2*N-1:0] expv;
    @(negedge clk);
    mplier = m; mplier_s_u = ms; mplicand = c; mplicand_s_u = cs;
    @(posedge clk);
    expv = value_of(m, ms) * value_of(c, cs);
    checks++;
    if (prod !== expv) begin
      failures++;
      if (failures <= 20) $display("FAIL %h(%b) * %h(%b) = %h exp %h", m, ms, c, cs, prod, expv);
    end
    mix_seen[{ms, cs}]++;
    count_digits(m, ms);
    if ($signed(expv) < 0) neg_product++;
  endtask

  // The four operand pairs and products printed in the paper's simulation waveform.
  task automatic fig_vector(input int m, input int c, input longint p);
    logic s;
    s = (m < 0) || (c < 0);
    apply(N'(m), s, N'(c), s);
    checks++;
    if ($signed(prod) != p) begin
      failures++;
      $display("FAIL waveform %0d * %0d = %0d exp %0d", m, c, $signed(prod), p);
    end
    fig_vectors++;
  endtask

  localparam logic [N-1:0] CORNER [6] = '{32'h0, 32'h1, 32'hFFFF_FFFF, 32'h8000_0000,
                                          32'h7FFF_FFFF, 32'hAAAA_5555};

  initial begin
    // paper waveform vectors
    fig_vector(26, 29, 754);
    fig_vector(29, -26, -754);
    fig_vector(-26, 29, -754);
    fig_vector(-29, -26, 754);

    // corners in all mixes
    for (int mix = 0; mix < 4; mix++)
      for (int i = 0; i < 6; i++)
        for (int j = 0; j < 6; j++)
          apply(CORNER[i], 1'(mix >> 1), CORNER[j], 1'(mix));

    // random
    for (int t = 0; t < 1000000; t++)
      apply($urandom, 1'($urandom), $urandom, 1'($urandom));

    // mechanism coverage
    for (int k = 0; k < 4; k++) begin
      checks++;
      if (mix_seen[k] == 0) begin failures++; $display("FAIL mix %0d never used", k); end
    end
    for (int k = 0; k < 5; k++) begin
      checks++;
      if (digit_seen[k] == 0) begin failures++; $display("FAIL digit %0d never seen", k - 2); end
    end
    checks++;
    if (top_digit_nonzero == 0 || low_row_negated == 0 || neg_product == 0 || fig_vectors != 4) begin
      failures++;
      $display("FAIL coverage top=%0d lowneg=%0d negprod=%0d fig=%0d",
               top_digit_nonzero, low_row_negated, neg_product, fig_vectors);
    end
    $display("coverage: mixes uu=%0d us=%0d su=%0d ss=%0d", mix_seen[0], mix_seen[1],
             mix_seen[2], mix_seen[3]);
    $display("coverage: digits -2=%0d -1=%0d 0=%0d +1=%0d +2=%0d", digit_seen[0],
             digit_seen[1], digit_seen[2], digit_seen[3], digit_seen[4]);
    $display("coverage: top digit non-zero=%0d row0 negated=%0d negative products=%0d",
             top_digit_nonzero, low_row_negated, neg_product);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
