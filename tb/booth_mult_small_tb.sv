// booth_mult_small_tb: exhaustive test of a reduced-width multiplier.
//
// Two instances, N = 8 and N = 4 (the structure is the same as at N = 32: N/2+1 Booth
// rows, N/2 carry-save stages and a 2N-bit ripple stage). Every operand pair is applied
// in all four signed/unsigned mixes and compared with the simulator's own product of the
// two operands read according to their flags. Inputs change on the falling clock edge
// and are checked on the next rising edge (single-cycle, combinational design).
module booth_mult_small_tb;
  logic [7:0]  m8, c8;
  logic        ms8, cs8;
  logic [15:0] p8;
  logic [3:0]  m4, c4;
  logic        ms4, cs4;
  logic [7:0]  p4;
  logic        clk = 0;
  int checks = 0, failures = 0;

  booth_mult #(.N(8)) dut8 (
    .mplier(m8), .mplier_s_u(ms8), .mplicand(c8), .mplicand_s_u(cs8), .prod(p8)
  );
  booth_mult #(.N(4)) dut4 (
    .mplier(m4), .mplier_s_u(ms4), .mplicand(c4), .mplicand_s_u(cs4), .prod(p4)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint val(input logic [7:0] v, input int w, input logic s);
    longint u;
    u = longint'(v) & ((64'sd1 <<< w) - 1);
    if (s && v[w-1]) u -= (64'sd1 <<< w);
    return u;
  endfunction

  initial begin
    longint e8, e4;
    for (int mix = 0; mix < 4; mix++)
      for (int i = 0; i < 256; i++)
        for (int j = 0; j < 256; j++) begin
          @(negedge clk);
          ms8 = 1'(mix >> 1); cs8 = 1'(mix); m8 = 8'(i); c8 = 8'(j);
          ms4 = ms8; cs4 = cs8; m4 = 4'(i); c4 = 4'(j);
          @(posedge clk);
          e8 = val(m8, 8, ms8) * val(c8, 8, cs8);
          checks++;
          if (p8 !== 16'(e8)) begin
            failures++;
            if (failures <= 20) $display("FAIL8 %h(%b)*%h(%b)=%h exp %h", m8, ms8, c8, cs8, p8, 16'(e8));
          end
          if (i < 16 && j < 16) begin
            e4 = val(8'(m4), 4, ms4) * val(8'(c4), 4, cs4);
            checks++;
            if (p4 !== 8'(e4)) begin
              failures++;
              if (failures <= 20) $display("FAIL4 %h(%b)*%h(%b)=%h exp %h", m4, ms4, c4, cs4, p4, 8'(e4));
            end
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
