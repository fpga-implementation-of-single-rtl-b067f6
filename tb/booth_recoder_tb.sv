// booth_recoder_tb: exhaustive check of the Booth recoding cell.
// All 8 F blocks are applied; the select lines are compared both with the recoding truth
// table typed in as constants and with the digit -2*f[2]+f[1]+f[0] computed arithmetically.
module booth_recoder_tb;
  import booth_pkg::*;

  logic       clk = 0;
  logic [2:0] f;
  booth_sel_t sel;
  int checks = 0, failures = 0;

  // truth table: {neg, one, two} for f = 0..7
  localparam logic [2:0] TABLE [8] = '{3'b000, 3'b010, 3'b010, 3'b011,
                                       3'b111, 3'b110, 3'b110, 3'b000};

  booth_recoder dut (.f(f), .sel(sel));

  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int d;
    for (int i = 0; i < 8; i++) begin
      @(negedge clk);
      f = 3'(i);
      @(posedge clk);
      d = -2 * int'(f[2]) + int'(f[1]) + int'(f[0]);
      checks++;
      if ({sel.neg, sel.one, sel.two} !== TABLE[i]) begin
        failures++;
        $display("FAIL table f=%b got %b exp %b", f, {sel.neg, sel.one, sel.two}, TABLE[i]);
      end
      checks++;
      if (sel.neg !== (d < 0) || sel.one !== (d != 0) || sel.two !== (d == 2 || d == -2)) begin
        failures++;
        $display("FAIL digit f=%b d=%0d sel=%b", f, d, sel);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
