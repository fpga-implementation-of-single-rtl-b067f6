// final_adder_tb: checks the ripple-carry final stage: m must equal s + 2*c modulo 2^W,
// including the long carry chains of all-ones operands.
module final_adder_tb;
  localparam int W = 64;

  logic         clk = 0;
  logic [W-1:0] s, c, m;
  int checks = 0, failures = 0;

  final_adder dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 4000; t++) begin
      @(negedge clk);
      s = {$urandom, $urandom};
      c = {$urandom, $urandom};
      if (t == 0) begin s = '1; c = 64'd0; end
      if (t == 1) begin s = '1; c = 64'd1; end
      if (t == 2) begin s = 64'h5555_5555_5555_5555; c = 64'h2AAA_AAAA_AAAA_AAAA; end
      if (t == 3) begin s = '0; c = '1; end
      @(posedge clk);
      checks++;
      if (m !== W'(s + (c << 1))) begin
        failures++;
        $display("FAIL s=%h c=%h m=%h exp=%h", s, c, m, W'(s + (c << 1)));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
