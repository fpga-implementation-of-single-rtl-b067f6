// csa_stage_tb: checks one carry-save stage. For random and corner operands the sum
// vector must be the bitwise three-way XOR, the carry vector the bitwise majority, and
// s + 2*c must equal x + y + z modulo 2^W.
module csa_stage_tb;
  localparam int W = 64;

  logic         clk = 0;
  logic [W-1:0] x, y, z, s, c;
  int checks = 0, failures = 0;

  csa_stage dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      x = {$urandom, $urandom};
      y = {$urandom, $urandom};
      z = {$urandom, $urandom};
      if (t == 0) begin x = '1; y = '1; z = '1; end
      if (t == 1) begin x = '1; y = '0; z = '1; end
      @(posedge clk);
      checks++;
      if (s !== (x ^ y ^ z) || c !== ((x & y) | (x & z) | (y & z))) begin
        failures++;
        $display("FAIL bitwise x=%h y=%h z=%h s=%h c=%h", x, y, z, s, c);
      end
      checks++;
      if (W'(s + (c << 1)) !== W'(x + y + z)) begin
        failures++;
        $display("FAIL sum x=%h y=%h z=%h", x, y, z);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
