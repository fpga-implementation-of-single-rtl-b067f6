// pp_adder_tb: checks the partial-product addition unit with arbitrary (random) rows.
// Expected: sum over i of (rows[i] + neg[i]) * 4^i, modulo 2^(2N). Corner cases drive
// all-ones rows and all negate flags to exercise every carry path.
module pp_adder_tb;
  localparam int N  = 32;
  localparam int NG = N / 2 + 1;

  logic                   clk = 0;
  logic [NG-1:0][2*N-1:0] rows;
  logic [NG-1:0]          neg;
  logic [2*N-1:0]         prod;
  int checks = 0, failures = 0;

  pp_adder dut (.rows(rows), .neg(neg), .prod(prod));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [2*N-1:0] expv;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      for (int i = 0; i < NG; i++) rows[i] = {$urandom, $urandom};
      neg = NG'({$urandom, $urandom});
      if (t == 0) begin rows = '1; neg = '1; end
      if (t == 1) begin rows = '0; neg = '1; end
      if (t == 2) begin rows = '1; neg = '0; end
      @(posedge clk);
      expv = '0;
      for (int i = 0; i < NG; i++) expv += (rows[i] + (2*N)'(neg[i])) << (2*i);
      checks++;
      if (prod !== expv) begin
        failures++;
        $display("FAIL t=%0d prod=%h exp=%h", t, prod, expv);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
