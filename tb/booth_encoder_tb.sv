// booth_encoder_tb: checks F-block formation and recoding. For random and corner
// (N+1)-bit multipliers, the digits encoded by the select lines (neg/one/two ->
// -2..+2) must reconstruct the multiplier: sum of digit_i * 4^i equals a read as a
// two's-complement number. Each digit is also checked against the digit computed
// directly from the multiplier bits.
module booth_encoder_tb;
  import booth_pkg::*;
  localparam int N  = 32;
  localparam int NG = N / 2 + 1;

  logic                clk = 0;
  logic [N:0]          a;
  booth_sel_t [NG-1:0] sel;
  int checks = 0, failures = 0;

  booth_encoder dut (.a(a), .sel(sel));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint sum, av;
    int     dig, exp_dig, bm1, b0, b1;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      a = {$urandom, $urandom} & {(N+1){1'b1}};
      if (t == 0) a = '0;
      if (t == 1) a = '1;
      if (t == 2) a = {1'b0, {N{1'b1}}};
      if (t == 3) a = {1'b1, {N{1'b0}}};
      if (t == 4) a = {2'b01, {(N-1){1'b0}}};
      @(posedge clk);
      av  = longint'($signed(a));
      sum = 0;
      for (int i = NG - 1; i >= 0; i--) begin
        dig = sel[i].one ? (sel[i].two ? 2 : 1) : 0;
        if (sel[i].neg) dig = -dig;
        b1  = (2*i + 1 <= N) ? int'(a[2*i+1]) : int'(a[N]);
        b0  = int'(a[2*i]);
        bm1 = (i == 0) ? 0 : int'(a[2*i-1]);
        exp_dig = -2 * b1 + b0 + bm1;
        checks++;
        if (dig != exp_dig) begin
          failures++;
          $display("FAIL a=%h digit %0d got %0d exp %0d", a, i, dig, exp_dig);
        end
        sum = sum * 4 + longint'(dig);
      end
      checks++;
      if (sum != av) begin
        failures++;
        $display("FAIL a=%h reconstructed %0d exp %0d", a, sum, av);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
