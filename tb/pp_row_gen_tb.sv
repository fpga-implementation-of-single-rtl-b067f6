// pp_row_gen_tb: checks one partial-product row. For random and corner multiplicands b
// and every Booth digit d in -2..+2 the row must equal d*b when d >= 0 and d*b - 1 when
// d < 0 (one's complement; the +1 is added elsewhere), as a 2N-bit value.
module pp_row_gen_tb;
  import booth_pkg::*;
  localparam int N = 32;

  logic           clk = 0;
  logic [N:0]     b;
  booth_sel_t     sel;
  logic [2*N-1:0] row;
  int checks = 0, failures = 0;

  pp_row_gen dut (.b(b), .sel(sel), .row(row));

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint bv, expv;
    int d;
    for (int t = 0; t < 2000; t++) begin
      for (d = -2; d <= 2; d++) begin
        @(negedge clk);
        b = {$urandom, $urandom} & {(N+1){1'b1}};
        case (t)
          0: b = '0;
          1: b = '1;
          2: b = {1'b1, {N{1'b0}}};
          3: b = {1'b0, {N{1'b1}}};
          default: ;
        endcase
        sel.neg = (d < 0);
        sel.one = (d != 0);
        sel.two = (d == 2 || d == -2);
        @(posedge clk);
        bv   = longint'($signed(b));
        expv = longint'(d) * bv - ((d < 0) ? 64'sd1 : 64'sd0);
        checks++;
        if (row !== expv) begin
          failures++;
          $display("FAIL b=%h d=%0d row=%h exp=%h", b, d, row, expv);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
