// bit33_ext_tb: checks the operand extension unit. Random operands in all four
// signed/unsigned combinations; the widened value must equal the operand's numeric
// value (signed or unsigned) when read as an (N+1)-bit two's-complement number.
module bit33_ext_tb;
  localparam int N = 32;

  logic           clk = 0;
  logic [N-1:0]   mplier, mplicand;
  logic           mplier_s_u, mplicand_s_u;
  logic [N:0]     a, b;
  int checks = 0, failures = 0;

  bit33_ext dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint value_of(input logic [N-1:0] v, input logic s);
    return s ? longint'($signed(v)) : longint'(v);
  endfunction

  initial begin
    longint ea, eb;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      mplier       = $urandom;
      mplicand     = $urandom;
      if (i < 8) begin
        mplier   = (i[0]) ? 32'h8000_0000 : 32'hFFFF_FFFF;
        mplicand = (i[1]) ? 32'h7FFF_FFFF : 32'h8000_0001;
      end
      mplier_s_u   = 1'(i);
      mplicand_s_u = 1'(i >> 1);
      @(posedge clk);
      ea = longint'($signed(a));
      eb = longint'($signed(b));
      checks++;
      if (ea != value_of(mplier, mplier_s_u) || eb != value_of(mplicand, mplicand_s_u)) begin
        failures++;
        $display("FAIL m=%h s=%b a=%h / c=%h s=%b b=%h", mplier, mplier_s_u, a,
                 mplicand, mplicand_s_u, b);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
