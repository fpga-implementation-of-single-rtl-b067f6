// full_adder: one-bit full adder, the cell from which the partial-product addition array
// is built. s = x ^ y ^ z, co = majority(x, y, z). Purely combinational.
module full_adder (
  input  logic x,
  input  logic y,
  input  logic z,
  output logic s,
  output logic co
);

  always_comb begin
    s  = x ^ y ^ z;
    co = (x & y) | (x & z) | (y & z);
  end

endmodule
