// csa32: W-bit carry-save adder (a row of full adders, 3:2 compressor).
// s + c = x + y + z modulo 2^W, with s the bitwise sum and c the majority
// shifted left by one place. No carry crosses more than one bit position.
// Combinational.
module csa32 #(
  parameter int W = 48
) (
  input  logic [W-1:0] x,
  input  logic [W-1:0] y,
  input  logic [W-1:0] z,
  output logic [W-1:0] s,
  output logic [W-1:0] c
);

  // The majority of the top column would carry out of the word; it is dropped.
  logic [W-2:0] maj;

  assign s   = x ^ y ^ z;
  assign maj = (x[W-2:0] & y[W-2:0]) | (x[W-2:0] & z[W-2:0]) | (y[W-2:0] & z[W-2:0]);
  assign c   = {maj, 1'b0};

endmodule
