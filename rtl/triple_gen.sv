// triple_gen: the "hard" multiple 3*A of the multiplicand.
//
// Radix-8 digits of magnitude 3 need 3*A, which is not a shift of A. It is
// formed once per multiplicand as A + 2*A in a carry look-ahead adder and
// shared by all partial-product generators. Input a is N-bit two's
// complement; output a3 is N+2 bits, enough for 3*A over the whole range.
// Combinational.
module triple_gen #(
  parameter int N = 24
) (
  input  logic [N-1:0] a,
  output logic [N+1:0] a3
);

  logic [N+1:0] a1, a2;

  assign a1 = {{2{a[N-1]}}, a};
  assign a2 = {a[N-1], a, 1'b0};

  cla_adder #(.W(N + 2)) u_add (
    .a   (a1),
    .b   (a2),
    .cin (1'b0),
    .sum (a3),
    .cout()
  );

endmodule
