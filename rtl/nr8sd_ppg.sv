// nr8sd_ppg: partial-product generator for one radix-8 digit.
//
// From the multiplicand A (N bits), its triple 3*A (N+2 bits) and the digit's
// select signals it forms the W = N+2 bit row
//   pp  = ( x1 ? A : x2 ? 2A : x3 ? 3A : x4 ? 4A : 0 ) XOR {W{neg}}
//   cin = neg
// so that pp + cin = digit * A in W-bit two's complement. The selects are
// one-hot, so the multiplexer is an AND-OR. The +1 of the negation is
// returned as cin and added in the carry-save tree, as the published scheme does with
// its input carries. Combinational.
module nr8sd_ppg
  import nr8sd_pkg::*;
#(
  parameter int N = 24,
  localparam int W = N + 2
) (
  input  logic [N-1:0] a,
  input  logic [W-1:0] a3,
  input  pp_sel_t      sel,
  output logic [W-1:0] pp,
  output logic         cin
);

  logic [W-1:0] m1, m2, m4, mag;

  assign m1 = {{2{a[N-1]}}, a};
  assign m2 = {a[N-1], a, 1'b0};
  assign m4 = {a, 2'b00};

  assign mag = ({W{sel.x1}} & m1) | ({W{sel.x2}} & m2) |
               ({W{sel.x3}} & a3) | ({W{sel.x4}} & m4);
  assign pp  = mag ^ {W{sel.neg}};
  assign cin = sel.neg;

endmodule
