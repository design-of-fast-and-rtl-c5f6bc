// nr8sd_digit_dec: turns the three stored bits of one NR8SD digit into the
// partial-product select signals (sign and one-hot magnitude).
//
// This is the small extra circuit a pre-encoded NR8SD multiplier needs in
// front of each partial-product generator. With m = 2*n1 + n0:
//   magnitude = m          when n2 = 0
//             = 4 - m      when n2 = 1
// for both forms, so the magnitude selects are shared:
//   x1 = ~n2&~n1&n0 | n2&n1&n0     x2 = ~n2&n1&~n0 | n2&n1&~n0
//   x3 = ~n2&n1&n0  | n2&~n1&n0    x4 = n2&~n1&~n0
// and only the sign differs:
//   NR8SD_MINUS (digit = -4*n2 + 2*n1 + n0): neg = n2
//   NR8SD_PLUS  (digit = +4*n2 - 2*n1 - n0): neg = ~n2 & (n1 | n0)
// The sign is never set for a zero digit. The equations are this design's
// radix-8 counterpart of the NR4SD select equations. Combinational.
module nr8sd_digit_dec
  import nr8sd_pkg::*;
#(
  parameter nr8sd_form_e FORM = NR8SD_PLUS
) (
  input  logic [2:0] n,
  output pp_sel_t    sel
);

  always_comb begin
    sel.x1  = (~n[2] & ~n[1] &  n[0]) | (n[2] &  n[1] &  n[0]);
    sel.x2  = (~n[2] &  n[1] & ~n[0]) | (n[2] &  n[1] & ~n[0]);
    sel.x3  = (~n[2] &  n[1] &  n[0]) | (n[2] & ~n[1] &  n[0]);
    sel.x4  =   n[2] & ~n[1] & ~n[0];
    sel.neg = (FORM == NR8SD_MINUS) ? n[2] : (~n[2] & (n[1] | n[0]));
  end

endmodule
