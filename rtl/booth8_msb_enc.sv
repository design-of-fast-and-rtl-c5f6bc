// booth8_msb_enc: radix-8 Booth encoder for the most significant digit.
//
// The top digit of the coefficient carries the two's complement sign, so it
// is encoded in radix-8 Booth form from the top three bits b[2:0] and the
// carry c_in of the NR8SD chain below:
//   digit = -4*b2 + 2*b1 + b0 + c_in, in {-4..+4}
// which is the radix-8 Booth table with c_in in the place of the bit below
// the group. Output is the partial-product select: sign and one-hot
// magnitude. A zero digit is given a clear sign bit (the row 1111 of the
// table), which keeps the stored sign quiet for zero digits.
// Combinational.
module booth8_msb_enc
  import nr8sd_pkg::*;
(
  input  logic [2:0] b,
  input  logic       c_in,
  output pp_sel_t    sel
);

  always_comb begin
    sel = '0;
    unique case ({b, c_in})
      4'b0000: ;
      4'b0001, 4'b0010: sel.x1 = 1'b1;
      4'b0011, 4'b0100: sel.x2 = 1'b1;
      4'b0101, 4'b0110: sel.x3 = 1'b1;
      4'b0111:          sel.x4 = 1'b1;
      4'b1000:          begin sel.neg = 1'b1; sel.x4 = 1'b1; end
      4'b1001, 4'b1010: begin sel.neg = 1'b1; sel.x3 = 1'b1; end
      4'b1011, 4'b1100: begin sel.neg = 1'b1; sel.x2 = 1'b1; end
      4'b1101, 4'b1110: begin sel.neg = 1'b1; sel.x1 = 1'b1; end
      4'b1111: ;
      default: ;
    endcase
  end

endmodule
