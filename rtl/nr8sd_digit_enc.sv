// nr8sd_digit_enc: digit-level NR8SD encoder cell, one radix-8 digit.
//
// Takes three coefficient bits b[2:0] and the carry c_in from the digit below,
// and produces the three stored digit bits n[2:0] and the carry to the next
// digit, so that 4*b2 + 2*b1 + b0 + c_in = digit + 8*c_out.
// The cell is a chain of three half adders, as in the radix-4 NR4SD encoder,
// with one position per bit:
//   NR8SD_MINUS: HA, HA, HA*  -> digit = -4*n2 + 2*n1 + n0 in {-4..+3}
//   NR8SD_PLUS : HA*, HA*, HA -> digit = +4*n2 - 2*n1 - n0 in {-3..+4}
// HA  : c = p & q, s = p ^ q   (2c + s = p + q)
// HA* : c = p | q, s = p ^ q   (2c - s = p + q, sum bit negatively weighted)
// The HA/HA* cells and the digit sets follow the published scheme; the order of the
// cells within a radix-8 digit is this design's extension of its radix-4 cell.
// Purely combinational.
module nr8sd_digit_enc
  import nr8sd_pkg::*;
#(
  parameter nr8sd_form_e FORM = NR8SD_PLUS
) (
  input  logic [2:0] b,
  input  logic       c_in,
  output logic [2:0] n,
  output logic       c_out
);

  logic c1, c2;

  always_comb begin
    if (FORM == NR8SD_MINUS) begin
      n[0]  = b[0] ^ c_in;  c1    = b[0] & c_in;   // HA
      n[1]  = b[1] ^ c1;    c2    = b[1] & c1;     // HA
      n[2]  = b[2] ^ c2;    c_out = b[2] | c2;     // HA*
    end else begin
      n[0]  = b[0] ^ c_in;  c1    = b[0] | c_in;   // HA*
      n[1]  = b[1] ^ c1;    c2    = b[1] | c1;     // HA*
      n[2]  = b[2] ^ c2;    c_out = b[2] & c2;     // HA
    end
  end

endmodule
