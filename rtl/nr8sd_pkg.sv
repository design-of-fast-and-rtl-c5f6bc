// nr8sd_pkg: types, sizes and constant functions shared by the pre-encoded
// NR8SD (non-redundant radix-8 signed-digit) multiplier.
//
// A coefficient B of N bits (two's complement) is split into K = ceil(N/3)
// radix-8 digits. The K-1 low digits are stored in NR8SD form, three bits per
// digit; the most significant digit is stored as radix-8 Booth select signals
// (sign plus one-hot magnitude x1/x2/x3/x4, five bits), because only a Booth
// digit can absorb the sign of the two's complement number.
//
// Encoded word layout (ENC_W = 3*(K-1) + 5 bits):
//   enc[3j+2 : 3j]      = {n2, n1, n0} of digit j, j = 0 .. K-2
//   enc[ENC_W-1 : 3K-3] = pp_sel_t of digit K-1
//
// The two NR8SD forms are
//   NR8SD_MINUS : digit = -4*n2 + 2*n1 + n0, digit set {-4..+3}
//   NR8SD_PLUS  : digit = +4*n2 - 2*n1 - n0, digit set {-3..+4}
// The digit sets are the published scheme's; the bit weighting of each form is the
// radix-8 extension of its radix-4 NR4SD forms and is this design's choice.
//
// default_coeffs() gives the coefficient set the ROM holds unless a table is
// passed in: 0, the most negative value, the most positive value, -1, and
// then pseudo-random words e * 0x9E3779B97F4A7C15 (top N bits of the 64-bit
// product). The published scheme gives no coefficient set; this one exercises every
// digit value and both extremes of the range.
package nr8sd_pkg;

  typedef enum logic {
    NR8SD_MINUS = 1'b0,
    NR8SD_PLUS  = 1'b1
  } nr8sd_form_e;

  // Partial-product select for one digit: sign and one-hot magnitude.
  typedef struct packed {
    logic neg;
    logic x4;
    logic x3;
    logic x2;
    logic x1;
  } pp_sel_t;

  localparam int DIGIT_BITS = 3;
  localparam int MSB_BITS   = $bits(pp_sel_t);

  localparam int COEF_MAX_W     = 64;
  localparam int COEF_MAX_DEPTH = 64;
  typedef logic [COEF_MAX_DEPTH-1:0][COEF_MAX_W-1:0] coef_table_t;

  function automatic int num_digits(int n);
    return (n + 2) / 3;
  endfunction

  function automatic int enc_width(int n);
    return DIGIT_BITS * (num_digits(n) - 1) + MSB_BITS;
  endfunction

  function automatic coef_table_t default_coeffs(int n);
    coef_table_t t;
    logic [63:0] h;
    for (int e = 0; e < COEF_MAX_DEPTH; e++) begin
      h    = 64'(e) * 64'h9E37_79B9_7F4A_7C15;
      t[e] = h >> (64 - n);
    end
    t[0] = '0;
    t[1] = 64'd1 << (n - 1);
    t[2] = (64'd1 << (n - 1)) - 64'd1;
    t[3] = '1;
    return t;
  endfunction

endpackage
