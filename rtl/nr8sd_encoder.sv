// nr8sd_encoder: word-level NR8SD encoder of an N-bit coefficient.
//
// The coefficient b (two's complement) is sign-extended to 3*K bits,
// K = ceil(N/3). Digits 0 .. K-2 are encoded by a ripple chain of
// nr8sd_digit_enc cells, starting with carry 0; each emits three stored bits.
// The top digit takes the last carry and is encoded by booth8_msb_enc as
// radix-8 Booth select signals. The output word layout is given in
// nr8sd_pkg. The value of the word, sum over j of digit_j * 8^j, equals b.
//
// In the pre-encoded multiplier this encoding is done once per coefficient,
// before the coefficients are stored (the ROM instantiates this module on
// constant inputs, so synthesis folds it into the table). Combinational.
module nr8sd_encoder
  import nr8sd_pkg::*;
#(
  parameter int          N    = 24,
  parameter nr8sd_form_e FORM = NR8SD_PLUS,
  localparam int K     = num_digits(N),
  localparam int ENC_W = enc_width(N)
) (
  input  logic [N-1:0]     b,
  output logic [ENC_W-1:0] enc
);

  logic [3*K-1:0] bx;
  logic [K-1:0]   c;      // c[j] is the carry into digit j
  pp_sel_t        msb_sel;

  assign bx   = {{(3*K-N){b[N-1]}}, b};
  assign c[0] = 1'b0;

  for (genvar j = 0; j < K - 1; j++) begin : g_digit
    nr8sd_digit_enc #(.FORM(FORM)) u_cell (
      .b    (bx[3*j +: 3]),
      .c_in (c[j]),
      .n    (enc[3*j +: 3]),
      .c_out(c[j+1])
    );
  end

  booth8_msb_enc u_msb (
    .b   (bx[3*K-1 -: 3]),
    .c_in(c[K-1]),
    .sel (msb_sel)
  );

  assign enc[ENC_W-1 -: MSB_BITS] = msb_sel;

endmodule
