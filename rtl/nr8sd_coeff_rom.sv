// nr8sd_coeff_rom: ROM of pre-encoded coefficients.
//
// Holds DEPTH coefficients already in NR8SD form (layout in nr8sd_pkg), so
// the multiplier needs no encoder in its datapath. The table is built at
// elaboration: each two's complement entry of COEFFS (low N bits used) is fed
// to an nr8sd_encoder on constant inputs, which synthesis reduces to
// constants. The read is synchronous: when en is high, enc_q shows the entry
// at addr one clock later, so the ROM delivers one coefficient per clock.
// enc_q has no reset; it holds its value while en is low.
// Storing encoded coefficients, three bits per digit, and one coefficient per
// clock follow the published scheme. DEPTH and the default coefficient set are this
// design's (the published scheme gives neither).
module nr8sd_coeff_rom
  import nr8sd_pkg::*;
#(
  parameter int          N      = 24,
  parameter int          DEPTH  = 16,
  parameter nr8sd_form_e FORM   = NR8SD_PLUS,
  parameter coef_table_t COEFFS = default_coeffs(N),
  localparam int AW    = (DEPTH > 1) ? $clog2(DEPTH) : 1,
  localparam int ENC_W = enc_width(N)
) (
  input  logic             clk,
  input  logic             en,
  input  logic [AW-1:0]    addr,
  output logic [ENC_W-1:0] enc_q
);

  initial begin
    assert (N >= 3 && N <= COEF_MAX_W) else $error("N out of range");
    assert (DEPTH >= 2 && DEPTH <= COEF_MAX_DEPTH) else $error("DEPTH out of range");
  end

  logic [ENC_W-1:0] table_q [DEPTH];

  for (genvar e = 0; e < DEPTH; e++) begin : g_entry
    nr8sd_encoder #(.N(N), .FORM(FORM)) u_enc (
      .b  (COEFFS[e][N-1:0]),
      .enc(table_q[e])
    );
  end

  always_ff @(posedge clk) begin
    if (en) enc_q <= table_q[addr];
  end

endmodule
