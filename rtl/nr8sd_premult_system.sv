// nr8sd_premult_system: coefficient ROM plus pre-encoded NR8SD multiplier,
// computing P = A * B(coef_addr) for a stream of operands.
//
// Coefficients live in nr8sd_coeff_rom already NR8SD-encoded, so no encoder
// sits between ROM and multiplier. Each clock one operand a and one ROM
// address may be accepted (in_valid); the product of that pair appears on p
// with out_valid exactly two clocks later:
//   clock 1: ROM read and register of a (stage 1)
//   clock 2: decoders, partial products, CSA tree and CLA adder, then the
//            product register (stage 2)
// One product per clock, with no stalls. rst_n is an active-low synchronous
// reset of the valid bits and the operand/product registers.
// The ROM-fed, one-coefficient-per-clock organisation and the datapath are the
// document's; the two register stages, the valid
// signals and the reset are this design's.
module nr8sd_premult_system
  import nr8sd_pkg::*;
#(
  parameter int          N      = 24,
  parameter int          DEPTH  = 16,
  parameter nr8sd_form_e FORM   = NR8SD_PLUS,
  parameter coef_table_t COEFFS = default_coeffs(N),
  localparam int AW    = (DEPTH > 1) ? $clog2(DEPTH) : 1,
  localparam int ENC_W = enc_width(N)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            in_valid,
  input  logic [N-1:0]    a,
  input  logic [AW-1:0]   coef_addr,
  output logic            out_valid,
  output logic [2*N-1:0]  p
);

  logic [ENC_W-1:0] enc_q;
  logic [N-1:0]     a_q;
  logic             v_q;
  logic [2*N-1:0]   p_d;

  nr8sd_coeff_rom #(
    .N(N), .DEPTH(DEPTH), .FORM(FORM), .COEFFS(COEFFS)
  ) u_rom (
    .clk  (clk),
    .en   (in_valid),
    .addr (coef_addr),
    .enc_q(enc_q)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      a_q <= '0;
      v_q <= 1'b0;
    end else begin
      v_q <= in_valid;
      if (in_valid) a_q <= a;
    end
  end

  nr8sd_multiplier #(.N(N), .FORM(FORM)) u_mult (
    .a  (a_q),
    .enc(enc_q),
    .p  (p_d)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      p         <= '0;
    end else begin
      out_valid <= v_q;
      if (v_q) p <= p_d;
    end
  end

endmodule
