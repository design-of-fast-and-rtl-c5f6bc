// nr8sd_multiplier: pre-encoded NR8SD multiplier datapath, P = A * B.
//
// Inputs are the N-bit two's complement multiplicand a and the coefficient B
// already in NR8SD form (enc, layout in nr8sd_pkg). Output p is the 2N-bit
// two's complement product. Purely combinational; the path is
//   digit decoders -> partial-product generators -> CSA tree -> CLA adder.
//
// 1. Digits 0 .. K-2 (3 stored bits each) pass through nr8sd_digit_dec; the
//    top digit is stored as Booth selects and is used as is.
// 2. triple_gen forms 3*A once; K nr8sd_ppg units form rows pp_j (W = N+2
//    bits) and input carries cin_j with pp_j + cin_j = digit_j * A.
// 3. Sign extension is avoided: the top bit of each row is inverted and the
//    correction constant COR = -sum_j 2^(W-1) * 8^j (mod 2^2N) is added, as
//    the published scheme does for its radix-4 multipliers. The cin_j bits never
//    share a column (weights 8^j), so they form one row.
// 4. The K rows, the cin row and COR (K+2 rows) go to csa_tree; the sum and
//    carry rows are merged by cla_adder.
// For N = 24 there are K = 8 partial products (the published scheme's example).
module nr8sd_multiplier
  import nr8sd_pkg::*;
#(
  parameter int          N    = 24,
  parameter nr8sd_form_e FORM = NR8SD_PLUS,
  localparam int K     = num_digits(N),
  localparam int ENC_W = enc_width(N),
  localparam int PW    = 2 * N
) (
  input  logic [N-1:0]     a,
  input  logic [ENC_W-1:0] enc,
  output logic [PW-1:0]    p
);

  localparam int W    = N + 2;
  localparam int ROWS = K + 2;

  function automatic logic [PW-1:0] correction();
    logic [PW-1:0] cor = '0;
    for (int j = 0; j < K; j++) cor -= PW'(1) << (3 * j + W - 1);
    return cor;
  endfunction

  localparam logic [PW-1:0] COR = correction();

  pp_sel_t          sel [K];
  logic [W-1:0]     pp  [K];
  logic [K-1:0]     cin;
  logic [W-1:0]     a3;
  logic [PW-1:0]    rows [ROWS];
  logic [PW-1:0]    cin_row;
  logic [PW-1:0]    sum_row, carry_row;

  triple_gen #(.N(N)) u_triple (
    .a (a),
    .a3(a3)
  );

  for (genvar j = 0; j < K; j++) begin : g_pp
    if (j < K - 1) begin : g_nr
      nr8sd_digit_dec #(.FORM(FORM)) u_dec (
        .n  (enc[3*j +: 3]),
        .sel(sel[j])
      );
    end else begin : g_msb
      assign sel[j] = enc[ENC_W-1 -: MSB_BITS];
    end

    nr8sd_ppg #(.N(N)) u_ppg (
      .a  (a),
      .a3 (a3),
      .sel(sel[j]),
      .pp (pp[j]),
      .cin(cin[j])
    );

    assign rows[j] = PW'({~pp[j][W-1], pp[j][W-2:0]}) << (3 * j);
  end

  always_comb begin
    cin_row = '0;
    for (int j = 0; j < K; j++) cin_row[3*j] = cin[j];
  end

  assign rows[K]   = cin_row;
  assign rows[K+1] = COR;

  csa_tree #(.W(PW), .ROWS(ROWS)) u_tree (
    .rows (rows),
    .sum  (sum_row),
    .carry(carry_row)
  );

  cla_adder #(.W(PW)) u_cla (
    .a   (sum_row),
    .b   (carry_row),
    .cin (1'b0),
    .sum (p),
    .cout()
  );

endmodule
