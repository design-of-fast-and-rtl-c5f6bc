// tb_nr8sd_encoder: self-checking test of nr8sd_encoder.
// Four instances: both forms at N = 24 (a multiple of three) and at N = 8
// (top digit built from sign extension). For random and extreme inputs the
// encoded word must stand for the input value, every stored digit must lie in
// the form's digit set and agree with the arithmetic digit rule, and the top
// digit's select must be one-hot with no sign on zero.
module tb_nr8sd_encoder;
  import nr8sd_pkg::*;
  import nr8sd_ref_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic [23:0] b24;
  logic [7:0]  b8;
  logic [enc_width(24)-1:0] e24m, e24p;
  logic [enc_width(8)-1:0]  e8m, e8p;

  nr8sd_encoder #(.N(24), .FORM(NR8SD_MINUS)) dut24m (.b(b24), .enc(e24m));
  nr8sd_encoder #(.N(24), .FORM(NR8SD_PLUS))  dut24p (.b(b24), .enc(e24p));
  nr8sd_encoder #(.N(8),  .FORM(NR8SD_MINUS)) dut8m  (.b(b8),  .enc(e8m));
  nr8sd_encoder #(.N(8),  .FORM(NR8SD_PLUS))  dut8p  (.b(b8),  .enc(e8p));

  task automatic check_word(logic [127:0] enc, logic [63:0] b, int n, nr8sd_form_e form);
    int k = (n + 2) / 3;
    int ew = 3 * (k - 1) + 5;
    int d [32];
    longint bv;
    pp_sel_t s;
    bit ok = 1;
    bv = 0;
    for (int i = 0; i < 64; i++) bv[i] = (i < n) ? b[i] : b[n-1];
    ref_digits(b, n, form, d);
    if (enc_value(enc, n, form) != bv) ok = 0;
    for (int j = 0; j < k - 1; j++)
      if (stored_digit(enc[3*j +: 3], form) != d[j]) ok = 0;
    s = pp_sel_t'(enc[ew-1 -: 5]);
    if (sel_digit(s) != d[k-1]) ok = 0;
    if ((int'(s.x1) + int'(s.x2) + int'(s.x3) + int'(s.x4)) > 1) ok = 0;
    if (s.neg && !(s.x1 | s.x2 | s.x3 | s.x4)) ok = 0;
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10)
        $display("FAIL n=%0d form=%s b=%0d enc=%h decodes to %0d", n, form.name(), bv, enc,
                 enc_value(enc, n, form));
    end
  endtask

  initial begin
    for (int t = 0; t < 3000; t++) begin
      case (t)
        0: b24 = 24'h80_0000;
        1: b24 = 24'h7F_FFFF;
        2: b24 = '1;
        3: b24 = '0;
        4: b24 = 24'h77_7777;
        5: b24 = 24'h44_4444;
        default: b24 = 24'($urandom);
      endcase
      #1;
      check_word(128'(e24m), 64'(b24), 24, NR8SD_MINUS);
      check_word(128'(e24p), 64'(b24), 24, NR8SD_PLUS);
    end
    for (int v = 0; v < 256; v++) begin
      b8 = 8'(v);
      #1;
      check_word(128'(e8m), 64'(b8), 8, NR8SD_MINUS);
      check_word(128'(e8p), 64'(b8), 8, NR8SD_PLUS);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
