// tb_nr8sd_multiplier: self-checking test of nr8sd_multiplier.
// Both forms at N = 24 with random and extreme operands, and both forms at
// N = 8 over every pair of operands. The coefficient is encoded by
// nr8sd_encoder; the product must equal the simulator's signed '*'.
module tb_nr8sd_multiplier;
  import nr8sd_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic [23:0] a24, b24;
  logic [7:0]  a8, b8;
  logic [enc_width(24)-1:0] e24m, e24p;
  logic [enc_width(8)-1:0]  e8m, e8p;
  logic [47:0] p24m, p24p;
  logic [15:0] p8m, p8p;

  nr8sd_encoder #(.N(24), .FORM(NR8SD_MINUS)) enc24m (.b(b24), .enc(e24m));
  nr8sd_encoder #(.N(24), .FORM(NR8SD_PLUS))  enc24p (.b(b24), .enc(e24p));
  nr8sd_encoder #(.N(8),  .FORM(NR8SD_MINUS)) enc8m  (.b(b8),  .enc(e8m));
  nr8sd_encoder #(.N(8),  .FORM(NR8SD_PLUS))  enc8p  (.b(b8),  .enc(e8p));

  nr8sd_multiplier #(.N(24), .FORM(NR8SD_MINUS)) dut24m (.a(a24), .enc(e24m), .p(p24m));
  nr8sd_multiplier #(.N(24), .FORM(NR8SD_PLUS))  dut24p (.a(a24), .enc(e24p), .p(p24p));
  nr8sd_multiplier #(.N(8),  .FORM(NR8SD_MINUS)) dut8m  (.a(a8),  .enc(e8m),  .p(p8m));
  nr8sd_multiplier #(.N(8),  .FORM(NR8SD_PLUS))  dut8p  (.a(a8),  .enc(e8p),  .p(p8p));

  function automatic logic [23:0] pick(int t, int which);
    case ((t + which) % 8)
      0: return 24'h80_0000;
      1: return 24'h7F_FFFF;
      2: return '1;
      3: return '0;
      default: return 24'($urandom);
    endcase
  endfunction

  initial begin
    logic [47:0] exp24;
    logic [15:0] exp8;
    for (int t = 0; t < 8000; t++) begin
      if (t < 64) begin a24 = pick(t / 8, 0); b24 = pick(t, 3); end
      else        begin a24 = 24'($urandom); b24 = 24'($urandom); end
      #1;
      exp24 = 48'($signed(a24) * $signed(b24));
      checks += 2;
      if (p24m !== exp24) begin
        failures++;
        if (failures < 10) $display("FAIL minus %0d * %0d = %0d", $signed(a24), $signed(b24), $signed(p24m));
      end
      if (p24p !== exp24) begin
        failures++;
        if (failures < 10) $display("FAIL plus %0d * %0d = %0d", $signed(a24), $signed(b24), $signed(p24p));
      end
    end
    for (int x = 0; x < 256; x++)
      for (int y = 0; y < 256; y++) begin
        a8 = 8'(x); b8 = 8'(y);
        #1;
        exp8 = 16'($signed(a8) * $signed(b8));
        checks += 2;
        if (p8m !== exp8 || p8p !== exp8) begin
          failures++;
          if (failures < 10) $display("FAIL 8-bit %0d * %0d = %0d / %0d", $signed(a8), $signed(b8),
                                      $signed(p8m), $signed(p8p));
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
