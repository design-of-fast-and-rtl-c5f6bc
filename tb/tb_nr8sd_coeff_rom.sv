// tb_nr8sd_coeff_rom: self-checking test of nr8sd_coeff_rom.
// A default ROM (N = 24, 16 entries, NR8SD_PLUS) and a small NR8SD_MINUS ROM
// (N = 10, 8 entries) are read at every address in random order. Each read
// must show, one clock after the address, the encoded form of the entry of
// the default coefficient set, and the output must hold while en is low.
module tb_nr8sd_coeff_rom;
  import nr8sd_pkg::*;
  import nr8sd_ref_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  localparam int EW_A = enc_width(24);
  localparam int EW_B = enc_width(10);

  logic            en;
  logic [3:0]      addr_a;
  logic [2:0]      addr_b;
  logic [EW_A-1:0] q_a;
  logic [EW_B-1:0] q_b;

  nr8sd_coeff_rom dut_a (.clk(clk), .en(en), .addr(addr_a), .enc_q(q_a));
  nr8sd_coeff_rom #(.N(10), .DEPTH(8), .FORM(NR8SD_MINUS)) dut_b (
    .clk(clk), .en(en), .addr(addr_b), .enc_q(q_b));

  initial begin
    logic [EW_A-1:0] held_a;
    en = 1'b0; addr_a = '0; addr_b = '0;
    @(negedge clk);
    for (int t = 0; t < 200; t++) begin
      addr_a = 4'(t < 16 ? t : $urandom);
      addr_b = 3'(t < 8 ? t : $urandom);
      en = 1'b1;
      @(posedge clk);
      #1;
      checks += 2;
      if (enc_value(128'(q_a), 24, NR8SD_PLUS) != coef(int'(addr_a), 24)) begin
        failures++;
        $display("FAIL rom a[%0d] = %0d expected %0d", addr_a,
                 enc_value(128'(q_a), 24, NR8SD_PLUS), coef(int'(addr_a), 24));
      end
      if (enc_value(128'(q_b), 10, NR8SD_MINUS) != coef(int'(addr_b), 10)) begin
        failures++;
        $display("FAIL rom b[%0d] = %0d expected %0d", addr_b,
                 enc_value(128'(q_b), 10, NR8SD_MINUS), coef(int'(addr_b), 10));
      end
      // hold: with en low a new address must not change the output
      held_a = q_a;
      en = 1'b0;
      addr_a = addr_a + 4'd1;
      @(posedge clk);
      #1;
      checks++;
      if (q_a !== held_a) begin failures++; $display("FAIL rom output changed with en low"); end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
