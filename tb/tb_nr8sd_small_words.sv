// tb_nr8sd_small_words: exhaustive 8x8 and 4x4 multiplication through the
// full system (ROM + pre-encoded NR8SD multiplier), the operand sizes of the
// reference FPGA results of this multiplier family.
//
// N = 8: four systems of 64 coefficients together hold all 256 coefficient
// values; every multiplicand is multiplied by every coefficient (65536
// products), the four systems running in parallel with in_valid high every
// clock. N = 4: one system of 16 coefficients, all 256 products. Both forms
// are used (NR8SD_PLUS for N = 8, NR8SD_MINUS for N = 4). Each product must
// appear two clocks after its operands and equal the signed '*'.
module tb_nr8sd_small_words;
  import nr8sd_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  // Table q of the N = 8 systems holds coefficients 64*q .. 64*q+63.
  function automatic coef_table_t slice_table(int q);
    coef_table_t t = '0;
    for (int e = 0; e < 64; e++) t[e] = 64'(64 * q + e);
    return t;
  endfunction

  function automatic coef_table_t all4_table();
    coef_table_t t = '0;
    for (int e = 0; e < 16; e++) t[e] = 64'(e);
    return t;
  endfunction

  logic       rst_n, vin;
  logic [7:0] a8;
  logic [5:0] addr8;
  logic [3:0] a4, addr4;
  logic [3:0] v8;
  logic [15:0] p8 [4];
  logic       v4;
  logic [7:0] p4;

  for (genvar q = 0; q < 4; q++) begin : g_sys8
    nr8sd_premult_system #(.N(8), .DEPTH(64), .FORM(NR8SD_PLUS), .COEFFS(slice_table(q))) dut (
      .clk(clk), .rst_n(rst_n), .in_valid(vin), .a(a8), .coef_addr(addr8),
      .out_valid(v8[q]), .p(p8[q]));
  end

  nr8sd_premult_system #(.N(4), .DEPTH(16), .FORM(NR8SD_MINUS), .COEFFS(all4_table())) dut4 (
    .clk(clk), .rst_n(rst_n), .in_valid(vin), .a(a4), .coef_addr(addr4),
    .out_valid(v4), .p(p4));

  // operands offered one clock before the edge being checked; the product
  // registered at that edge is theirs (two edges after they were driven)
  logic [7:0] a8_d [1];
  logic [5:0] addr8_d [1];
  logic [3:0] a4_d [1], addr4_d [1];
  logic       vin_d [1];

  initial begin
    rst_n = 1'b0; vin = 1'b0; a8 = '0; addr8 = '0; a4 = '0; addr4 = '0;
    for (int i = 0; i < 1; i++) begin vin_d[i] = 0; a8_d[i] = '0; addr8_d[i] = '0; a4_d[i] = '0; addr4_d[i] = '0; end
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 65536 + 2; t++) begin
      vin   = (t < 65536);
      a8    = 8'(t);
      addr8 = 6'(t >> 8);
      a4    = 4'(t);
      addr4 = 4'(t >> 4);
      @(posedge clk);
      #1;
      checks++;
      if (v8 !== {4{vin_d[0]}} || v4 !== vin_d[0]) begin
        failures++;
        $display("FAIL valid timing at %0d", t);
      end
      if (vin_d[0]) begin
        for (int q = 0; q < 4; q++) begin
          checks++;
          if ($signed(p8[q]) !== 16'($signed(a8_d[0]) * $signed(8'(64 * q + int'(addr8_d[0]))))) begin
            failures++;
            if (failures < 10) $display("FAIL 8x8 %0d * %0d = %0d", $signed(a8_d[0]),
                                        $signed(8'(64 * q + int'(addr8_d[0]))), $signed(p8[q]));
          end
        end
        if (t < 256 + 2) begin
          checks++;
          if ($signed(p4) !== 8'($signed(a4_d[0]) * $signed(addr4_d[0]))) begin
            failures++;
            if (failures < 10) $display("FAIL 4x4 %0d * %0d = %0d", $signed(a4_d[0]), $signed(addr4_d[0]), $signed(p4));
          end
        end
      end
      vin_d[0] = vin;        a8_d[0] = a8;        addr8_d[0] = addr8;
      a4_d[0]  = a4;         addr4_d[0] = addr4;
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (70000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
