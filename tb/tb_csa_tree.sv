// tb_csa_tree: self-checking test of csa_tree.
// Instances with 10, 7, 3 and 2 rows get random rows; for each, sum + carry
// must equal the arithmetic sum of all rows modulo 2^W.
module tb_csa_tree;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic [47:0] r10 [10];
  logic [47:0] s10, c10;
  logic [15:0] r7 [7];
  logic [15:0] s7, c7;
  logic [15:0] r3 [3];
  logic [15:0] s3, c3;
  logic [15:0] r2 [2];
  logic [15:0] s2, c2;

  csa_tree #(.W(48), .ROWS(10)) dut10 (.rows(r10), .sum(s10), .carry(c10));
  csa_tree #(.W(16), .ROWS(7))  dut7  (.rows(r7),  .sum(s7),  .carry(c7));
  csa_tree #(.W(16), .ROWS(3))  dut3  (.rows(r3),  .sum(s3),  .carry(c3));
  csa_tree #(.W(16), .ROWS(2))  dut2  (.rows(r2),  .sum(s2),  .carry(c2));

  initial begin
    logic [47:0] e48;
    logic [15:0] e7, e3, e2;
    for (int t = 0; t < 4000; t++) begin
      e48 = '0; e7 = '0; e3 = '0; e2 = '0;
      for (int i = 0; i < 10; i++) begin
        r10[i] = (t == 0) ? '1 : {$urandom, $urandom};
        e48 += r10[i];
      end
      for (int i = 0; i < 7; i++) begin r7[i] = (t == 0) ? '1 : 16'($urandom); e7 += r7[i]; end
      for (int i = 0; i < 3; i++) begin r3[i] = 16'($urandom); e3 += r3[i]; end
      for (int i = 0; i < 2; i++) begin r2[i] = 16'($urandom); e2 += r2[i]; end
      #1;
      checks += 4;
      if (48'(s10 + c10) !== e48) begin failures++; $display("FAIL 10 rows: %h vs %h", s10 + c10, e48); end
      if (16'(s7 + c7) !== e7)    begin failures++; $display("FAIL 7 rows"); end
      if (16'(s3 + c3) !== e3)    begin failures++; $display("FAIL 3 rows"); end
      if (16'(s2 + c2) !== e2)    begin failures++; $display("FAIL 2 rows"); end
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
