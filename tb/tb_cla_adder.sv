// tb_cla_adder: self-checking test of cla_adder.
// A 48-bit instance gets random operands, carries and the corner values; a
// 7-bit instance is checked exhaustively over a, b and cin. The expected sum
// is the simulator's own '+'.
module tb_cla_adder;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic [47:0] a48, b48, s48;
  logic        ci48, co48;
  logic [6:0]  a7, b7, s7;
  logic        ci7, co7;

  cla_adder #(.W(48)) dut48 (.a(a48), .b(b48), .cin(ci48), .sum(s48), .cout(co48));
  cla_adder #(.W(7))  dut7  (.a(a7),  .b(b7),  .cin(ci7),  .sum(s7),  .cout(co7));

  task automatic check48(logic [47:0] x, logic [47:0] y, logic c);
    logic [48:0] exp;
    a48 = x; b48 = y; ci48 = c;
    #1;
    exp = {1'b0, x} + {1'b0, y} + 49'(c);
    checks++;
    if ({co48, s48} !== exp) begin
      failures++;
      $display("FAIL 48: %h + %h + %0d = %h, expected %h", x, y, c, {co48, s48}, exp);
    end
  endtask

  initial begin
    check48('0, '0, 1'b0);
    check48('1, 48'd1, 1'b0);
    check48('1, '0, 1'b1);
    check48('1, '1, 1'b1);
    check48(48'h8000_0000_0000, 48'h8000_0000_0000, 1'b0);
    for (int i = 0; i < 5000; i++)
      check48({$urandom, $urandom}, {$urandom, $urandom}, 1'($urandom));
    for (int x = 0; x < 128; x++)
      for (int y = 0; y < 128; y++)
        for (int c = 0; c < 2; c++) begin
          a7 = 7'(x); b7 = 7'(y); ci7 = 1'(c);
          #1;
          checks++;
          if ({co7, s7} !== 8'(x + y + c)) begin
            failures++;
            if (failures < 10) $display("FAIL 7: %0d + %0d + %0d = %0d", x, y, c, {co7, s7});
          end
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
