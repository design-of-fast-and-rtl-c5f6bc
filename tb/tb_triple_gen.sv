// tb_triple_gen: self-checking test of triple_gen.
// N = 24 with random and extreme multiplicands, N = 6 exhaustively; the
// output must equal 3*A as an N+2 bit two's complement number.
module tb_triple_gen;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic [23:0] a24;
  logic [25:0] y24;
  logic [5:0]  a6;
  logic [7:0]  y6;

  triple_gen #(.N(24)) dut24 (.a(a24), .a3(y24));
  triple_gen #(.N(6))  dut6  (.a(a6),  .a3(y6));

  initial begin
    for (int t = 0; t < 3000; t++) begin
      case (t)
        0: a24 = 24'h80_0000;
        1: a24 = 24'h7F_FFFF;
        2: a24 = '1;
        default: a24 = 24'($urandom);
      endcase
      #1;
      checks++;
      if ($signed(y24) !== 26'(3 * $signed(a24))) begin
        failures++;
        $display("FAIL: 3 * %0d gave %0d", $signed(a24), $signed(y24));
      end
    end
    for (int v = -32; v < 32; v++) begin
      a6 = 6'(v);
      #1;
      checks++;
      if ($signed(y6) !== 8'(3 * v)) begin
        failures++;
        $display("FAIL: 3 * %0d gave %0d", v, $signed(y6));
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
