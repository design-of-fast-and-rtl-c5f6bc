// tb_nr8sd_ppg: self-checking test of nr8sd_ppg at N = 24.
// For random and extreme multiplicands and every digit -4..+4 the row plus
// its input carry must equal digit * A as an N+2 bit two's complement value.
// 3*A is supplied by the test itself.
module tb_nr8sd_ppg;
  import nr8sd_pkg::*;
  localparam int N = 24;
  localparam int W = N + 2;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic [N-1:0] a;
  logic [W-1:0] a3, pp;
  logic         cin;
  pp_sel_t      sel;

  nr8sd_ppg #(.N(N)) dut (.a(a), .a3(a3), .sel(sel), .pp(pp), .cin(cin));

  initial begin
    int m;
    for (int t = 0; t < 1500; t++) begin
      case (t)
        0: a = {1'b1, {(N-1){1'b0}}};
        1: a = {1'b0, {(N-1){1'b1}}};
        2: a = '1;
        3: a = '0;
        default: a = N'($urandom);
      endcase
      a3 = W'(3 * $signed(a));
      for (int d = -4; d <= 4; d++) begin
        m = (d < 0) ? -d : d;
        sel = '0;
        sel.neg = (d < 0);
        sel.x1 = (m == 1); sel.x2 = (m == 2); sel.x3 = (m == 3); sel.x4 = (m == 4);
        #1;
        checks++;
        if (W'(pp + W'(cin)) !== W'(d * $signed(a))) begin
          failures++;
          if (failures < 10) $display("FAIL a=%0d d=%0d pp=%h cin=%0d", $signed(a), d, pp, cin);
        end
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
