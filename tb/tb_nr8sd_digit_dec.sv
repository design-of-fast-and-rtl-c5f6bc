// tb_nr8sd_digit_dec: exhaustive test of nr8sd_digit_dec in both forms.
// For every stored digit {n2,n1,n0} the select must be one-hot (or empty for
// zero), the sign must be clear for zero, and sign * magnitude must equal
//   NR8SD_MINUS: -4*n2 + 2*n1 + n0      NR8SD_PLUS: 4*n2 - 2*n1 - n0
module tb_nr8sd_digit_dec;
  import nr8sd_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic [2:0] n;
  pp_sel_t    sel_m, sel_p;

  nr8sd_digit_dec #(.FORM(NR8SD_MINUS)) dut_m (.n(n), .sel(sel_m));
  nr8sd_digit_dec #(.FORM(NR8SD_PLUS))  dut_p (.n(n), .sel(sel_p));

  function automatic int sel_value(pp_sel_t s);
    int m = int'(s.x1) + 2 * int'(s.x2) + 3 * int'(s.x3) + 4 * int'(s.x4);
    return s.neg ? -m : m;
  endfunction

  function automatic bit sel_ok(pp_sel_t s);
    int hot = int'(s.x1) + int'(s.x2) + int'(s.x3) + int'(s.x4);
    return (hot <= 1) && !(hot == 0 && s.neg);
  endfunction

  initial begin
    int em, ep;
    for (int rep = 0; rep < 4; rep++)
      for (int v = 0; v < 8; v++) begin
        n = 3'(v);
        #1;
        em = -4 * int'(n[2]) + 2 * int'(n[1]) + int'(n[0]);
        ep =  4 * int'(n[2]) - 2 * int'(n[1]) - int'(n[0]);
        checks += 2;
        if (!sel_ok(sel_m) || sel_value(sel_m) != em) begin
          failures++;
          $display("FAIL minus n=%b sel=%b expected %0d", n, sel_m, em);
        end
        if (!sel_ok(sel_p) || sel_value(sel_p) != ep) begin
          failures++;
          $display("FAIL plus n=%b sel=%b expected %0d", n, sel_p, ep);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
