// tb_nr8sd_premult_minus: end-to-end test of the pre-encoded NR8SD
// multiplier system in its other form, NR8SD_MINUS (digits -4..+3), at
// N = 24 with 16 coefficients; otherwise the same as tb_nr8sd_premult_system.
//
// A stream of 3000 cycles offers random multiplicands (with the extremes
// mixed in) against random ROM addresses, with in_valid high about 80% of the
// time, so both back-to-back products and gaps occur. Every cycle the test
// checks that out_valid equals in_valid of two clocks before and, when set,
// that p equals a * coefficient computed with '*'. It also counts how often
// each mechanism of the datapath was used: every digit value of the form in
// the low digits, every magnitude and both signs in the top digit, negated rows
// (input carries), the 3A multiple, and back-to-back issue at one product
// per clock. A mechanism that never occurs counts as a failure.
module tb_nr8sd_premult_minus;
  import nr8sd_pkg::*;
  import nr8sd_ref_pkg::*;

  localparam int          N     = 24;
  localparam int          DEPTH = 16;
  localparam nr8sd_form_e FORM  = NR8SD_MINUS;
  localparam int          K     = (N + 2) / 3;
  localparam int          CYCLES = 3000;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic            rst_n, in_valid, out_valid;
  logic [N-1:0]    a;
  logic [3:0]      coef_addr;
  logic [2*N-1:0]  p;

  nr8sd_premult_system #(.FORM(NR8SD_MINUS)) dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .a(a), .coef_addr(coef_addr),
    .out_valid(out_valid), .p(p)
  );

  logic           hist_v [CYCLES + 4];
  logic [2*N-1:0] hist_p [CYCLES + 4];

  int low_digit_seen [-4:4];
  int msb_digit_seen [-4:4];
  int neg_rows = 0, triple_rows = 0, back_to_back = 0, gaps = 0, products = 0;

  task automatic count_digits(logic [N-1:0] b);
    int d [32];
    ref_digits(64'(b), N, FORM, d);
    for (int j = 0; j < K - 1; j++) low_digit_seen[d[j]]++;
    msb_digit_seen[d[K-1]]++;
    for (int j = 0; j < K; j++) begin
      if (d[j] < 0) neg_rows++;
      if (d[j] == 3 || d[j] == -3) triple_rows++;
    end
  endtask

  initial begin
    logic [N-1:0] b;
    bit prev_valid = 0;
    bit in_set;
    int tneg, tpos;
    for (int d = -4; d <= 4; d++) begin low_digit_seen[d] = 0; msb_digit_seen[d] = 0; end
    rst_n = 1'b0; in_valid = 1'b0; a = '0; coef_addr = '0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    checks++;
    if (out_valid !== 1'b0) begin failures++; $display("FAIL out_valid set after reset"); end
    for (int t = 0; t < CYCLES; t++) begin
      // drive at the falling edge
      in_valid  = ($urandom % 10) < 8;
      coef_addr = 4'($urandom);
      case ($urandom % 8)
        0: a = {1'b1, {(N-1){1'b0}}};
        1: a = {1'b0, {(N-1){1'b1}}};
        2: a = '1;
        default: a = N'($urandom);
      endcase
      hist_v[t] = in_valid;
      b = N'(coef(int'(coef_addr), N));
      hist_p[t] = (2*N)'($signed(a) * $signed(b));
      if (in_valid) begin
        count_digits(b);
        products++;
        if (prev_valid) back_to_back++;
      end else gaps++;
      prev_valid = in_valid;
      @(posedge clk);
      #1;
      // the result of the operation offered two edges ago
      if (t >= 2) begin
        checks++;
        if (out_valid !== hist_v[t-1]) begin
          failures++;
          $display("FAIL cycle %0d: out_valid=%0d expected %0d", t, out_valid, hist_v[t-1]);
        end else if (out_valid) begin
          checks++;
          if (p !== hist_p[t-1]) begin
            failures++;
            if (failures < 10) $display("FAIL cycle %0d: p=%0d expected %0d", t, $signed(p), $signed(hist_p[t-1]));
          end
        end
      end
      @(negedge clk);
    end

    for (int d = -4; d <= 4; d++) begin
      in_set = (FORM == NR8SD_PLUS) ? (d >= -3) : (d <= 3);
      checks++;
      if (in_set && low_digit_seen[d] == 0) begin failures++; $display("FAIL low digit %0d never used", d); end
    end
    // top digit: every magnitude and both signs (which values occur depends
    // on the coefficient set)
    for (int m = 1; m <= 4; m++) begin
      checks++;
      if (msb_digit_seen[m] + msb_digit_seen[-m] == 0) begin
        failures++; $display("FAIL top digit magnitude %0d never used", m);
      end
    end
    checks += 2;
    tneg = 0; tpos = 0;
    for (int d = 1; d <= 4; d++) begin tneg += msb_digit_seen[-d]; tpos += msb_digit_seen[d]; end
    if (tneg == 0) begin failures++; $display("FAIL no negative top digit"); end
    if (tpos == 0) begin failures++; $display("FAIL no positive top digit"); end
    checks += 3;
    if (neg_rows == 0)     begin failures++; $display("FAIL no negated partial product"); end
    if (triple_rows == 0)  begin failures++; $display("FAIL 3A never selected"); end
    if (back_to_back == 0) begin failures++; $display("FAIL no back-to-back products"); end
    $display("products=%0d back_to_back=%0d gaps=%0d negated_rows=%0d triple_rows=%0d",
             products, back_to_back, gaps, neg_rows, triple_rows);
    for (int d = -4; d <= 4; d++)
      $display("digit %0d: low %0d top %0d", d, low_digit_seen[d], msb_digit_seen[d]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (CYCLES * 3) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
