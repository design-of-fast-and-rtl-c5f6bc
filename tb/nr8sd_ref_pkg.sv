// nr8sd_ref_pkg: reference arithmetic for the testbenches, written apart
// from the RTL. enc_value() returns the number an encoded coefficient word
// stands for: sum over digits of digit_j * 8^j, with the digit read from its
// three stored bits by the form's weights and the top digit from its Booth
// select signals. ref_digits() finds the digits of a coefficient by the
// plain arithmetic rule digit = (group + carry) - 8 * carry_out, carry_out
// set when group + carry exceeds the form's largest digit. coef() gives
// the default coefficient set of the ROM.
package nr8sd_ref_pkg;
  import nr8sd_pkg::*;

  function automatic int stored_digit(logic [2:0] n, nr8sd_form_e form);
    if (form == NR8SD_MINUS) return -4 * int'(n[2]) + 2 * int'(n[1]) + int'(n[0]);
    else                     return  4 * int'(n[2]) - 2 * int'(n[1]) - int'(n[0]);
  endfunction

  function automatic int sel_digit(pp_sel_t s);
    int m = int'(s.x1) + 2 * int'(s.x2) + 3 * int'(s.x3) + 4 * int'(s.x4);
    return s.neg ? -m : m;
  endfunction

  // Valid for encoded words of up to 128 bits (N up to 84).
  function automatic longint enc_value(logic [127:0] enc, int n, nr8sd_form_e form);
    int k = (n + 2) / 3;
    int ew = 3 * (k - 1) + 5;
    longint v = 0;
    pp_sel_t s;
    for (int j = 0; j < k - 1; j++)
      v += longint'(stored_digit(enc[3*j +: 3], form)) <<< (3 * j);
    s = pp_sel_t'(enc[ew-1 -: 5]);
    v += longint'(sel_digit(s)) <<< (3 * (k - 1));
    return v;
  endfunction

  // Digits of the sign-extended coefficient b (n bits, value in b[n-1:0]).
  // d[j] for j < k-1 are NR8SD digits, d[k-1] the Booth top digit.
  function automatic void ref_digits(logic [63:0] b, int n, nr8sd_form_e form,
                                     output int d [32]);
    int k = (n + 2) / 3;
    int c = 0;
    int g, hi;
    logic [95:0] bx;
    for (int i = 0; i < 96; i++) bx[i] = (i < n) ? b[i] : b[n-1];
    hi = (form == NR8SD_MINUS) ? 3 : 4;
    for (int j = 0; j < 32; j++) d[j] = 0;
    for (int j = 0; j < k - 1; j++) begin
      g = int'(bx[3*j +: 3]) + c;
      c = (g > hi) ? 1 : 0;
      d[j] = g - 8 * c;
    end
    d[k-1] = -4 * int'(bx[3*k-1]) + 2 * int'(bx[3*k-2]) + int'(bx[3*k-3]) + c;
  endfunction

  // Entry e of the default coefficient set, sign-extended from n bits:
  // 0, -2^(n-1), 2^(n-1)-1, -1, then the top n bits of e * 0x9E3779B97F4A7C15.
  function automatic longint coef(int e, int n);
    logic [63:0] h;
    longint v;
    case (e)
      0: h = '0;
      1: h = 64'd1 << (n - 1);
      2: h = (64'd1 << (n - 1)) - 1;
      3: h = '1;
      default: h = (64'(e) * 64'h9E37_79B9_7F4A_7C15) >> (64 - n);
    endcase
    v = 0;
    for (int i = 0; i < 64; i++) v[i] = (i < n) ? h[i] : h[n-1];
    return v;
  endfunction

endpackage
