// cla_adder: W-bit carry look-ahead adder, sum = a + b + cin.
//
// Carries are computed from bit generate g = a&b and propagate p = a^b by a
// parallel-prefix (Kogge-Stone) network of log2(W) levels, so no carry waits
// for the one below it to ripple. The published scheme asks for a fast carry
// look-ahead adder for the final merge; the prefix structure is this
// design's choice. Combinational.
module cla_adder #(
  parameter int W = 48
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] sum,
  output logic         cout
);

  localparam int L = (W > 1) ? $clog2(W) : 1;

  logic [W-1:0] p;
  logic [W-1:0] gg [L+1];   // group generate, bit i covers [i .. max(0, i-2^l+1)]
  logic [W-1:0] pp [L+1];   // group propagate over the same span
  logic [W:0]   c;

  assign p      = a ^ b;
  // cin is folded into bit 0's generate so the prefix network covers it.
  assign gg[0]  = (a & b) | {{(W-1){1'b0}}, p[0] & cin};
  assign pp[0]  = p;

  for (genvar l = 0; l < L; l++) begin : g_lvl
    localparam int D = 1 << l;
    for (genvar i = 0; i < W; i++) begin : g_bit
      if (i >= D) begin : g_op
        assign gg[l+1][i] = gg[l][i] | (pp[l][i] & gg[l][i-D]);
        assign pp[l+1][i] = pp[l][i] & pp[l][i-D];
      end else begin : g_pass
        assign gg[l+1][i] = gg[l][i];
        assign pp[l+1][i] = pp[l][i];
      end
    end
  end

  assign c[0]   = cin;
  assign c[W:1] = gg[L];
  assign sum    = p ^ c[W-1:0];
  assign cout   = c[W];

endmodule
