// csa_tree: reduces ROWS operands of W bits to one sum row and one carry
// row, sum + carry = sum of all rows modulo 2^W.
//
// Wallace-style: at each level the rows are taken three at a time into csa32
// compressors (three rows in, two out) and any one or two rows left over pass
// to the next level unchanged; levels repeat until two rows remain. The
// number of levels is computed at elaboration (10 rows take 5 levels).
// The published scheme specifies a carry-save adder tree giving a sum and a carry
// row; the grouping is this design's. Combinational.
module csa_tree #(
  parameter int W    = 48,
  parameter int ROWS = 10
) (
  input  logic [W-1:0] rows [ROWS],
  output logic [W-1:0] sum,
  output logic [W-1:0] carry
);

  function automatic int next_rows(int r);
    return (r / 3) * 2 + (r % 3);
  endfunction

  function automatic int rows_at(int level);
    int r = ROWS;
    for (int i = 0; i < level; i++) r = next_rows(r);
    return r;
  endfunction

  function automatic int num_levels();
    int r = ROWS;
    int l = 0;
    while (r > 2) begin
      r = next_rows(r);
      l++;
    end
    return l;
  endfunction

  localparam int LEVELS = num_levels();

  // Level l holds the rows_at(l) rows entering level l of compression.
  for (genvar l = 0; l <= LEVELS; l++) begin : g_lvl
    localparam int NIN = rows_at(l);
    logic [W-1:0] r [NIN];
    if (l == 0) begin : g_src
      for (genvar i = 0; i < ROWS; i++) begin : g_in
        assign r[i] = rows[i];
      end
    end else begin : g_red
      localparam int NPREV = rows_at(l - 1);
      localparam int NG    = NPREV / 3;
      for (genvar g = 0; g < NG; g++) begin : g_csa
        csa32 #(.W(W)) u_csa (
          .x(g_lvl[l-1].r[3*g]),
          .y(g_lvl[l-1].r[3*g+1]),
          .z(g_lvl[l-1].r[3*g+2]),
          .s(r[2*g]),
          .c(r[2*g+1])
        );
      end
      for (genvar i = 0; i < NPREV % 3; i++) begin : g_pass
        assign r[2*NG+i] = g_lvl[l-1].r[3*NG+i];
      end
    end
  end

  assign sum = g_lvl[LEVELS].r[0];
  if (ROWS > 1) begin : g_two
    assign carry = g_lvl[LEVELS].r[1];
  end else begin : g_one
    assign carry = '0;
  end

endmodule
