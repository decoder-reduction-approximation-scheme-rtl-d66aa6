// csa_tree: Wallace-style carry-save reduction of ROWS operands to two.
//
// At each level the rows are taken three at a time through a 3:2
// carry_save_adder; one or two rows left over pass to the next level
// unchanged. The row count therefore falls as n -> 2*floor(n/3) + n mod 3
// until two rows remain, which the final adder then adds. For the 16-bit
// Booth multiplier's nine rows (eight partial products and the row of
// negation bits) that is 9 -> 6 -> 4 -> 3 -> 2, four full-adder delays.
//
// Interface: rows[ROWS] of WIDTH bits in; sum and carry out, with
//   sum + carry == rows[0] + ... + rows[ROWS-1]   (mod 2**WIDTH).
// Combinational.
//
// The source names a carry-save adder tree of the Wallace/Dadda kind for this
// stage; the greedy Wallace grouping on whole words is this design's choice.
module csa_tree #(
  parameter int WIDTH = 32,
  parameter int ROWS  = 9
) (
  input  logic [WIDTH-1:0] rows [ROWS],
  output logic [WIDTH-1:0] sum,
  output logic [WIDTH-1:0] carry
);

  // Number of rows present at reduction level lvl (level 0 is the input).
  function automatic int rows_at(int n, int lvl);
    int r = n;
    for (int i = 0; i < lvl; i++) r = 2 * (r / 3) + r % 3;
    return r;
  endfunction

  // Number of levels needed to get down to two rows.
  function automatic int levels_for(int n);
    int r = n;
    int l = 0;
    while (r > 2) begin
      r = 2 * (r / 3) + r % 3;
      l++;
    end
    return l;
  endfunction

  localparam int LEVELS = levels_for(ROWS);

  initial begin
    assert (ROWS >= 2) else $error("csa_tree needs at least two rows");
  end

  for (genvar l = 0; l <= LEVELS; l++) begin : g_lvl
    localparam int N = rows_at(ROWS, l);
    logic [WIDTH-1:0] r [N];

    if (l == 0) begin : g_in
      for (genvar k = 0; k < N; k++) begin : g_row
        assign r[k] = rows[k];
      end
    end else begin : g_red
      localparam int P      = rows_at(ROWS, l - 1);  // rows of the level above
      localparam int GROUPS = P / 3;
      for (genvar g = 0; g < GROUPS; g++) begin : g_csa
        carry_save_adder #(.WIDTH(WIDTH)) u_csa (
          .a    (g_lvl[l-1].r[3*g]),
          .b    (g_lvl[l-1].r[3*g+1]),
          .c    (g_lvl[l-1].r[3*g+2]),
          .sum  (r[2*g]),
          .carry(r[2*g+1])
        );
      end
      for (genvar k = 0; k < P % 3; k++) begin : g_pass
        assign r[2*GROUPS+k] = g_lvl[l-1].r[3*GROUPS+k];
      end
    end
  end

  assign sum   = g_lvl[LEVELS].r[0];
  assign carry = g_lvl[LEVELS].r[1];

endmodule
