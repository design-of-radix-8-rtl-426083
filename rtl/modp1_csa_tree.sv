// Modulo 2^N+1 carry-save adder tree.
//
// Reduces NR N-bit rows to a sum word and a carry word with a Wallace tree of
// modp1_csa compressors: at every level the rows are taken in groups of
// three, each group becomes two rows, and the one or two rows left over pass
// to the next level unchanged. The tree holds NR-2 compressors in all, and
// since each adds 1 (mod 2^N+1),
//   sum + carry = (sum of the rows) + NR - 2   (mod 2^N+1).
// The tree shape (Wallace grouping) is this implementation's choice.
// Purely combinational; depth is the number of levels, ceil(log1.5(NR/2)).
module modp1_csa_tree #(
  parameter int N  = 8,
  parameter int NR = 7
) (
  input  logic [N-1:0] row [NR],
  output logic [N-1:0] sum,
  output logic [N-1:0] carry
);

  // Rows present at level l.
  function automatic int rows_at(input int l);
    int c;
    c = NR;
    for (int i = 0; i < l; i++) if (c > 2) c = 2 * (c / 3) + c % 3;
    return c;
  endfunction

  function automatic int num_levels();
    int l;
    l = 0;
    while (rows_at(l) > 2) l++;
    return l;
  endfunction

  localparam int NL = num_levels();

  initial begin
    assert (NR >= 2) else $fatal(1, "modp1_csa_tree: NR must be at least 2");
  end

  // Each level keeps its own row array; level 0 is the input.
  for (genvar l = 0; l <= NL; l++) begin : g_lvl
    localparam int CI = rows_at(l);
    logic [N-1:0] cur [CI];
    if (l == 0) begin : g_src
      for (genvar r = 0; r < CI; r++) begin : g_in
        assign cur[r] = row[r];
      end
    end else begin : g_red
      localparam int CP = rows_at(l - 1);
      localparam int NG = CP / 3;
      for (genvar g = 0; g < NG; g++) begin : g_csa
        modp1_csa #(.N(N)) u_csa (
          .a (g_lvl[l-1].cur[3*g]),
          .b (g_lvl[l-1].cur[3*g+1]),
          .d (g_lvl[l-1].cur[3*g+2]),
          .s (cur[2*g]),
          .c (cur[2*g+1])
        );
      end
      for (genvar r = 0; r < CP % 3; r++) begin : g_pass
        assign cur[2*NG+r] = g_lvl[l-1].cur[3*NG+r];
      end
    end
  end

  assign sum   = g_lvl[NL].cur[0];
  assign carry = g_lvl[NL].cur[1];

endmodule
