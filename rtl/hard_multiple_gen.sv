// Hard multiple generator: 3X modulo 2^N+1 in diminished-1 form.
//
// Input xd is the diminished-1 multiplicand, xd = X - 1 (X in [1, 2^N]).
// The output h3d is the diminished-1 form of 3X mod (2^N+1), h3d = 3X - 1.
// It is built as the diminished-1 sum of X and 2X:
//   2X in diminished-1 form is xd rotated left by one bit with the wrapped
//   bit inverted, and a diminished-1 sum A* + B* + 1 is an N-bit addition
//   whose carry-out is inverted and fed back as the carry-in
//   (end-around inverted carry).
// The carries come from a parallel-prefix network that is built only over
// bit pairs, so group prefixes exist only at the odd bit positions
// (carries into bits 0, 2, 4, ...). The carries into the even bits' upper
// neighbours (bits 1, 3, 5, ...) are then recovered with one extra
// generate/propagate cell each. The pair network is a Kogge-Stone tree of
// depth log2(N/2). The end-around carry is ~c_out of the pair network,
// applied to every carry through the group propagate signals.
//
// That the hard multiple comes from a prefix network evaluated only at odd
// positions follows the multiplier's design; the Kogge-Stone choice and the
// diminished-1 operand format are this implementation's choices. N must be
// even: then 3X - 1 is never congruent to -1, the one value an N-bit
// diminished-1 word cannot hold. Purely combinational.
module hard_multiple_gen #(
  parameter int N = 8
) (
  input  logic [N-1:0] xd,
  output logic [N-1:0] h3d
);

  localparam int NP = N / 2;              // bit pairs
  localparam int LV = $clog2(NP) + 1;     // Kogge-Stone levels (+ level 0)

  initial begin
    assert (N % 2 == 0 && N >= 4)
      else $fatal(1, "hard_multiple_gen: N must be even and at least 4");
  end

  logic [N-1:0] a, b, g, p;
  assign a = xd;
  assign b = {xd[N-2:0], ~xd[N-1]};       // 2X in diminished-1 form
  assign g = a & b;
  assign p = a ^ b;

  // Pair generate/propagate (bits 2j+1 : 2j) and the prefix tree over pairs.
  logic [NP-1:0] pg [LV];
  logic [NP-1:0] pp [LV];

  for (genvar j = 0; j < NP; j++) begin : g_pair
    assign pg[0][j] = g[2*j+1] | (p[2*j+1] & g[2*j]);
    assign pp[0][j] = p[2*j+1] & p[2*j];
  end

  for (genvar l = 1; l < LV; l++) begin : g_lvl
    localparam int D = 1 << (l - 1);
    for (genvar j = 0; j < NP; j++) begin : g_node
      if (j >= D) begin : g_black
        assign pg[l][j] = pg[l-1][j] | (pp[l-1][j] & pg[l-1][j-D]);
        assign pp[l][j] = pp[l-1][j] & pp[l-1][j-D];
      end else begin : g_buf
        assign pg[l][j] = pg[l-1][j];
        assign pp[l][j] = pp[l-1][j];
      end
    end
  end

  logic cin;                               // end-around inverted carry
  logic [N-1:0] c;                         // carry into each bit
  assign cin = ~pg[LV-1][NP-1];

  for (genvar j = 0; j < NP; j++) begin : g_carry
    if (j == 0) begin : g_c0
      assign c[0] = cin;
    end else begin : g_cj
      assign c[2*j] = pg[LV-1][j-1] | (pp[LV-1][j-1] & cin);
    end
    assign c[2*j+1] = g[2*j] | (p[2*j] & c[2*j]);
  end

  assign h3d = p ^ c;

endmodule
