// N-bit Kogge-Stone parallel-prefix adder with carry-in and carry-out.
//
// Bit generate g = a & b and propagate p = a ^ b are combined over
// log2(N) prefix levels (span 1, 2, 4, ...) into group generate/propagate
// signals for every bit position; the carry into bit i is the group
// generate of bits i-1..0 with the carry-in folded in through the group
// propagate. Used by the final modulo 2^N+1 adder. Purely combinational.
module kogge_stone_adder #(
  parameter int N = 8
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic         cin,
  output logic [N-1:0] s,
  output logic         cout
);

  localparam int LV = (N > 1) ? $clog2(N) + 1 : 1;

  logic [N-1:0] g [LV];
  logic [N-1:0] p [LV];

  assign g[0] = a & b;
  assign p[0] = a ^ b;

  for (genvar l = 1; l < LV; l++) begin : g_lvl
    localparam int D = 1 << (l - 1);
    for (genvar i = 0; i < N; i++) begin : g_node
      if (i >= D) begin : g_black
        assign g[l][i] = g[l-1][i] | (p[l-1][i] & g[l-1][i-D]);
        assign p[l][i] = p[l-1][i] & p[l-1][i-D];
      end else begin : g_buf
        assign g[l][i] = g[l-1][i];
        assign p[l][i] = p[l-1][i];
      end
    end
  end

  logic [N:0] c;  // carry into each bit, c[N] = carry-out
  assign c[0] = cin;
  for (genvar i = 1; i <= N; i++) begin : g_carry
    assign c[i] = g[LV-1][i-1] | (p[LV-1][i-1] & cin);
  end

  assign s    = p[0] ^ c[N-1:0];
  assign cout = c[N];

endmodule
