// Partial product generator of the radix-8 modulo 2^N+1 multiplier.
//
// For Booth digit d_i at weight 8^i = 2^k (k = 3i) the row must stand for
// d_i * X * 2^k mod (2^N+1). Operands are in diminished-1 form (A* = A - 1):
//   * the multiple |d_i|X* is picked from X*, 2X* (X* rotated by one with the
//     wrapped bit inverted), 3X* (the hard multiple) and 4X* (rotated by two);
//   * a negative digit inverts the picked word, since ~(A*) = (-A)*;
//   * the weight 2^k is a left rotation by k of the 2N-bit ring {~W, W},
//     i.e. a circular left shift whose wrapped bits are inverted (for
//     k >= N the whole word is inverted once more, as 2^N = -1).
// A rotated word R(W,k) equals 2^k*W + 2^k - 1, so every row carries the
// data-independent offset -1 and all these offsets are cancelled by the
// compensation constant added in the CSA tree.
//
// A zero digit has no diminished-1 word (0* = -1), so its row is taken from
// W = 0, which is 2^k too large. Those excesses are removed by two correction
// rows built from the zero flags z_i: zh holds ~z_i at bit k_i for k_i < N
// (ones elsewhere) and zl holds z_i at bit k_i - N for k_i >= N. Together
// they equal -sum(z_i * 2^k_i) - 2; the -2 is again part of the constant.
//
// Circular shifting with inversion follows the multiplier's design; the
// diminished-1 form and the zero-digit correction rows are this
// implementation's own way of making the bias a single constant.
// Purely combinational.
module partial_product_gen
  import modmul_pkg::*;
#(
  parameter int N  = 8,
  parameter int ND = num_digits(N)
) (
  input  logic [N-1:0]  xd,          // X*  = X - 1
  input  logic [N-1:0]  h3d,         // 3X* = 3X - 1 (hard multiple)
  input  booth_digit_t  digit [ND],
  output logic [N-1:0]  pp    [ND],  // rotated partial products
  output logic [N-1:0]  zh,          // zero-digit correction, k_i <  N
  output logic [N-1:0]  zl           // zero-digit correction, k_i >= N
);

  // Left rotation by k of the ring {~w, w}, low N bits kept.
  function automatic logic [N-1:0] ring_rotl(input logic [N-1:0] w, input int k);
    logic [2*N-1:0] ring;
    logic [N-1:0]   r;
    ring = {~w, w};
    for (int b = 0; b < N; b++) r[b] = ring[(b - k + 2*N) % (2*N)];
    return r;
  endfunction

  logic [N-1:0] x2d, x4d;
  assign x2d = ring_rotl(xd, 1);
  assign x4d = ring_rotl(xd, 2);

  logic [ND-1:0] zero;

  for (genvar i = 0; i < ND; i++) begin : g_row
    localparam int K = (3 * i) % (2 * N);
    logic [N-1:0] sel, w;

    always_comb begin
      unique case (1'b1)
        digit[i].m1: sel = xd;
        digit[i].m2: sel = x2d;
        digit[i].m3: sel = h3d;
        digit[i].m4: sel = x4d;
        default:     sel = '0;
      endcase
    end

    assign zero[i] = ~(digit[i].m1 | digit[i].m2 | digit[i].m3 | digit[i].m4);
    assign w       = digit[i].neg ? ~sel : sel;
    assign pp[i]   = ring_rotl(w, K);
  end

  always_comb begin
    zh = '1;
    zl = '0;
    for (int i = 0; i < ND; i++) begin
      if ((3 * i) % (2 * N) < N) zh[(3 * i) % (2 * N)]     = ~zero[i];
      else                       zl[(3 * i) % (2 * N) - N] = zero[i];
    end
  end

endmodule
