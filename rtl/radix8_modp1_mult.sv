// Radix-8 Booth encoded modulo 2^N+1 multiplier (top level).
//
// Computes p = x * y mod (2^N+1) for residues x, y in [0, 2^N] given as
// (N+1)-bit words; p is returned the same way. The datapath:
//   1. x is turned into diminished-1 form xd = x - 1 (N bits); x = 0 is
//      flagged and forces p = 0.
//   2. hard_multiple_gen forms 3X in diminished-1 form with a parallel-prefix
//      adder evaluated at odd positions only; 2X and 4X are free rotations.
//   3. radix8_booth_encoder recodes y into ND = ceil((N+2)/3) digits in
//      {-4..+4}.
//   4. partial_product_gen selects, inverts and circularly shifts one row per
//      digit and adds two rows that correct for zero digits.
//   5. modp1_csa_tree compresses the ND partial products, the two correction
//      rows and the compensation constant CC to a sum and a carry word.
//   6. modp1_final_adder adds those two words modulo 2^N+1.
// All row offsets (each rotated row is one too small, the correction rows are
// two too small, each compressor adds one) are data independent, so a single
// constant CC, worked out at elaboration, cancels them (CC = 1 for every N
// with this arrangement of rows).
//
// Radix-8 recoding, the separate hard multiple generator, the CSA tree, a
// design-time constant CC and the 8-bit default follow the multiplier's
// design. The diminished-1 internal form, the handling of x = 0, the zero
// digit correction rows and the final adder structure are this
// implementation's choices. N must be even (see hard_multiple_gen).
// Purely combinational: no clock, result valid one combinational delay
// after the inputs.
module radix8_modp1_mult
  import modmul_pkg::*;
#(
  parameter int N = 8
) (
  input  logic [N:0] x,   // multiplicand residue, 0 .. 2^N
  input  logic [N:0] y,   // multiplier residue,   0 .. 2^N
  output logic [N:0] p    // x * y mod (2^N + 1)
);

  localparam int ND = num_digits(N);
  localparam int NR = ND + 3;            // partial products, zh, zl, CC

  // CC = -(sum of row offsets) - (compressor count), modulo 2^N+1.
  function automatic logic [N-1:0] comp_constant();
    longint m, acc;
    m   = (longint'(1) << N) + 1;
    acc = 0;
    acc = acc - longint'(ND);                      // each rotated partial product: -1
    acc = acc - 2;                       // zh + zl: -2
    acc = acc + longint'(NR) - 64'sd2;                // each compressor: +1
    acc = ((-acc) % m + m) % m;          // CC cancels all of it
    return acc[N-1:0];
  endfunction

  localparam logic [N-1:0] CC = comp_constant();

  logic               x_zero;
  logic [N-1:0]       xd, h3d;
  booth_digit_t       digit [ND];
  logic [N-1:0]       pp    [ND];
  logic [N-1:0]       zh, zl;
  logic [N-1:0]       row   [NR];
  logic [N-1:0]       s, c;
  logic [N:0]         r;

  assign x_zero = (x == '0);
  assign xd     = N'(x - 1'b1);

  hard_multiple_gen #(.N(N)) u_hmg (
    .xd  (xd),
    .h3d (h3d)
  );

  radix8_booth_encoder #(.N(N), .ND(ND)) u_enc (
    .y     (y),
    .digit (digit)
  );

  partial_product_gen #(.N(N), .ND(ND)) u_ppg (
    .xd    (xd),
    .h3d   (h3d),
    .digit (digit),
    .pp    (pp),
    .zh    (zh),
    .zl    (zl)
  );

  for (genvar i = 0; i < ND; i++) begin : g_rows
    assign row[i] = pp[i];
  end
  assign row[ND]   = zh;
  assign row[ND+1] = zl;
  assign row[ND+2] = CC;

  modp1_csa_tree #(.N(N), .NR(NR)) u_tree (
    .row   (row),
    .sum   (s),
    .carry (c)
  );

  modp1_final_adder #(.N(N)) u_fa (
    .a       (s),
    .b       (c),
    .r       (r),
    .wrapped ()
  );

  assign p = x_zero ? '0 : r;

endmodule
