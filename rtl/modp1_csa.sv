// Modulo 2^N+1 carry-save adder (one 3:2 compressor row).
//
// Adds three N-bit words bitwise into a sum word s and a carry word. The
// carry out of bit N-1 has weight 2^N = -1 (mod 2^N+1); it is fed back
// inverted into bit 0 of the shifted carry word (inverted end-around carry).
// This makes s + c = a + b + d + 1 (mod 2^N+1): every compressor row adds
// the constant 1, which the multiplier's compensation constant accounts for.
// Purely combinational.
module modp1_csa #(
  parameter int N = 8
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic [N-1:0] d,
  output logic [N-1:0] s,
  output logic [N-1:0] c
);

  logic [N-1:0] maj;
  assign s   = a ^ b ^ d;
  assign maj = (a & b) | (a & d) | (b & d);
  assign c   = {maj[N-2:0], ~maj[N-1]};

endmodule
