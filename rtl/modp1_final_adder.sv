// Final modulo 2^N+1 adder.
//
// Adds the two N-bit words left by the CSA tree and returns the residue in
// normal form, an (N+1)-bit value in [0, 2^N]. The plain sum t = a + b is at
// most 2^(N+1) - 2 < 2(2^N+1), so one conditional subtraction of the modulus
// suffices. Two parallel-prefix (Kogge-Stone) additions run side by side:
//   * t = a + b, with its carry-out as bit N;
//   * u = a + b + (2^N - 1), formed by first compressing a, b and the
//     all-ones word with one row of full adders (sum ~(a^b), carry a|b);
//     its low N bits are t - 2^N - 1 and it reaches 2^(N+1) exactly when
//     t > 2^N, which is when the modulus has to be subtracted.
// The result is u when the modulus is subtracted, t otherwise. A two-operand
// parallel-prefix adder at this point follows the multiplier's design; the
// dual-adder selection is this implementation's choice. Purely combinational.
module modp1_final_adder #(
  parameter int N = 8
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  output logic [N:0]   r,
  output logic         wrapped   // the modulus was subtracted
);

  logic [N-1:0] t, u, us, uc;
  logic         t_co, u_co;

  kogge_stone_adder #(.N(N)) u_add_t (
    .a (a), .b (b), .cin (1'b0), .s (t), .cout (t_co)
  );

  // a + b + (2^N - 1) = us + 2*(a|b); the top bit of a|b has weight 2^N.
  assign us = ~(a ^ b);
  assign uc = {(a[N-2:0] | b[N-2:0]), 1'b0};

  kogge_stone_adder #(.N(N)) u_add_u (
    .a (us), .b (uc), .cin (1'b0), .s (u), .cout (u_co)
  );

  assign wrapped = (a[N-1] | b[N-1]) & u_co;
  assign r       = wrapped ? {1'b0, u} : {t_co, t};

endmodule
