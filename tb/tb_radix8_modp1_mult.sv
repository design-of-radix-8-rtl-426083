// End-to-end testbench of the radix-8 modulo 2^N+1 multiplier at its default
// size (N = 8, modulus 257).
//
// Applies every operand pair x, y in [0, 256] (66049 products) and compares
// p with x*y mod 257 computed by integer arithmetic in the testbench. It also
// counts how often each mechanism of the datapath was exercised: every Booth
// digit value -4..+4 (the +-3 digits use the hard multiple), a zero digit in
// every digit position (zero-digit correction rows), the final adder's
// modulus subtraction, and the operand special values x = 0, x = 2^N and
// y = 2^N. A mechanism never seen counts as a failure. The multiplier is
// combinational: each vector is applied, then checked 1 ns later. A watchdog
// ends the run after a fixed number of clock cycles.
module tb_radix8_modp1_mult;
  import modmul_pkg::*;

  localparam int N  = 8;
  localparam int ND = num_digits(N);
  localparam longint M = (longint'(1) << N) + 1;

  logic [N:0] x, y, p;
  int checks = 0, failures = 0;
  int digit_seen [-4:4];
  int zero_pos_seen [ND];
  int wrap_seen = 0, x0_seen = 0, xmax_seen = 0, ymax_seen = 0;

  logic clk;
  initial clk = 1'b0;
  always #5 clk = ~clk;

  radix8_modp1_mult dut (.x(x), .y(y), .p(p));

  // Booth digit value of y at position i, worked out arithmetically.
  function automatic int booth_digit(input longint yv, input int i);
    int b2, b1, b0, bm;
    b2 = int'((yv >> (3*i+2)) & 1);
    b1 = int'((yv >> (3*i+1)) & 1);
    b0 = int'((yv >> (3*i)) & 1);
    bm = (i == 0) ? 0 : int'((yv >> (3*i-1)) & 1);
    return -4*b2 + 2*b1 + b0 + bm;
  endfunction

  initial begin
    for (int d = -4; d <= 4; d++) digit_seen[d] = 0;
    for (int i = 0; i < ND; i++) zero_pos_seen[i] = 0;
    for (longint xv = 0; xv < M; xv++) begin
      for (longint yv = 0; yv < M; yv++) begin
        longint exp_p;
        x = (N+1)'(xv);
        y = (N+1)'(yv);
        #1;
        exp_p = (xv * yv) % M;
        checks++;
        if (longint'(p) != exp_p) begin
          failures++;
          if (failures <= 10)
            $display("MISMATCH x=%0d y=%0d p=%0d expected=%0d", xv, yv, p, exp_p);
        end
        if (xv != 0) begin
          for (int i = 0; i < ND; i++) begin
            int d;
            d = booth_digit(yv, i);
            digit_seen[d]++;
            if (d == 0) zero_pos_seen[i]++;
          end
        end
        if (dut.u_fa.wrapped && xv != 0) wrap_seen++;
        if (xv == 0) x0_seen++;
        if (xv == M-1) xmax_seen++;
        if (yv == M-1) ymax_seen++;
      end
    end
    for (int d = -4; d <= 4; d++) begin
      $display("booth digit %0d used %0d times", d, digit_seen[d]);
      checks++;
      if (digit_seen[d] == 0) failures++;
    end
    for (int i = 0; i < ND; i++) begin
      checks++;
      if (zero_pos_seen[i] == 0) failures++;
    end
    $display("modulus subtractions %0d, x=0 %0d, x=2^N %0d, y=2^N %0d",
             wrap_seen, x0_seen, xmax_seen, ymax_seen);
    checks += 4;
    if (wrap_seen == 0) failures++;
    if (x0_seen == 0) failures++;
    if (xmax_seen == 0) failures++;
    if (ymax_seen == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
