// Testbench of the partial product generator.
//
// At N = 8 (four digits, weights 2^0, 2^3, 2^6, 2^9) it applies random
// multiplicands X in [1, 256] (as X - 1) and random digit vectors in
// {-4..+4}, with the hard multiple 3X - 1 computed by the testbench, and
// checks modulo 257 that
//   row i        = d_i * X * 2^(3i) - 1 + z_i * 2^(3i)   (z_i: d_i == 0)
//   zh + zl      = -sum z_i * 2^(3i) - 2
// All references are integer arithmetic. Combinational; vectors are checked
// 1 ns after they are applied. A watchdog ends the run after a fixed number
// of clock cycles.
module tb_partial_product_gen;
  import modmul_pkg::*;

  localparam int N  = 8;
  localparam int ND = num_digits(N);
  localparam longint M = (longint'(1) << N) + 1;

  logic [N-1:0] xd, h3d, zh, zl;
  booth_digit_t digit [ND];
  logic [N-1:0] pp [ND];
  int checks = 0, failures = 0;

  logic clk;
  initial clk = 1'b0;
  always #5 clk = ~clk;

  partial_product_gen #(.N(N)) dut (
    .xd(xd), .h3d(h3d), .digit(digit), .pp(pp), .zh(zh), .zl(zl)
  );

  function automatic booth_digit_t mk_digit(input int d);
    booth_digit_t r;
    int mag;
    r     = '0;
    mag   = d < 0 ? -d : d;
    r.neg = d < 0;
    r.m1  = mag == 1;
    r.m2  = mag == 2;
    r.m3  = mag == 3;
    r.m4  = mag == 4;
    return r;
  endfunction

  function automatic longint md(input longint v);
    return ((v % M) + M) % M;
  endfunction

  function automatic longint pow2(input int k);
    return md(longint'(1) << k);
  endfunction

  initial begin
    for (int t = 0; t < 40000; t++) begin
      longint xv, zsum;
      int dv [ND];
      xv  = longint'($urandom_range(1 << N, 1));
      xd  = N'(xv - 1);
      h3d = N'(md(3 * xv) - 1);
      for (int i = 0; i < ND; i++) begin
        dv[i] = (t < 9) ? t - 4 : int'($urandom_range(8, 0)) - 4;
        digit[i] = mk_digit(dv[i]);
      end
      #1;
      zsum = 0;
      for (int i = 0; i < ND; i++) begin
        longint e;
        e = md(pow2(3*i) * md(longint'(dv[i]) * xv) - 1 + (dv[i] == 0 ? pow2(3*i) : 0));
        if (dv[i] == 0) zsum += pow2(3*i);
        checks++;
        if (md(longint'(pp[i])) != e) begin
          failures++;
          if (failures <= 10)
            $display("MISMATCH X=%0d d%0d=%0d row=%0d expected=%0d", xv, i, dv[i], pp[i], e);
        end
      end
      checks++;
      if (md(longint'(zh) + longint'(zl)) != md(-zsum - 2)) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
