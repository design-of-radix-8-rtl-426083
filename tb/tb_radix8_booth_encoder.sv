// Testbench of the radix-8 Booth encoder.
//
// For every y in [0, 2^N] (N = 8) and for random y at N = 16 it checks that
// each digit is well formed (at most one magnitude bit, no negative zero),
// that each digit equals -4*y[3i+2] + 2*y[3i+1] + y[3i] + y[3i-1] computed
// in the testbench, and that sum d_i * 8^i gives y back. The encoder is
// combinational; vectors are checked 1 ns after they are applied. A
// watchdog ends the run after a fixed number of clock cycles.
module tb_radix8_booth_encoder;
  import modmul_pkg::*;

  localparam int NA = 8;
  localparam int NB = 16;
  localparam int DA = num_digits(NA);
  localparam int DB = num_digits(NB);

  logic [NA:0] ya;
  logic [NB:0] yb;
  booth_digit_t da [DA];
  booth_digit_t db [DB];
  int checks = 0, failures = 0;

  logic clk;
  initial clk = 1'b0;
  always #5 clk = ~clk;

  radix8_booth_encoder #(.N(NA)) u_a (.y(ya), .digit(da));
  radix8_booth_encoder #(.N(NB)) u_b (.y(yb), .digit(db));

  function automatic int ref_digit(input longint yv, input int i);
    int b2, b1, b0, bm;
    b2 = int'((yv >> (3*i+2)) & 1);
    b1 = int'((yv >> (3*i+1)) & 1);
    b0 = int'((yv >> (3*i)) & 1);
    bm = (i == 0) ? 0 : int'((yv >> (3*i-1)) & 1);
    return -4*b2 + 2*b1 + b0 + bm;
  endfunction

  // Value of a digit, or 99 for an illegal code.
  function automatic int dig_val(input booth_digit_t d);
    int mag, cnt;
    cnt = int'(d.m1) + int'(d.m2) + int'(d.m3) + int'(d.m4);
    mag = d.m1 ? 1 : d.m2 ? 2 : d.m3 ? 3 : d.m4 ? 4 : 0;
    if (cnt > 1 || (cnt == 0 && d.neg)) return 99;
    return d.neg ? -mag : mag;
  endfunction

  task automatic check_a(input longint yv);
    longint acc = 0;
    ya = (NA+1)'(yv);
    #1;
    for (int i = 0; i < DA; i++) begin
      int v = dig_val(da[i]);
      checks++;
      if (v != ref_digit(yv, i)) begin
        failures++;
        if (failures <= 10) $display("MISMATCH N=%0d y=%0d digit %0d = %0d", NA, yv, i, v);
      end
      acc += longint'(v) <<< (3*i);
    end
    checks++;
    if (acc != yv) failures++;
  endtask

  task automatic check_b(input longint yv);
    longint acc = 0;
    yb = (NB+1)'(yv);
    #1;
    for (int i = 0; i < DB; i++) begin
      int v = dig_val(db[i]);
      checks++;
      if (v != ref_digit(yv, i)) failures++;
      acc += longint'(v) <<< (3*i);
    end
    checks++;
    if (acc != yv) failures++;
  endtask

  initial begin
    yb = '0;
    for (longint yv = 0; yv <= (longint'(1) << NA); yv++) check_a(yv);
    check_b(0);
    check_b(longint'(1) << NB);
    for (int t = 0; t < 20000; t++) check_b(longint'($urandom_range((1 << NB), 0)));
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
