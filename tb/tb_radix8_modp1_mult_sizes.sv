// Size sweep of the radix-8 modulo 2^N+1 multiplier.
//
// Instantiates the multiplier at N = 4, 6 and 10 (every operand pair, with
// 2, 3 and 4 Booth digits) and at N = 12 and 16 (random operand pairs plus
// the corner values 0, 1 and 2^N), and compares each product with
// x*y mod (2^N+1) computed by integer arithmetic. Combinational; vectors are
// checked 1 ns after they are applied. A watchdog ends the run after a fixed
// number of clock cycles.
module tb_radix8_modp1_mult_sizes;

  logic [4:0]  x4,  y4,  p4;
  logic [6:0]  x6,  y6,  p6;
  logic [10:0] x10, y10, p10;
  logic [12:0] x12, y12, p12;
  logic [16:0] x16, y16, p16;
  int checks = 0, failures = 0;

  logic clk;
  initial clk = 1'b0;
  always #5 clk = ~clk;

  radix8_modp1_mult #(.N(4))  u4  (.x(x4),  .y(y4),  .p(p4));
  radix8_modp1_mult #(.N(6))  u6  (.x(x6),  .y(y6),  .p(p6));
  radix8_modp1_mult #(.N(10)) u10 (.x(x10), .y(y10), .p(p10));
  radix8_modp1_mult #(.N(12)) u12 (.x(x12), .y(y12), .p(p12));
  radix8_modp1_mult #(.N(16)) u16 (.x(x16), .y(y16), .p(p16));

  task automatic chk(input longint got, input longint xv, input longint yv, input int n);
    longint m = (longint'(1) << n) + 1;
    checks++;
    if (got != (xv * yv) % m) begin
      failures++;
      if (failures <= 10)
        $display("MISMATCH N=%0d x=%0d y=%0d p=%0d expected=%0d", n, xv, yv, got, (xv * yv) % m);
    end
  endtask

  function automatic longint pick(input int n, input int t);
    longint m = (longint'(1) << n) + 1;
    case (t % 8)
      0: return 0;
      1: return 1;
      2: return m - 1;
      default: return longint'($urandom) % m;
    endcase
  endfunction

  initial begin
    x4 = '0; y4 = '0; x6 = '0; y6 = '0; x12 = '0; y12 = '0; x16 = '0; y16 = '0;
    for (longint a = 0; a <= 1024; a++) begin
      for (longint b = 0; b <= 1024; b++) begin
        x10 = 11'(a);
        y10 = 11'(b);
        if (a <= 16 && b <= 16) begin x4 = 5'(a); y4 = 5'(b); end
        if (a <= 64 && b <= 64) begin x6 = 7'(a); y6 = 7'(b); end
        #1;
        chk(longint'(p10), a, b, 10);
        if (a <= 16 && b <= 16) chk(longint'(p4), a, b, 4);
        if (a <= 64 && b <= 64) chk(longint'(p6), a, b, 6);
      end
    end
    for (int t = 0; t < 200000; t++) begin
      longint a12, b12, a16, b16;
      a12 = pick(12, t); b12 = pick(12, t / 8 + 3);
      a16 = pick(16, t); b16 = pick(16, t / 8 + 5);
      x12 = 13'(a12); y12 = 13'(b12);
      x16 = 17'(a16); y16 = 17'(b16);
      #1;
      chk(longint'(p12), a12, b12, 12);
      chk(longint'(p16), a16, b16, 16);
    end
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
