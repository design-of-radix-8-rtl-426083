// Testbench of the final modulo 2^N+1 adder.
//
// Applies every pair of 8-bit words and checks r = (a + b) mod 257 and that
// the wrapped flag is set exactly when a + b exceeds 256. Combinational;
// vectors are checked 1 ns after they are applied. A watchdog ends the run
// after a fixed number of clock cycles.
module tb_modp1_final_adder;

  localparam int N = 8;
  localparam int M = (1 << N) + 1;

  logic [N-1:0] a, b;
  logic [N:0]   r;
  logic         wrapped;
  int checks = 0, failures = 0;

  logic clk;
  initial clk = 1'b0;
  always #5 clk = ~clk;

  modp1_final_adder #(.N(N)) dut (.a(a), .b(b), .r(r), .wrapped(wrapped));

  initial begin
    for (int av = 0; av < (1 << N); av++) begin
      for (int bv = 0; bv < (1 << N); bv++) begin
        a = N'(av);
        b = N'(bv);
        #1;
        checks++;
        if (int'(r) != (av + bv) % M || wrapped != (av + bv > (1 << N))) begin
          failures++;
          if (failures <= 10) $display("MISMATCH a=%0d b=%0d r=%0d w=%0b", av, bv, r, wrapped);
        end
      end
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
