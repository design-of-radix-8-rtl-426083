// Testbench of the hard multiple generator.
//
// For every diminished-1 input xd = X - 1 at N = 8, 10 and 16 it checks that
// h3d + 1 equals 3X mod (2^N+1), with the reference worked out by integer
// arithmetic. The generator is combinational; vectors are checked 1 ns after
// they are applied. A watchdog ends the run after a fixed number of cycles.
module tb_hard_multiple_gen;

  logic [7:0]  xa, ha;
  logic [9:0]  xb, hb;
  logic [15:0] xc, hc;
  int checks = 0, failures = 0;

  logic clk;
  initial clk = 1'b0;
  always #5 clk = ~clk;

  hard_multiple_gen #(.N(8))  u_a (.xd(xa), .h3d(ha));
  hard_multiple_gen #(.N(10)) u_b (.xd(xb), .h3d(hb));
  hard_multiple_gen #(.N(16)) u_c (.xd(xc), .h3d(hc));

  function automatic longint ref3(input longint xdv, input int n);
    longint m = (longint'(1) << n) + 1;
    return (3 * (xdv + 1)) % m;
  endfunction

  initial begin
    xa = '0; xb = '0; xc = '0;
    for (longint v = 0; v < 65536; v++) begin
      xc = 16'(v);
      if (v < 256)  xa = 8'(v);
      if (v < 1024) xb = 10'(v);
      #1;
      if (v < 256) begin
        checks++;
        if (longint'(ha) + 1 != ref3(v, 8)) begin
          failures++;
          if (failures <= 10) $display("MISMATCH N=8 xd=%0d h3d=%0d", v, ha);
        end
      end
      if (v < 1024) begin
        checks++;
        if (longint'(hb) + 1 != ref3(v, 10)) failures++;
      end
      checks++;
      if (longint'(hc) + 1 != ref3(v, 16)) failures++;
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
