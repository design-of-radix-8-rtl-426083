// Testbench of the modulo 2^N+1 CSA tree.
//
// Drives random rows into trees of 7 rows (the multiplier's size at N = 8),
// 3 rows (one compressor) and 12 rows at N = 8, and checks that
// sum + carry = (sum of rows) + NR - 2 modulo 257, with the reference
// computed by integer arithmetic. Combinational; vectors are checked 1 ns
// after they are applied. A watchdog ends the run after a fixed number of
// clock cycles.
module tb_modp1_csa_tree;

  localparam int N = 8;
  localparam int M = (1 << N) + 1;

  logic [N-1:0] ra [7];
  logic [N-1:0] rb [3];
  logic [N-1:0] rc [12];
  logic [N-1:0] sa, ca, sb, cb, sc, cc;
  int checks = 0, failures = 0;

  logic clk;
  initial clk = 1'b0;
  always #5 clk = ~clk;

  modp1_csa_tree #(.N(N), .NR(7))  u_a (.row(ra), .sum(sa), .carry(ca));
  modp1_csa_tree #(.N(N), .NR(3))  u_b (.row(rb), .sum(sb), .carry(cb));
  modp1_csa_tree #(.N(N), .NR(12)) u_c (.row(rc), .sum(sc), .carry(cc));

  initial begin
    for (int t = 0; t < 50000; t++) begin
      int ea, eb, ec;
      ea = 7 - 2; eb = 3 - 2; ec = 12 - 2;
      for (int i = 0; i < 7; i++)  begin ra[i] = N'($urandom); ea += int'(ra[i]); end
      for (int i = 0; i < 3; i++)  begin rb[i] = N'($urandom); eb += int'(rb[i]); end
      for (int i = 0; i < 12; i++) begin rc[i] = N'($urandom); ec += int'(rc[i]); end
      if (t == 0) begin  // all-ones rows: every carry out of the top bit set
        ea = 5; eb = 1; ec = 10;
        for (int i = 0; i < 7; i++)  begin ra[i] = '1; ea += (1 << N) - 1; end
        for (int i = 0; i < 3; i++)  begin rb[i] = '1; eb += (1 << N) - 1; end
        for (int i = 0; i < 12; i++) begin rc[i] = '1; ec += (1 << N) - 1; end
      end
      #1;
      checks += 3;
      if ((int'(sa) + int'(ca)) % M != ea % M) begin
        failures++;
        if (failures <= 10) $display("MISMATCH NR=7 t=%0d", t);
      end
      if ((int'(sb) + int'(cb)) % M != eb % M) failures++;
      if ((int'(sc) + int'(cc)) % M != ec % M) failures++;
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
