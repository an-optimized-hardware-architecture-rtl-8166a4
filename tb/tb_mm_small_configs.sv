// tb_mm_small_configs: mm_montgomery at small and unusual sizes, many random
// products each. Covers the smallest array (two PEs, no type E PE), word
// sizes of 2, 3 and 4 bits, and operand sizes that are and are not a
// multiple of the word size, where the top word holds only a few bits.
module tb_mm_small_configs;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  localparam int K = 6;
  logic [K-1:0] fin;
  int chk [K];
  int err [K];
  int checks, failures;

  mm_mont_harness #(.N(5),  .W(4), .NOPS(300)) u0 (.clk, .fin(fin[0]), .checks(chk[0]), .failures(err[0]));
  mm_mont_harness #(.N(8),  .W(4), .NOPS(300)) u1 (.clk, .fin(fin[1]), .checks(chk[1]), .failures(err[1]));
  mm_mont_harness #(.N(16), .W(2), .NOPS(200)) u2 (.clk, .fin(fin[2]), .checks(chk[2]), .failures(err[2]));
  mm_mont_harness #(.N(7),  .W(3), .NOPS(300)) u3 (.clk, .fin(fin[3]), .checks(chk[3]), .failures(err[3]));
  mm_mont_harness #(.N(33), .W(8), .NOPS(200)) u4 (.clk, .fin(fin[4]), .checks(chk[4]), .failures(err[4]));
  mm_mont_harness #(.N(96), .W(32), .NOPS(100)) u5 (.clk, .fin(fin[5]), .checks(chk[5]), .failures(err[5]));

  initial begin
    fork
      wait (&fin);
      begin
        repeat (400 * 200) @(posedge clk);
        failures = 1;
        $display("watchdog expired");
      end
    join_any
    checks = 0;
    if (!(&fin)) failures = 1; else failures = 0;
    for (int k = 0; k < K; k++) begin
      checks += chk[k];
      failures += err[k];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
