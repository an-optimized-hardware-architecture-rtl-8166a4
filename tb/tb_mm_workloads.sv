// tb_mm_workloads: the larger operand sizes of the published evaluation,
// 2048, 3072 and 4096 bits with 16-bit words (129, 193 and 257 processing
// elements). Each size runs side by side in its own mm_mont_harness:
// corner cases, one random product with a start pulse while busy, and one
// modular multiplication through the Montgomery domain, each product checked
// against a bit-serial reference and for its latency of n+e-1 compute
// cycles (2176, 3264 and 4352 cycles).
module tb_mm_workloads;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic fin2, fin3, fin4;
  int   chk2, chk3, chk4, err2, err3, err4;
  int   checks, failures;

  mm_mont_harness #(.N(2048), .W(16), .NOPS(1)) u_2048 (.clk, .fin(fin2), .checks(chk2), .failures(err2));
  mm_mont_harness #(.N(3072), .W(16), .NOPS(1)) u_3072 (.clk, .fin(fin3), .checks(chk3), .failures(err3));
  mm_mont_harness #(.N(4096), .W(16), .NOPS(1)) u_4096 (.clk, .fin(fin4), .checks(chk4), .failures(err4));

  initial begin
    fork
      begin
        wait (fin2 && fin3 && fin4);
        checks = chk2 + chk3 + chk4;
        failures = err2 + err3 + err4;
      end
      begin
        repeat (12 * (4096 + 300)) @(posedge clk);
        checks = chk2 + chk3 + chk4;
        failures = err2 + err3 + err4 + 1;
        $display("watchdog expired");
      end
    join_any
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
