// tb_mm_q_shift: self-checking testbench for the q shift register.
//
// Feeds a random bit stream and checks that tap k always equals the bit fed
// k+1 cycles earlier, using a history kept in the testbench.
module tb_mm_q_shift;
  localparam int unsigned DEPTH = 64;
  localparam int unsigned CYCLES = 1000;

  logic clk = 1'b0, rst_n = 1'b0, q_in = 1'b0;
  logic [DEPTH-1:0] q_out;
  logic hist [$];
  int checks = 0, failures = 0;

  mm_q_shift #(.DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (CYCLES + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < CYCLES; t++) begin
      @(negedge clk);
      for (int k = 0; k < DEPTH; k++) begin
        if (k < hist.size()) begin
          checks++;
          if (q_out[k] !== hist[hist.size() - 1 - k]) begin
            failures++;
            if (failures < 10) $display("FAIL tap %0d at cycle %0d", k, t);
          end
        end
      end
      q_in = 1'($urandom);
      hist.push_back(q_in);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
