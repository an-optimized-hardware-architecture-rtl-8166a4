// tb_mm_x_shift: self-checking testbench for the x shift register.
//
// Feeds random x bits with random control tokens and checks that stage j
// holds the bit and token fed j+1 cycles earlier (stage 0 one cycle after
// the input), and that all tokens are empty after reset.
module tb_mm_x_shift;
  import mm_pkg::*;
  localparam int unsigned DEPTH = 65;
  localparam int unsigned CYCLES = 1000;

  logic clk = 1'b0, rst_n = 1'b0, x_in = 1'b0;
  mm_tok_t tok_in = '0;
  logic [DEPTH-1:0] x_out;
  mm_tok_t [DEPTH-1:0] tok_out;
  logic [2:0] hist [$];
  int checks = 0, failures = 0;

  mm_x_shift #(.DEPTH(DEPTH)) dut (.*);

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
    checks++;
    if (tok_out !== '0) failures++;
    rst_n = 1'b1;
    for (int t = 0; t < CYCLES; t++) begin
      @(negedge clk);
      for (int j = 0; j < DEPTH; j++) begin
        if (j < hist.size()) begin
          checks++;
          if ({x_out[j], tok_out[j]} !== hist[hist.size() - 1 - j]) begin
            failures++;
            if (failures < 10) $display("FAIL stage %0d at cycle %0d", j, t);
          end
        end
      end
      x_in   = 1'($urandom);
      tok_in = mm_tok_t'($urandom);
      hist.push_back({x_in, tok_in});
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
