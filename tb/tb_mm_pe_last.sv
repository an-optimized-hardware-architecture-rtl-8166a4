// tb_mm_pe_last: self-checking testbench for the last (type F) processing element.
//
// Keeps a model of the shifted top word (C_0, S_{w-1..1}) and bit S_0. Each
// enabled cycle the model adds C + x*Y + q*M to the word and shifts; s_word
// and s0_out are compared every cycle, including cycles with en low and
// after clears. Y and M words are kept below 2^(w-1), like the top words of
// operands below 2^n are in the array, so the carry never exceeds 1.
module tb_mm_pe_last;
  localparam int unsigned W = 16;
  localparam int unsigned CYCLES = 4000;

  logic clk = 1'b0, rst_n = 1'b0, clr = 1'b0, en = 1'b0, x = 1'b0, q = 1'b0;
  logic [1:0] c_in = '0;
  logic [W-1:0] y = '0, m = '0;
  logic s0_out;
  logic [W-1:0] s_word;
  int checks = 0, failures = 0;

  mm_pe_last #(.W(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (CYCLES + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [W-1:0] mw;
  logic         ms0;
  logic [W+1:0] sum;

  task automatic check(input string what, input logic [W:0] got, input logic [W:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %h expected %h at %0t", what, got, exp, $time);
    end
  endtask

  initial begin
    mw = '0; ms0 = 1'b0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < CYCLES; t++) begin
      @(negedge clk);
      check("s_word", (W+1)'(s_word), (W+1)'(mw));
      check("s0_out", (W+1)'(s0_out), (W+1)'(ms0));
      clr  = ($urandom_range(0, 199) == 0);
      en   = ($urandom_range(0, 9) != 0);
      x    = 1'($urandom);
      q    = 1'($urandom);
      c_in = 2'($urandom_range(0, 2));
      y    = W'($urandom) >> 1;
      m    = W'($urandom) >> 1;
      if (clr) begin
        mw = '0; ms0 = 1'b0;
      end else if (en) begin
        sum = (W+2)'(mw) + (W+2)'(c_in) + (x ? (W+2)'(y) : '0) + (q ? (W+2)'(m) : '0);
        mw  = sum[W:1];
        ms0 = sum[0];
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
