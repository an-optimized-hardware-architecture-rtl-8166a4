// tb_mm_pe_first: self-checking testbench for the first (type D) processing element.
//
// Same scheme as the main-PE testbench, with no carry input and an odd M
// word. In addition it checks the reduction bit q = (x & Y_0) xor S_0 in the
// cycle it is computed, where S_0 is bit 1 of the word resolved for the
// previous iteration, and that every resolved word has bit 0 equal to 0
// (the q bit makes each sum even).
module tb_mm_pe_first;
  localparam int unsigned W = 16;
  localparam int unsigned CYCLES = 4000;

  logic clk = 1'b0, rst_n = 1'b0, clr = 1'b0, en = 1'b0, x = 1'b0, s0_next = 1'b0;
  logic [W-1:0] y = '0, m = 1;
  logic q;
  logic [1:0] c_out;
  logic [W-2:0] s_hi;
  int checks = 0, failures = 0;

  mm_pe_first #(.W(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (CYCLES + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bit           held_empty;
  logic [W-2:0] held_fb;
  logic [W+1:0] held_add;
  logic [W+1:0] sum;
  logic [W-2:0] exp_hi;
  logic [1:0]   exp_c;
  logic         exp_q;
  int           even_fail;

  task automatic check(input string what, input logic [W:0] got, input logic [W:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %h expected %h at %0t", what, got, exp, $time);
    end
  endtask

  initial begin
    held_empty = 1'b1; held_fb = '0; held_add = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < CYCLES; t++) begin
      @(negedge clk);
      clr     = ($urandom_range(0, 199) == 0);
      en      = ($urandom_range(0, 9) != 0);
      x       = 1'($urandom);
      y       = W'($urandom);
      m       = W'($urandom) | W'(1);
      s0_next = 1'($urandom);
      #1;
      if (held_empty) begin
        exp_c = '0; exp_hi = '0;
      end else begin
        sum    = (W+2)'({s0_next, held_fb}) + held_add;
        exp_c  = sum[W+1:W];
        exp_hi = sum[W-1:1];
        check("sum even", (W+1)'(sum[0]), '0);
      end
      exp_q = (x & y[0]) ^ exp_hi[0];
      check("c_out", (W+1)'(c_out), (W+1)'(exp_c));
      check("s_hi",  (W+1)'(s_hi),  (W+1)'(exp_hi));
      check("q",     (W+1)'(q),     (W+1)'(exp_q));
      if (clr) begin
        held_empty = 1'b1;
      end else if (en) begin
        held_empty = 1'b0;
        held_fb    = exp_hi;
        held_add   = (x ? (W+2)'(y) : '0) + (exp_q ? (W+2)'(m) : '0);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
