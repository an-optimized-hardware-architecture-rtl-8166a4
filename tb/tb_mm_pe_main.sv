// tb_mm_pe_main: self-checking testbench for the main (type E) processing element.
//
// Drives random operands, carries, enables and late-select bits and checks
// every cycle the multiplexed outputs against a behavioural model: the
// iteration the PE holds is summed once the select bit (S_0^(j+1)) is known,
// as {select, previous word bits w-1..1} + C + x*Y + q*M, and c_out, s_hi and
// s0_out must equal that sum's carry, bits w-1..1 and bit 0. Clear and hold
// (en low) are exercised too.
module tb_mm_pe_main;
  localparam int unsigned W = 16;
  localparam int unsigned CYCLES = 4000;

  logic clk = 1'b0, rst_n = 1'b0, clr = 1'b0, en = 1'b0, x = 1'b0, q = 1'b0, s0_next = 1'b0;
  logic [1:0] c_in = '0;
  logic [W-1:0] y = '0, m = '0;
  logic [1:0] c_out;
  logic s0_out;
  logic [W-2:0] s_hi;
  int checks = 0, failures = 0;

  mm_pe_main #(.W(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (CYCLES + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Model of the iteration held in the PE register.
  bit           held_empty;
  logic [W-2:0] held_fb;
  logic [W+1:0] held_add;
  logic [W+1:0] sum;
  logic [W-2:0] exp_hi;
  logic [1:0]   exp_c;
  logic         exp_s0;

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
      q       = 1'($urandom);
      c_in    = 2'($urandom_range(0, 2));
      y       = W'($urandom);
      m       = W'($urandom);
      s0_next = 1'($urandom);
      #1;
      if (held_empty) begin
        exp_c = '0; exp_hi = '0; exp_s0 = 1'b0;
      end else begin
        sum    = (W+2)'({s0_next, held_fb}) + held_add;
        exp_c  = sum[W+1:W];
        exp_hi = sum[W-1:1];
        exp_s0 = sum[0];
      end
      check("c_out",  (W+1)'(c_out),  (W+1)'(exp_c));
      check("s_hi",   (W+1)'(s_hi),   (W+1)'(exp_hi));
      check("s0_out", (W+1)'(s0_out), (W+1)'(exp_s0));
      if (clr) begin
        held_empty = 1'b1;
      end else if (en) begin
        held_empty = 1'b0;
        held_fb    = exp_hi;
        held_add   = (W+2)'(c_in) + (x ? (W+2)'(y) : '0) + (q ? (W+2)'(m) : '0);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
