// mm_montgomery: word-serial radix-2 Montgomery multiplier with a linear array
// of e = ceil((n+1)/w) processing elements and speculative carry handling.
//
// It computes Z = X * Y * 2^-n mod M for an odd n-bit modulus M and
// 0 <= X, Y < M, with the result in the range 0 <= Z < 2M (no final
// subtraction, as in the multiple-word radix-2 algorithm MWR2MM).
//
// Structure (as published): PE #0 is type D (mm_pe_first), PEs #1..#e-2 are
// type E (mm_pe_main), PE #e-1 is type F (mm_pe_last). PE #j owns word j of
// Y, M and the partial result S. It runs exactly one cycle behind PE #j-1:
// in cycle t it computes iteration i = t - j (bit x_i). The carry C^(j+1) goes
// right to PE #j+1, which needs it in the next cycle, and bit S_0^(j+1) goes
// left, where it resolves the speculated MSB of word j one cycle after it was
// needed. A (e-1)-deep shift register passes q_i from PE #0 to the other PEs,
// an e-deep one passes x_i. With this schedule an n-bit multiplication takes
// n+e-1 compute cycles (1088 for n = 1024, w = 16).
//
// This design's own parts: the operand registers, the start/busy/done
// handshake, the control token that walks down the x shift register to enable
// each PE for exactly n iterations, and the result registers. Word j of the
// result is complete in two steps: its bits w-1..1 of the select output while
// PE #j holds iteration n-1 (bits w-2..0 of the result word), and its MSB,
// bit 0 of word j+1, one cycle later from PE #j+1.
//
// Interface and timing: on a clock edge with start high and busy low, the
// operands x, y, m are loaded, the PEs are cleared and busy rises. PE #0
// computes iteration 0 in the next cycle; the last PE finishes iteration n-1
// n+e-1 cycles later, and on the edge after that z is written and done rises
// (busy falls). done stays high, and z stays valid, until the next start.
// start while busy is ignored. Reset (rst_n) is asynchronous, active low.
module mm_montgomery #(
  parameter int unsigned N = mm_pkg::N_DEFAULT,  // operand width n
  parameter int unsigned W = mm_pkg::W_DEFAULT,  // word width w
  localparam int unsigned E = mm_pkg::num_words(N, W)  // words = PEs
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  input  logic [N-1:0]   x,      // multiplier X
  input  logic [N-1:0]   y,      // multiplicand Y
  input  logic [N-1:0]   m,      // odd modulus M
  output logic           busy,
  output logic           done,
  output logic [E*W-1:0] z       // result, bits above n are zero
);

  import mm_pkg::*;

  // ---------------------------------------------------------------- control
  logic                   accept;
  logic [N-1:0]           x_q;
  logic [E*W-1:0]         y_q, m_q;
  logic [$clog2(N+1)-1:0] cnt_q;
  logic                   feeding_q;
  mm_tok_t                tok_in;
  logic                   x_feed;

  assign accept = start & ~busy;
  assign x_feed = x_q[0];

  always_comb begin
    tok_in.valid = feeding_q;
    tok_in.last  = feeding_q && (cnt_q == ($bits(cnt_q))'(N - 1));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x_q <= '0; y_q <= '0; m_q <= '0; cnt_q <= '0; feeding_q <= 1'b0;
    end else if (accept) begin
      x_q       <= x;
      y_q       <= (E*W)'(y);
      m_q       <= (E*W)'(m);
      cnt_q     <= '0;
      feeding_q <= 1'b1;
    end else if (feeding_q) begin
      x_q   <= x_q >> 1;
      cnt_q <= cnt_q + 1'b1;
      if (tok_in.last) feeding_q <= 1'b0;
    end
  end

  // ---------------------------------------------------------- shift registers
  logic    [E-1:0] x_pe;     // x_{i-j} for PE #j
  mm_tok_t [E-1:0] tok_pe;   // token beside it: PE #j computes now
  mm_tok_t [E-1:0] held_q;   // token of the iteration PE #j holds
  logic    [E-2:0] q_pe;     // q_pe[k] feeds PE #k+1
  logic            q0;

  mm_x_shift #(.DEPTH(E)) u_x_shift (
    .clk, .rst_n, .x_in(x_feed), .tok_in, .x_out(x_pe), .tok_out(tok_pe)
  );

  mm_q_shift #(.DEPTH(E-1)) u_q_shift (
    .clk, .rst_n, .q_in(q0), .q_out(q_pe)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      held_q <= '0;
    else if (accept) held_q <= '0;
    else             held_q <= tok_pe;
  end

  // ------------------------------------------------------------------ array
  logic [E-1:0][1:0]   c;      // c[j] = C^(j), into PE #j (c[0] unused)
  logic [E-1:0]        s0;     // s0[j] = S_0^(j), out of PE #j (s0[0] unused)
  logic [E-2:0][W-2:0] s_hi;   // S^(j)_{w-1..1} after the select, PEs 0..e-2
  logic [W-1:0]        s_top;  // shifted top word out of PE #e-1

  assign c[0]  = '0;
  assign s0[0] = 1'b0;

  mm_pe_first #(.W(W)) u_pe0 (
    .clk, .rst_n, .clr(accept), .en(tok_pe[0].valid),
    .x(x_pe[0]), .y(y_q[0 +: W]), .m(m_q[0 +: W]),
    .s0_next(s0[1]), .q(q0), .c_out(c[1]), .s_hi(s_hi[0])
  );

  for (genvar j = 1; j < E - 1; j++) begin : g_pe
    mm_pe_main #(.W(W)) u_pe (
      .clk, .rst_n, .clr(accept), .en(tok_pe[j].valid),
      .x(x_pe[j]), .q(q_pe[j-1]), .c_in(c[j]),
      .y(y_q[j*W +: W]), .m(m_q[j*W +: W]),
      .s0_next(s0[j+1]), .c_out(c[j+1]), .s0_out(s0[j]), .s_hi(s_hi[j])
    );
  end

  mm_pe_last #(.W(W)) u_pe_last (
    .clk, .rst_n, .clr(accept), .en(tok_pe[E-1].valid),
    .x(x_pe[E-1]), .q(q_pe[E-2]), .c_in(c[E-1]),
    .y(y_q[(E-1)*W +: W]), .m(m_q[(E-1)*W +: W]),
    .s0_out(s0[E-1]), .s_word(s_top)
  );

  // ------------------------------------------------------- result collection
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      z <= '0; busy <= 1'b0; done <= 1'b0;
    end else begin
      for (int j = 0; j < E - 1; j++) begin
        if (held_q[j].last)   z[j*W +: W-1] <= s_hi[j];
        if (held_q[j+1].last) z[j*W + W-1]  <= s0[j+1];
      end
      if (held_q[E-1].last) z[(E-1)*W +: W] <= s_top;
      if (accept) begin
        busy <= 1'b1; done <= 1'b0;
      end else if (held_q[E-1].last) begin
        busy <= 1'b0; done <= 1'b1;
      end
    end
  end

  // ------------------------------------------------------------- assertions
  initial begin
    assert (W >= 2) else $error("mm_montgomery: W must be at least 2");
    assert (E >= 2) else $error("mm_montgomery: N must be at least W");
  end
  assert property (@(posedge clk) disable iff (!rst_n) !(busy && done));
  // At most one PE holds the last iteration at any time.
  logic [E-1:0] held_last;
  always_comb for (int j = 0; j < E; j++) held_last[j] = held_q[j].last;
  assert property (@(posedge clk) disable iff (!rst_n) $onehot0(held_last));

endmodule
