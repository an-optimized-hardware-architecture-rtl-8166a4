// mm_pe_main: main processing element (type E) of the Montgomery array,
// PE #j for 1 <= j <= e-2.
//
// Each enabled cycle the PE performs one step of the multiple-word radix-2
// Montgomery algorithm on its word j:
//     (C^(j+1), S^(j)) = S^(j) + C^(j) + x_i*Y^(j) + q_i*M^(j)
// where the incoming S^(j) is the word left by the previous iteration shifted
// right by one bit. Its w-1 low bits come from this PE's own result, but its
// most significant bit is bit 0 of word j+1 of the previous iteration, which
// PE #j+1 is computing in this very cycle. So the PE computes the sum twice,
// once with that bit 1 (CO, SO) and once with it 0 (CE, SE), and registers
// both. Bits w-2..0 of the sum are the same in both cases and are registered
// once. One cycle later S_0^(j+1), the registered bit 0 of PE #j+1, is known
// and two 2:1 multiplexers pick the carry C^(j+1) and bit w-1 of the word.
// The picked word, shifted right by one, feeds the adders again.
//
// Interface: en makes the register take a new iteration (held otherwise);
// clr empties it (S = 0) before a multiplication. c_out and s_hi are outputs
// of the multiplexers, so they are valid in the cycle after the iteration was
// computed, once s0_next is valid. s0_out is bit 0 of the registered word.
// The datapath, the two speculative sums and the late select follow the
// published PE; en/clr and the reset are this design's own.
module mm_pe_main #(
  parameter int unsigned W = mm_pkg::W_DEFAULT
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clr,
  input  logic         en,
  input  logic         x,        // x_{i-j}
  input  logic         q,        // q_{i-j}
  input  logic [1:0]   c_in,     // C^(j) from PE #j-1
  input  logic [W-1:0] y,        // Y^(j)
  input  logic [W-1:0] m,        // M^(j)
  input  logic         s0_next,  // S_0^(j+1) from PE #j+1
  output logic [1:0]   c_out,    // C^(j+1) to PE #j+1
  output logic         s0_out,   // S_0^(j) to PE #j-1
  output logic [W-2:0] s_hi      // S^(j)_{w-1..1}: word after the select, bit 0 dropped
);

  // Registered state: both speculative carries and MSBs, common low bits.
  logic [1:0]   co_q, ce_q;
  logic         so_q, se_q;
  logic [W-2:0] slo_q;

  logic [W+1:0] sum_o, sum_e;
  logic [W+1:0] addend;

  always_comb begin
    addend = (W+2)'(c_in) + (x ? (W+2)'(y) : '0) + (q ? (W+2)'(m) : '0);
    sum_o  = (W+2)'({1'b1, s_hi}) + addend;
    sum_e  = (W+2)'({1'b0, s_hi}) + addend;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      co_q <= '0; ce_q <= '0; so_q <= 1'b0; se_q <= 1'b0; slo_q <= '0;
    end else if (clr) begin
      co_q <= '0; ce_q <= '0; so_q <= 1'b0; se_q <= 1'b0; slo_q <= '0;
    end else if (en) begin
      co_q  <= sum_o[W+1:W];
      ce_q  <= sum_e[W+1:W];
      so_q  <= sum_o[W-1];
      se_q  <= sum_e[W-1];
      slo_q <= sum_e[W-2:0];
    end
  end

  // Late select with S_0^(j+1).
  logic msb;
  always_comb begin
    c_out = s0_next ? co_q : ce_q;
    msb   = s0_next ? so_q : se_q;
  end

  assign s_hi   = (W-1)'({msb, slo_q} >> 1);
  assign s0_out = slo_q[0];

  // The two candidate sums differ by exactly 2^(w-1): their low bits agree.
  assert property (@(posedge clk) disable iff (!rst_n)
                   en |-> (sum_o[W-2:0] == sum_e[W-2:0]));

endmodule
