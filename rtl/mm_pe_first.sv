// mm_pe_first: first processing element (type D) of the Montgomery array, PE #0.
//
// Works like the main PE (see mm_pe_main) on word 0, with two differences:
// there is no incoming carry (C^(0) = 0), and the PE produces the reduction
// bit of the iteration,
//     q_i = (x_i * Y_0^(0)) xor S_0^(0),
// where S_0^(0) is bit 0 of the incoming (shifted) word, i.e. bit 1 of the
// word this PE resolved for the previous iteration, known at the start of the
// cycle. q_i is combinational; the q shift register delays it for the other
// PEs. Because q_i makes the sum even, bit 0 of the registered word is always
// 0 after an iteration (checked by an assertion).
//
// The unknown MSB of the incoming word (bit 0 of word 1 of the previous
// iteration) is handled speculatively as in type E: both sums are registered
// and S_0^(1) from PE #1 picks one in the next cycle.
// Interface and timing are those of mm_pe_main, plus q (valid in the cycle
// the iteration is computed). Datapath and q rule follow the published PE #0;
// en/clr and reset are this design's own.
module mm_pe_first #(
  parameter int unsigned W = mm_pkg::W_DEFAULT
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clr,
  input  logic         en,
  input  logic         x,        // x_i
  input  logic [W-1:0] y,        // Y^(0)
  input  logic [W-1:0] m,        // M^(0)
  input  logic         s0_next,  // S_0^(1) from PE #1
  output logic         q,        // q_i
  output logic [1:0]   c_out,    // C^(1) to PE #1
  output logic [W-2:0] s_hi      // S^(0)_{w-1..1} after the select
);

  logic [1:0]   co_q, ce_q;
  logic         so_q, se_q;
  logic [W-2:0] slo_q;

  logic [W+1:0] sum_o, sum_e;
  logic [W+1:0] addend;

  always_comb begin
    q      = (x & y[0]) ^ s_hi[0];
    addend = (x ? (W+2)'(y) : '0) + (q ? (W+2)'(m) : '0);
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

  logic msb;
  always_comb begin
    c_out = s0_next ? co_q : ce_q;
    msb   = s0_next ? so_q : se_q;
  end

  assign s_hi = (W-1)'({msb, slo_q} >> 1);

  // q_i is chosen so that the sum is even.
  assert property (@(posedge clk) disable iff (!rst_n) en |-> (sum_e[0] == 1'b0));

endmodule
