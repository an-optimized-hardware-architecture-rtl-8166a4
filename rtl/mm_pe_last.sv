// mm_pe_last: last processing element (type F) of the Montgomery array, PE #e-1.
//
// Updates the most significant word:
//     (C^(e), S^(e-1)) = S^(e-1) + C^(e-1) + x_i*Y^(e-1) + q_i*M^(e-1)
// and then shifts right by one, the MSB of the shifted word being C^(e)_0.
// Both parts of the incoming word come from this PE's own register, so no
// speculation is needed: the registered word and carry feed the adder
// directly as (C^(e)_0, S^(e-1)_{w-1..1}).
//
// Only bit 0 of C^(e) is kept. All partial results of the algorithm stay below
// 2M, so a pre-shift sum is below 4M <= 2^(e*w+1) and C^(e) never exceeds 1;
// an assertion checks that bit 1 stays 0. That width is this design's reading
// of the algorithm's bound; the rest follows the published PE #e-1.
// Interface: en takes a new iteration, clr clears. s0_out (bit 0 of the
// registered word, to PE #e-2) and s_word (the shifted word, the final result
// word e-1 after the last iteration) are valid the cycle after an iteration.
module mm_pe_last #(
  parameter int unsigned W = mm_pkg::W_DEFAULT
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clr,
  input  logic         en,
  input  logic         x,        // x_{i-e+1}
  input  logic         q,        // q_{i-e+1}
  input  logic [1:0]   c_in,     // C^(e-1) from PE #e-2
  input  logic [W-1:0] y,        // Y^(e-1)
  input  logic [W-1:0] m,        // M^(e-1)
  output logic         s0_out,   // S_0^(e-1) to PE #e-2
  output logic [W-1:0] s_word    // (C^(e)_0, S^(e-1)_{w-1..1})
);

  logic         c_q;
  logic [W-1:0] s_q;
  logic [W+1:0] sum;

  assign s_word = {c_q, s_q[W-1:1]};
  assign s0_out = s_q[0];

  always_comb begin
    sum = (W+2)'(s_word) + (W+2)'(c_in)
        + (x ? (W+2)'(y) : '0) + (q ? (W+2)'(m) : '0);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      c_q <= 1'b0; s_q <= '0;
    end else if (clr) begin
      c_q <= 1'b0; s_q <= '0;
    end else if (en) begin
      c_q <= sum[W];
      s_q <= sum[W-1:0];
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) en |-> (sum[W+1] == 1'b0));

endmodule
