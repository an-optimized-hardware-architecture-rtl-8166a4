// mm_q_shift: q shift register of the Montgomery array, 1 bit wide and
// (e-1) stages deep.
//
// PE #0 produces q_i in the cycle it computes iteration i; PE #j computes the
// same iteration j cycles later and needs the same q_i. Stage k (k = 0..e-2)
// therefore holds q delayed by k+1 cycles and feeds PE #k+1 (q_out[k]).
// The register shifts every cycle; the PEs ignore its contents in cycles in
// which they are not enabled, so it needs no reset of its data for correct
// results. Its depth and use follow the published array; the reset is this
// design's own.
module mm_q_shift #(
  parameter int unsigned DEPTH = mm_pkg::num_words(mm_pkg::N_DEFAULT, mm_pkg::W_DEFAULT) - 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             q_in,   // q_i from PE #0
  output logic [DEPTH-1:0] q_out   // q_out[k] = q_{i-k-1}, to PE #k+1
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) q_out <= '0;
    else if (DEPTH == 1) q_out <= DEPTH'(q_in);
    else q_out <= DEPTH'({q_out, q_in});
  end

endmodule
