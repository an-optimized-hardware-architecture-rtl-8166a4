// mm_x_shift: x shift register of the Montgomery array, 1 bit wide and
// e stages deep.
//
// The multiplier X enters one bit per cycle, least significant bit first.
// Stage 0 holds x_i and feeds PE #0; stage j holds x_{i-j} and feeds PE #j,
// so every PE sees the bit of the iteration it computes (PE #j runs j cycles
// behind PE #0). Each stage also carries the control token (mm_pkg::mm_tok_t)
// that says whether the bit beside it is a real iteration and whether it is
// the last one; the token is this design's own addition to the published
// 1-bit-wide register. Token bits reset to zero; x bits need no reset.
module mm_x_shift #(
  parameter int unsigned DEPTH = mm_pkg::num_words(mm_pkg::N_DEFAULT, mm_pkg::W_DEFAULT)
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     x_in,    // next bit of X
  input  mm_pkg::mm_tok_t          tok_in,  // its token
  output logic [DEPTH-1:0]         x_out,   // x_out[j] = x_{i-j}, to PE #j
  output mm_pkg::mm_tok_t [DEPTH-1:0] tok_out
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x_out   <= '0;
      tok_out <= '0;
    end else begin
      x_out[0]   <= x_in;
      tok_out[0] <= tok_in;
      for (int j = 1; j < DEPTH; j++) begin
        x_out[j]   <= x_out[j-1];
        tok_out[j] <= tok_out[j-1];
      end
    end
  end

endmodule
