// mm_pkg: constants, helper functions and types shared by the word-serial
// radix-2 Montgomery multiplier (processing elements, shift registers, top).
//
// num_words() gives the number of w-bit words e that hold an n-bit operand plus
// the extra bit a Montgomery result below 2M needs: e = ceil((n+1)/w). That is
// also the number of processing elements in the array.
// mm_tok_t is the control token that travels down the array next to bit x_i:
// it says whether the PE it reaches computes an iteration this cycle and
// whether that iteration is the last one (i = n-1). The token is this design's
// own control scheme; the structure it steers follows the published array.
package mm_pkg;

  // Default operand size and word size. 1024-bit operands with 16-bit words
  // give 65 PEs and n+e-1 = 1088 clock cycles per multiplication.
  localparam int unsigned N_DEFAULT = 1024;
  localparam int unsigned W_DEFAULT = 16;

  function automatic int unsigned num_words(int unsigned n, int unsigned w);
    return (n + w) / w;  // ceil((n+1)/w)
  endfunction

  typedef struct packed {
    logic valid;  // the PE that sees this token computes an iteration now
    logic last;   // ... and it is iteration n-1
  } mm_tok_t;

endpackage
