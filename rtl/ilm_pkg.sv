// ilm_pkg: constants and types shared by the modified iterative logarithmic
// multiplier.
//
// The multiplier works on unsigned operands of N_BITS bits (16 in the
// reference configuration) and produces a full 2*N_BITS-bit product. Each
// value travelling down the basic-block pipeline carries a small tag that
// tells the recursive adder whether the value is the first approximation
// P_approx(0) of a new product and whether it is the last correction term of
// that product.
package ilm_pkg;

  // Reference operand width of the multiplier.
  localparam int unsigned N_BITS = 16;

  // Width needed to hold a bit position of a WIDTH-bit operand.
  function automatic int unsigned kbits(input int unsigned width);
    return (width > 1) ? $clog2(width) : 1;
  endfunction

  // Side band that follows each term through the pipeline.
  typedef struct packed {
    logic valid;  // the stage holds a term
    logic first;  // term is P_approx(0): the recursive adder restarts
    logic last;   // no further correction term follows for this product
  } term_tag_t;

endpackage
