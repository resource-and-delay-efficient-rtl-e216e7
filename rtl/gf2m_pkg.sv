// gf2m_pkg: shared types of the semi-systolic Montgomery multiplier.
//
// The array computes the two half-products of a Montgomery product in two
// consecutive clock slots: first the C half (the operand multiplied by
// x^0 .. x^((m-1)/2)), then the D half (multiplied by x^-1 .. x^-((m-1)/2)).
// slot_e tags which of the two a slot carries as it travels down the array.
// The C-then-D order follows the described architecture; the tag itself is
// this design's bookkeeping for the valid pipeline.
package gf2m_pkg;

  typedef enum logic {
    SLOT_C = 1'b0,  // half-product C: A shifted towards the MSB (times x)
    SLOT_D = 1'b1   // half-product D: A shifted towards the LSB (times x^-1)
  } slot_e;

endpackage
