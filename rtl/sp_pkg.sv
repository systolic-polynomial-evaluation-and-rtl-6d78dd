// Shared types of the bit-serial systolic evaluator.
//
// mode_e is the cell's mode switch. In MODE_MATRIX the cell computes the
// recurrence s' = s + a*b (R1, used for matrix products); in MODE_POLY the roles
// of the A and S inputs are exchanged and the cell computes s' = a + s*b
// (R2, one Horner step of a polynomial evaluation). The encoding is this
// design's own choice.
package sp_pkg;
  typedef enum logic {
    MODE_MATRIX = 1'b0,
    MODE_POLY   = 1'b1
  } mode_e;
endpackage
