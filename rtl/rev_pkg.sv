// rev_pkg: constants shared by the reversible gates, flip-flops and counters.
//
// COUNTER_BITS is the counter width used throughout (4 stages, as in the
// published counters). The two Feynman-gate control constants name the two
// ways a Feynman gate is used between stages: with control 1 its second output
// is the complement of its first input, with control 0 it is a copy. The
// complement form is what the up counter and the Johnson counter need, because
// the reversible flip-flops offer no inverted output of their own.
package rev_pkg;

  localparam int unsigned COUNTER_BITS = 4;

  localparam logic FG_COMPLEMENT = 1'b1;
  localparam logic FG_COPY       = 1'b0;

endpackage
