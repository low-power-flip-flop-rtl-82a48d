// lpff_pkg -- types shared by the clock-gated latch, flip-flop and counter.
//
// A clock-gated latch comes in two polarities. The positive one is transparent
// while its gated clock is 1; its gating is an AND of the clock with an XOR
// comparator of D and Q. The negative one is transparent while its gated clock
// is 0; its gating is an OR of the clock with an XNOR comparator. A
// master-slave flip-flop uses one of each. Putting the polarity in an enum is
// a coding choice of this RTL.
package lpff_pkg;
  timeunit 1ns;
  timeprecision 1ps;

  typedef enum logic {
    LATCH_POS = 1'b0,  // transparent while ckg = 1 (AND + XOR gating)
    LATCH_NEG = 1'b1   // transparent while ckg = 0 (OR + XNOR gating)
  } latch_pol_e;

endpackage
