// sema_next_state: block G of the grafcet machine for the 'sema' grafcet.
//
// For the current situation x and the sampled inputs, x_next is the stable
// situation the grafcet reaches under the evolution rules: every clearable
// transition (all preceding steps active and condition true) is cleared at
// once, activation wins over deactivation, and this is repeated, with the
// inputs held, until no transition is clearable. For 'sema' that takes at
// most two rounds (t1 can enable t4 in the same instant; no other chain
// exists), so the sequence has been solved once, by hand, into the closed
// two-level equations below. They hold for all 32 situations, reachable or
// not, so no invariant of the reachable set is relied on.
//
//   step 1: ~a & (x1 | x2)
//   step 2:  a & (x1 | x2)
//   step 3:  x3 & (~x5 | b)  |  a & x1 & (x3 | ~x5 | b)
//   step 4: ~b & (x4 | x3 & x5 | a & x1 & x5)
//   step 5:  b & (x4 | x5)   |  ~b & x5 & ~x3 & ~(a & x1)
//
// On the reachable situations (exactly one of steps 1/2 and one of steps 4/5
// active) these reduce to the shorter forms of a symbolic grafcet compiler,
// e.g. step 2 = a and step 1 = ~a.
//
// Interface: purely combinational, no clock.
module sema_next_state
  import sema_pkg::*;
(
  input  situation_t x,
  input  sema_in_t   in,
  output situation_t x_next
);

  logic x1, x2, x3, x4, x5, a, b;

  always_comb begin
    x1 = x[STEP1];
    x2 = x[STEP2];
    x3 = x[STEP3];
    x4 = x[STEP4];
    x5 = x[STEP5];
    a  = in.a;
    b  = in.b;

    x_next[STEP1] = ~a & (x1 | x2);
    x_next[STEP2] =  a & (x1 | x2);
    x_next[STEP3] = (x3 & (~x5 | b)) | (a & x1 & (x3 | ~x5 | b));
    x_next[STEP4] = ~b & (x4 | (x3 & x5) | (a & x1 & x5));
    x_next[STEP5] = (b & (x4 | x5)) | (~b & x5 & ~x3 & ~(a & x1));
  end

endmodule
