// sema_pkg: shared types and constants of the 'sema' grafcet controller.
//
// The 'sema' grafcet is a producer-consumer pattern with five steps and four
// transitions (step and transition numbers as in the grafcet drawing):
//   t1: steps {1}   -> steps {2,3}, condition  a
//   t2: steps {2}   -> steps {1},   condition ~a
//   t3: steps {4}   -> steps {5},   condition  b
//   t4: steps {3,5} -> steps {4},   condition ~b
// Steps 1 and 4 are initial. Step 2 carries the non-stored action PROD and
// step 5 the non-stored action CONS.
//
// A situation (the set of active steps) is a 5-bit vector; bit STEP_n is the
// activity of step n. The packing order (step 1 in bit 0) is this design's
// own choice.
package sema_pkg;

  localparam int unsigned N_STEPS = 5;

  typedef logic [N_STEPS-1:0] situation_t;

  // Bit positions of the steps inside a situation_t.
  typedef enum int unsigned {
    STEP1 = 0,
    STEP2 = 1,
    STEP3 = 2,
    STEP4 = 3,
    STEP5 = 4
  } step_e;

  // Sampled transition conditions.
  typedef struct packed {
    logic a;  // produce an element
    logic b;  // consume an element
  } sema_in_t;

  // Actions of the grafcet.
  typedef struct packed {
    logic prod;  // action of step 2
    logic cons;  // action of step 5
  } sema_act_t;

  // Initial situation: steps 1 and 4 active.
  localparam situation_t INIT_SITUATION = situation_t'((1 << STEP1) | (1 << STEP4));

endpackage
