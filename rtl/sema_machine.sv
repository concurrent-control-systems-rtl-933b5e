// sema_machine: synchronous hardware controller for the 'sema'
// producer-consumer grafcet, organised as a grafcet machine.
//
// The grafcet is turned into a boolean automaton: a state vector with one
// bit per step and a combinational block G that computes, from that vector
// and the inputs, the next *stable* situation (the one reached after all
// chains of transition clearings, see sema_next_state). A clocked step
// register stores the situation and a block F with its own output register
// produces the actions. One rising clock edge therefore performs one
// complete grafcet evolution, transient situations included, and the
// actions never show a transient situation.
//
//   a, b --+--> G --x_next--+--> step_register --> x (fed back to G)
//          |                +--> F + output register --> prod, cons
//          +--> G (from initial situation) --x_init--> step_register (reset)
//
// During reset the step register holds the stable situation reached from
// the initial situation {1,4} with the current inputs, and the actions are
// false. The clock period must cover the delay of G; the result is then
// deterministic, as the grafcet has been shown stable for every situation.
//
// Interface: clk, reset (asynchronous, active high), inputs a and b; outputs
// prod, cons (registered actions) and steps (registered situation, bit n-1
// is step n). The grafcet invariants (one token in the loop of steps 1-2,
// one in the loop of steps 4-5) are checked by assertions; they sample reset
// on the clock to stay quiet during reset, which is why linting reports reset
// as used both synchronously and asynchronously. Only the checker does so.
module sema_machine
  import sema_pkg::*;
(
  input  logic             clk,
  input  logic             reset,
  input  logic             a,
  input  logic             b,
  output logic             prod,
  output logic             cons,
  output logic [N_STEPS-1:0] steps
);

  sema_in_t   in;
  situation_t x, x_next, x_init;
  sema_act_t  act;

  assign in = '{a: a, b: b};

  // block G, evolution from the registered situation
  sema_next_state u_g (
    .x          (x),
    .in         (in),
    .x_next     (x_next)
  );

  // block G, evolution from the initial situation (reset value)
  sema_next_state u_g_init (
    .x          (INIT_SITUATION),
    .in         (in),
    .x_next     (x_init)
  );

  step_register #(.N_STEPS(N_STEPS)) u_x (
    .clk   (clk),
    .reset (reset),
    .x_next(x_next),
    .x_init(x_init),
    .x     (x)
  );

  sema_action_register u_s (
    .clk   (clk),
    .reset (reset),
    .x_next(x_next),
    .act   (act)
  );

  assign prod  = act.prod;
  assign cons  = act.cons;
  assign steps = x;

  // Safety properties of the grafcet: the loops 1-2 and 4-5 each hold
  // exactly one token in every stable situation.
  a_loop12: assert property (@(posedge clk) disable iff (reset) x[STEP1] ^ x[STEP2])
    else $error("steps 1 and 2 both active or both inactive");
  a_loop45: assert property (@(posedge clk) disable iff (reset) x[STEP4] ^ x[STEP5])
    else $error("steps 4 and 5 both active or both inactive");

endmodule
