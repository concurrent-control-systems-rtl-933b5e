// sema_action_register: block F of the grafcet machine followed by the
// output register.
//
// F decodes the actions from the next stable situation: PROD is the
// non-stored action of step 2 and CONS that of step 5. The output register
// updates them on the same clock edge as the step register, so the
// registered actions always belong to the registered situation and stay
// glitch-free for a whole clock period. While reset is high both actions are
// held false (asynchronous clear), whatever situation is loaded.
//
// F receives the whole situation, as a general action block would; only the
// bits of steps 2 and 5 carry actions in this grafcet, so the others are
// left unused on purpose.
//
// Interface: clk, reset (asynchronous, active high), x_next from block G;
// act = {prod, cons}. Latency: one clock edge.
module sema_action_register
  import sema_pkg::*;
(
  input  logic       clk,
  input  logic       reset,
  input  situation_t x_next,
  output sema_act_t  act
);

  sema_act_t act_next;

  // block F
  always_comb begin
    act_next.prod = x_next[STEP2];
    act_next.cons = x_next[STEP5];
  end

  always_ff @(posedge clk or posedge reset) begin
    if (reset) act <= '0;
    else       act <= act_next;
  end

endmodule
