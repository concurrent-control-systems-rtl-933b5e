// step_register: the state register of the grafcet machine.
//
// Holds one activity bit per step. At every rising clock edge it loads the
// next stable situation computed by block G. While reset is high it loads,
// asynchronously, the stable situation reached from the initial situation
// with the inputs present at that moment (supplied on x_init), so that the
// machine leaves reset already in a stable situation. The reset value thus
// follows the inputs at the reset edge and at clock edges during reset, as
// in a clocked process sensitive to clock and reset only.
//
// Interface: clk, reset (asynchronous, active high), x_next, x_init; x is the
// registered situation. Latency: one clock edge.
module step_register #(
  parameter int unsigned N_STEPS = 5
) (
  input  logic               clk,
  input  logic               reset,
  input  logic [N_STEPS-1:0] x_next,
  input  logic [N_STEPS-1:0] x_init,
  output logic [N_STEPS-1:0] x
);

  always_ff @(posedge clk or posedge reset) begin
    if (reset) x <= x_init;
    else       x <= x_next;
  end

endmodule
