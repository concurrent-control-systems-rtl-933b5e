// tb_sema_action_register: checks block F and the output register.
//
// After each rising edge prod must equal the step-2 bit and cons the step-5
// bit of the situation presented before the edge; they must not change
// between edges, and an asynchronous reset must clear both at once.
module tb_sema_action_register;
  import sema_pkg::*;

  logic clk = 0, reset = 0;
  situation_t x_next;
  sema_act_t act;
  int checks = 0, failures = 0;

  sema_action_register dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic p, logic c, string what);
    checks++;
    if (act.prod !== p || act.cons !== c) begin
      failures++;
      $display("FAIL %s: prod=%b cons=%b expected %b %b at %0t", what, act.prod, act.cons, p, c, $time);
    end
  endtask

  initial begin
    logic [4:0] v;
    x_next = 5'b11111;
    reset = 1;
    #1 check(0, 0, "reset");
    @(posedge clk);
    #1 check(0, 0, "reset with clock");
    @(negedge clk) reset = 0;
    for (int k = 0; k < 400; k++) begin
      v = 5'($urandom);
      x_next = v;
      @(posedge clk);
      #1 check(v[1], v[4], "decode");
      x_next = ~v;
      #2 check(v[1], v[4], "hold between edges");
      if (k % 50 == 7 && (v[1] | v[4])) begin
        reset = 1;
        #1 check(0, 0, "async clear");
        @(negedge clk) reset = 0;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
