// tb_step_register: checks the state register of the grafcet machine.
//
// Random next/initial values: at each rising edge out of reset x must take
// x_next; raising reset between edges must load x_init at once, without a
// clock edge; clock edges during reset must reload x_init.
module tb_step_register;
  localparam int unsigned N = 5;

  logic clk = 0, reset = 0;
  logic [N-1:0] x_next, x_init, x;
  int checks = 0, failures = 0;

  step_register #(.N_STEPS(N)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic [N-1:0] exp, string what);
    checks++;
    if (x !== exp) begin
      failures++;
      $display("FAIL %s: x=%b expected %b at %0t", what, x, exp, $time);
    end
  endtask

  initial begin
    logic [N-1:0] v;
    x_next = '0;
    x_init = 5'b01001;
    #2 reset = 1;
    #1 check(x_init, "async reset load");
    @(negedge clk) reset = 0;
    for (int k = 0; k < 300; k++) begin
      @(negedge clk);
      if (k % 37 == 5) begin
        // asynchronous reset pulse between clock edges
        x_init = N'($urandom);
        #1 reset = 1;
        #1 check(x_init, "async reset load");
        @(posedge clk);
        x_init = N'($urandom);
        @(posedge clk);
        #1 check(x_init, "reload during reset");
        @(negedge clk);
        reset = 0;
      end
      v = N'($urandom);
      x_next = v;
      x_init = ~v;
      @(posedge clk);
      #1 check(v, "load x_next");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
