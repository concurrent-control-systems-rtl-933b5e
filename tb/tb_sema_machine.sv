// tb_sema_machine: end-to-end test of the 'sema' grafcet controller.
//
// Drives random and directed sequences of the inputs a and b, with resets
// taken under every input combination, and compares the registered
// situation and the actions PROD/CONS after every clock edge with the
// round-by-round reference model. The comparison is exact per edge, so it
// also checks the timing: an input sampled at an edge is fully evolved, and
// its actions visible, right after that same edge (one evolution per clock).
//
// Counted mechanisms, each of which must occur at least once: clearing of
// t1, t2, t3, t4; simultaneous clearing (rule 4); an evolution chaining two
// rounds in one clock (t1 then t4, the transient situation never shown);
// a step activated and deactivated at once (rule 5); a reset into a stable
// situation other than the initial one; actions held false during reset
// while an action step is active.
module tb_sema_machine;
  import sema_ref_pkg::*;

  logic clk = 0, reset = 1, a = 0, b = 0;  // held in reset from time 0
  logic prod, cons;
  logic [4:0] steps;
  logic [4:0] model;
  int checks = 0, failures = 0;
  int n_t[4] = '{0, 0, 0, 0};
  int n_simul = 0, n_chain = 0, n_rule5 = 0, n_reset_evolved = 0, n_reset_quiet = 0;

  sema_machine dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_out(logic [4:0] exp_x, logic exp_p, logic exp_c, string what);
    checks++;
    if (steps !== exp_x || prod !== exp_p || cons !== exp_c) begin
      failures++;
      $display("FAIL %s at %0t: steps=%b prod=%b cons=%b expected %b %b %b",
               what, $time, steps, prod, cons, exp_x, exp_p, exp_c);
    end
  endtask

  // reset taken with the inputs given, released after a few clock edges
  task automatic do_reset(logic ia, logic ib);
    evo_t r;
    @(negedge clk);
    a = ia; b = ib;
    #1 reset = 1;
    r = evolve(INIT, ia, ib);
    model = r.x;
    #1 check_out(model, 0, 0, "reset");
    if (model != INIT) n_reset_evolved++;
    @(posedge clk);
    #1 check_out(model, 0, 0, "clock during reset");
    if (model[1] | model[4]) n_reset_quiet++;
    @(negedge clk) reset = 0;
  endtask

  // one clock with the given inputs
  task automatic step(logic ia, logic ib);
    evo_t r;
    @(negedge clk);
    a = ia; b = ib;
    @(posedge clk);
    r = evolve(model, ia, ib);
    model = r.x;
    for (int t = 0; t < 4; t++) if (r.cleared[t]) n_t[t]++;
    if (r.simultaneous) n_simul++;
    if (r.rounds > 1) n_chain++;
    if (r.rule5) n_rule5++;
    #1 check_out(model, model[1], model[4], "evolution");
  endtask

  initial begin
    for (int i = 0; i < 4; i++) begin
      do_reset(i[1], i[0]);
      repeat (3) step(i[1], i[0]);
    end

    // directed: produce, then consume, then a produce that chains t1 and t4
    do_reset(0, 0);
    step(1, 0);   // t1: {2,3,4}
    step(0, 0);   // t2: {1,3,4}
    step(0, 1);   // t3: {1,3,5}
    step(0, 0);   // t4: {1,4}
    step(0, 1);   // t3: {1,5}
    step(1, 0);   // t1 then t4 in one clock: {2,4}
    step(0, 1);   // t2 and t3 together: {1,5}
    step(0, 0);   // nothing clearable, step 3 empty
    step(1, 1);   // t1: {2,3,5}
    step(0, 1);   // t2: {1,3,5}
    step(1, 0);   // t1 and t4 together, step 3 stays active: {2,3,4}

    // random sequences with occasional resets
    for (int k = 0; k < 3000; k++) begin
      if (k % 500 == 499) do_reset(1'($urandom), 1'($urandom));
      step(1'($urandom), 1'($urandom));
    end

    $display("t1=%0d t2=%0d t3=%0d t4=%0d simultaneous=%0d chained=%0d rule5=%0d reset_evolved=%0d reset_quiet=%0d",
             n_t[0], n_t[1], n_t[2], n_t[3], n_simul, n_chain, n_rule5, n_reset_evolved, n_reset_quiet);
    for (int t = 0; t < 4; t++) begin
      checks++;
      if (n_t[t] == 0) begin failures++; $display("FAIL t%0d never cleared", t + 1); end
    end
    checks++; if (n_simul == 0) begin failures++; $display("FAIL no simultaneous clearing"); end
    checks++; if (n_chain == 0) begin failures++; $display("FAIL no chained evolution"); end
    checks++; if (n_rule5 == 0) begin failures++; $display("FAIL rule 5 never applied"); end
    checks++; if (n_reset_evolved == 0) begin failures++; $display("FAIL no reset into an evolved situation"); end
    checks++; if (n_reset_quiet == 0) begin failures++; $display("FAIL actions never masked by reset"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
