// tb_sema_next_state: exhaustive check of block G.
//
// For all 32 situations and all 4 input combinations the closed equations
// must give the stable situation the round-by-round reference model reaches.
// Also checks that the result is stable (applying G again changes nothing)
// and that the search never needs more than two rounds.
module tb_sema_next_state;
  import sema_pkg::*;
  import sema_ref_pkg::*;

  situation_t x, x_next, x_again;
  sema_in_t   in;
  int checks = 0, failures = 0;
  int chained_seen = 0;

  sema_next_state dut  (.x(x),      .in(in), .x_next(x_next));
  sema_next_state dut2 (.x(x_next), .in(in), .x_next(x_again));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    evo_t r;
    for (int s = 0; s < 32; s++)
      for (int i = 0; i < 4; i++) begin
        x = situation_t'(s);
        in = sema_in_t'(i);
        #1;
        r = evolve(x, in.a, in.b);
        checks++;
        if (x_next !== r.x) begin
          failures++;
          $display("FAIL x=%b a=%b b=%b: got %b expected %b", x, in.a, in.b, x_next, r.x);
        end
        checks++;
        if (x_again !== x_next) begin
          failures++;
          $display("FAIL unstable result x=%b a=%b b=%b -> %b -> %b", x, in.a, in.b, x_next, x_again);
        end
        checks++;
        if (r.rounds < 0 || r.rounds > 2) begin
          failures++;
          $display("FAIL reference needed %0d rounds", r.rounds);
        end
        if (r.rounds == 2) chained_seen++;
      end
    checks++;
    if (chained_seen == 0) begin
      failures++;
      $display("FAIL no two-round evolution exercised");
    end
    $display("two-round evolutions: %0d", chained_seen);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
