// sema_ref_pkg: reference model of the 'sema' grafcet for the testbenches.
//
// Independent of the RTL's closed equations: it describes the grafcet by its
// structure (preceding steps, following steps and condition of each
// transition) and applies the evolution rules literally, round after round,
// until no transition is clearable. Each round clears every clearable
// transition at once and gives activation priority over deactivation.
package sema_ref_pkg;

  // step n is bit n-1
  localparam logic [4:0] PRE  [4] = '{5'b00001, 5'b00010, 5'b01000, 5'b10100};
  localparam logic [4:0] POST [4] = '{5'b00110, 5'b00001, 5'b10000, 5'b01000};
  localparam logic [4:0] INIT = 5'b01001;

  typedef struct {
    logic [4:0] x;        // stable situation reached
    int         rounds;   // rounds with at least one clearing
    logic [3:0] cleared;  // transitions cleared in any round
    bit         simultaneous;  // a round cleared two transitions or more
    bit         rule5;    // a step was activated and deactivated in one round
  } evo_t;

  function automatic bit cond(int t, logic a, logic b);
    case (t)
      0: return a;
      1: return !a;
      2: return b;
      default: return !b;
    endcase
  endfunction

  function automatic evo_t evolve(logic [4:0] x0, logic a, logic b);
    evo_t r;
    logic [4:0] act, deact;
    logic [3:0] clr;
    r.x = x0; r.rounds = 0; r.cleared = '0; r.simultaneous = 0; r.rule5 = 0;
    for (int it = 0; it < 16; it++) begin
      clr = '0; act = '0; deact = '0;
      for (int t = 0; t < 4; t++)
        if (((r.x & PRE[t]) == PRE[t]) && cond(t, a, b)) begin
          clr[t] = 1'b1;
          act |= POST[t];
          deact |= PRE[t];
        end
      if (clr == '0) return r;
      if ($countones(clr) > 1) r.simultaneous = 1;
      if ((act & deact) != '0) r.rule5 = 1;
      r.cleared |= clr;
      r.rounds++;
      r.x = (r.x & ~deact) | act;
    end
    r.rounds = -1;  // no stable situation found
    return r;
  endfunction

endpackage
