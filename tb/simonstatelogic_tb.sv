// simonstatelogic_tb: random inputs each clock cycle (clock: ph2 pulse then
// ph1 pulse); the registered state must follow the reference next-state
// function, reset must force START, and every transition must be taken.
module simonstatelogic_tb;
  import simon_pkg::*;
  import simon_ref_pkg::*;
  localparam int MAXS = 63;
  logic       ph1 = 0, ph2 = 0, reset;
  logic [6:0] curr_pos, score;
  logic [2:0] btn;
  logic [1:0] mem_out;
  state_t     state;
  logic [3:0] model, nxt;
  int seen [16][16];
  int checks = 0, failures = 0;

  simonstatelogic #(.MAX_STAGES_P(MAXS)) dut (
    .ph1(ph1), .ph2(ph2), .reset(reset), .curr_pos(curr_pos), .score(score),
    .button_out(btn), .mem_out(mem_out), .state(state)
  );

  task automatic tick();
    #1 ph2 = 1; #4 ph2 = 0; #1 ph1 = 1; #4 ph1 = 0;
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    reset = 1; curr_pos = 0; score = 0; btn = 0; mem_out = 0;
    tick();
    checks++;
    if (state !== S_START) begin failures++; $display("FAIL reset does not give START"); end
    model = R_START;
    for (int i = 0; i < 20000; i++) begin
      reset    = ($urandom % 50) == 0;
      score    = 7'($urandom % 64);
      curr_pos = ($urandom % 2) ? score : 7'($urandom % 64);
      if ($urandom % 4 == 0) score = 7'(MAXS);
      if ($urandom % 4 == 0) curr_pos = score;
      btn      = 3'($urandom);
      mem_out  = 2'($urandom);
      // leave WIN and LOSE now and then so all states keep being visited
      if ((model == R_WIN || model == R_LOSE) && $urandom % 4 == 0) reset = 1;
      nxt = ref_next(model, reset, int'(score), int'(curr_pos), btn, mem_out, MAXS);
      tick();
      seen[model][nxt]++;
      model = nxt;
      checks++;
      if (state !== model) begin
        failures++;
        $display("FAIL step %0d: state %b expected %b", i, state, model);
        model = state;
      end
    end
    // every arc of the state diagram must have been exercised
    begin
      logic [3:0] arcs [][2] = '{'{R_START, R_PRE}, '{R_PRE, R_OUT}, '{R_OUT, R_OUT},
        '{R_OUT, R_POST}, '{R_POST, R_IN}, '{R_IN, R_IN}, '{R_IN, R_CHK}, '{R_CHK, R_CWIN},
        '{R_CHK, R_LOSE}, '{R_CWIN, R_IN}, '{R_CWIN, R_START}, '{R_CWIN, R_WIN},
        '{R_LOSE, R_LOSE}, '{R_WIN, R_WIN}, '{R_LOSE, R_START}, '{R_WIN, R_START}};
      foreach (arcs[k]) begin
        checks++;
        if (seen[arcs[k][0]][arcs[k][1]] == 0) begin
          failures++;
          $display("FAIL transition %0d -> %0d never taken", arcs[k][0], arcs[k][1]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
