// simoncontroller_tb: random inputs every clock cycle (ph2 pulse then ph1
// pulse). After each cycle the state must follow the reference next-state
// function and all Moore outputs must match the reference decode.
module simoncontroller_tb;
  import simon_pkg::*;
  import simon_ref_pkg::*;
  localparam int MAXS = 63;
  logic       ph1 = 0, ph2 = 0, reset;
  logic [6:0] curr_pos, score;
  logic [2:0] btn;
  logic [1:0] mem_out;
  state_t     state;
  ref_out_t   got, exp_o;
  logic [3:0] model, nxt;
  int visits [16];
  int checks = 0, failures = 0;

  simoncontroller #(.MAX_STAGES_P(MAXS)) dut (
    .ph1(ph1), .ph2(ph2), .reset(reset), .button_out(btn), .mem_out(mem_out),
    .curr_pos(curr_pos), .score(score), .cheat_out(got.cheat), .scoreinc(got.scoreinc),
    .curr_posinc(got.curr_posinc), .resetcurr_pos(got.resetcurr_pos), .write_en(got.write_en),
    .read_en(got.read_en), .input_en(got.input_en), .r_out(got.r), .g_out(got.g),
    .b_out(got.b), .y_out(got.y), .state(state)
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
    model = R_START;
    for (int i = 0; i < 10000; i++) begin
      reset    = ($urandom % 60) == 0;
      score    = 7'($urandom % 64);
      curr_pos = ($urandom % 2) ? score : 7'($urandom % 64);
      if ($urandom % 4 == 0) score = 7'(MAXS);
      btn      = 3'($urandom);
      mem_out  = 2'($urandom);
      if ((model == R_WIN || model == R_LOSE) && $urandom % 4 == 0) reset = 1;
      nxt = ref_next(model, reset, int'(score), int'(curr_pos), btn, mem_out, MAXS);
      tick();
      model = nxt;
      visits[model]++;
      // new counter/memory values for the output check in the new state
      score    = 7'($urandom % 64);
      curr_pos = ($urandom % 2) ? score : 7'($urandom % 64);
      mem_out  = 2'($urandom);
      #1;
      exp_o = ref_outputs(model, mem_out, int'(score), int'(curr_pos));
      checks += 2;
      if (state !== model) begin
        failures++;
        $display("FAIL step %0d: state %b expected %b", i, state, model);
        model = state;
      end
      if (got !== exp_o) begin
        failures++;
        $display("FAIL step %0d: outputs %b expected %b in state %b", i, got, exp_o, model);
      end
    end
    for (int s = 0; s <= 8; s++) begin
      checks++;
      if (visits[s] == 0) begin failures++; $display("FAIL state %0d never visited", s); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
