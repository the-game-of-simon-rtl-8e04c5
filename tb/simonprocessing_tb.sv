// simonprocessing_tb: the game processor in closed loop with a behavioural
// sequence memory and a testbench-driven colour source, at a reduced win
// threshold of 4 stages. The testbench supplies a random colour each cycle,
// stores writes in its own array, answers reads, and plays from cheat_out.
// Checks: every write goes to address score with the colour supplied one
// cycle earlier; the playback lamps repeat the stored sequence; a correct
// game ends in WIN with all lamps and score 4; a wrong colour ends in LOSE.
module simonprocessing_tb;
  import simon_pkg::*;
  localparam int MAXS = 4;

  logic       ph1 = 0, ph2 = 0, reset = 0;
  button_t    button_out;
  logic [1:0] rng_out = 0, prev_rng = 0, mem_out, mem_in;
  logic       write_en, read_en, r_out, y_out, g_out, b_out, input_en;
  logic [6:0] score, curr_pos;
  logic [2:0] cheat_out;
  state_t     state;
  logic [1:0] mem [64];
  logic [1:0] played [64];
  int nplayed;
  int checks = 0, failures = 0, wins = 0, losses = 0, writes = 0;

  simonprocessing #(.MAX_STAGES_P(MAXS)) dut (
    .ph1(ph1), .ph2(ph2), .reset(reset), .button_out(button_out), .rng_out(rng_out),
    .mem_out(mem_out), .write_en(write_en), .read_en(read_en), .r_out(r_out), .y_out(y_out),
    .g_out(g_out), .b_out(b_out), .input_en(input_en), .mem_in(mem_in), .score(score),
    .curr_pos(curr_pos), .cheat_out(cheat_out), .state(state)
  );

  assign mem_out = read_en ? mem[curr_pos[5:0]] : 2'b00;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %0t: %s", $time, msg); end
  endtask

  // one clock cycle; memory write and colour source modelled by the testbench
  task automatic tick();
    #1 ph2 = 1;
    if (write_en) begin
      check(mem_in == prev_rng, "written colour is the source value of the previous cycle");
      check(curr_pos == score, "new term written at address score");
      mem[curr_pos[5:0]] = mem_in;
      writes++;
    end
    #4 ph2 = 0; #1 ph1 = 1;
    prev_rng = rng_out;
    rng_out  = 2'($urandom);
    #4 ph1 = 0;
  endtask

  task automatic play_game(input bit lose);
    int guard = 0;
    reset = 1; button_out = '0; tick(); tick(); reset = 0;
    nplayed = 0;
    while (state != S_WIN && state != S_LOSE && guard < 2000) begin
      guard++;
      if (state == S_PRE_OUTPUT) nplayed = 0;
      if ({r_out, b_out, g_out, y_out} != 0 && state == S_OUTPUT_SEQ) begin
        played[nplayed] = r_out ? 2'd0 : b_out ? 2'd1 : g_out ? 2'd2 : 2'd3;
        check(played[nplayed] == mem[nplayed], "playback shows stored term");
        nplayed++;
      end
      if (state == S_INPUT_SEQ) begin
        check(nplayed == int'(score), "playback length equals score");
        check(cheat_out == {1'b1, mem[curr_pos[5:0]]}, "cheat_out shows stored colour");
        button_out.valid = 1;
        button_out.color = color_t'((lose && score == 3) ? cheat_out[1:0] + 2'd1 : cheat_out[1:0]);
        tick();
        check(state == S_CHECK, "CHECK after press");
        tick();
        button_out = '0;
      end else tick();
    end
    if (lose) begin
      check(state == S_LOSE && {r_out, b_out, g_out, y_out} == 4'b1010 && score == 3, "LOSE at stage 3");
      losses++;
    end else begin
      check(state == S_WIN && {r_out, b_out, g_out, y_out} == 4'b1111 && score == 7'(MAXS), "WIN at stage 4");
      wins++;
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    button_out = '0;
    play_game(0);
    play_game(1);
    play_game(0);
    check(wins == 2 && losses == 1 && writes > 0, "games completed");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
