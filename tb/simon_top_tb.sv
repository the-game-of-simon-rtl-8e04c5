// simon_top_tb: end-to-end games on the Simon core at its default size.
//
// A scripted player watches the lamps and cheat_out and presses buttons for
// two clock cycles (the detecting cycle and the compare cycle). The testbench
// keeps its own copy of the colour sequence, learned from the playback, and
// predicts each new term from a free-running copy of the 2-bit counter (its
// phase is taken from the very first term, the counter having no reset), so it
// checks: the playback of stage n lasts n cycles and repeats the earlier
// terms; the new term is the counter value of the cycle before START; the
// first input request comes n+4 cycles after START; cheat_out names the
// stored colour; score counts stages. Games played:
//   1. win: all 63 stages, with random idle cycles and rejected multi-button
//      presses; WIN must light all lamps with score 63 and hold.
//   2. lose: a wrong colour at stage 7; LOSE must light red and green only.
//   3. restart: reset in the middle of a game clears the score and restarts.
// Each mechanism is counted; one that never happens is a failure.
// Clock: each cycle is a ph2 pulse then a ph1 pulse (registers update on
// ph1); the testbench sets buttons between cycles.
module simon_top_tb;
  import simon_pkg::*;
  localparam int MAXS = 63;

  logic       ph1 = 0, ph2 = 0, reset = 0;
  logic       red = 0, yellow = 0, green = 0, blue = 0;
  logic       r_out, y_out, g_out, b_out;
  logic [6:0] score;
  logic [2:0] cheat_out;
  state_t     state;

  simon_top dut (
    .ph1(ph1), .ph2(ph2), .reset(reset), .red(red), .yellow(yellow), .green(green),
    .blue(blue), .r_out(r_out), .y_out(y_out), .g_out(g_out), .b_out(b_out),
    .score(score), .cheat_out(cheat_out), .state(state)
  );

  int checks = 0, failures = 0;
  int cyc = 0;                // clock cycles since the counter copy was taken
  logic [1:0] rng0;           // counter value at cycle 0, learned from the first term
  bit         rng_known = 0;
  logic [1:0] seq [64];       // the player's copy of the sequence
  logic [1:0] game_seq [3][8];
  int n_win = 0, n_lose = 0, n_restart = 0, n_mash = 0, n_wait = 0, n_playback = 0,
      n_newterm = 0, n_differs = 0;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL cycle %0d: %s", cyc, msg);
    end
  endtask

  task automatic tick();
    #1 ph2 = 1; #4 ph2 = 0; #1 ph1 = 1; #4 ph1 = 0;
    cyc++;
  endtask

  function automatic logic [1:0] rng_at(input int c);
    return rng0 + 2'(c);
  endfunction

  task automatic press(input logic [1:0] c);
    {red, blue, green, yellow} = 4'b0000;
    case (c)
      2'd0: red = 1;
      2'd1: blue = 1;
      2'd2: green = 1;
      2'd3: yellow = 1;
    endcase
  endtask

  task automatic release_all();
    {red, blue, green, yellow} = 4'b0000;
  endtask

  function automatic logic [3:0] lamps();
    return {r_out, b_out, g_out, y_out};
  endfunction

  // Plays stages until the game ends or max_stage stages are reached.
  // wrong_at: stage at which to press a wrong colour (0 = never).
  // stop_at: stage at which to stop playing and return in INPUT_SEQ.
  task automatic play(input int wrong_at, input int stop_at, input int game);
    int n, t_start, lit, t0;
    logic [1:0] c;
    forever begin
      if (failures > 20) return;   // a broken core: stop this game early
      // wait for START
      t0 = cyc;
      while (state != S_START && cyc - t0 < 10) tick();
      check(state == S_START, "START expected");
      t_start = cyc;
      n = int'(score) + 1;
      tick();
      check(state == S_PRE_OUTPUT, "PRE_OUTPUT after START");
      tick();
      check(score == 7'(n), $sformatf("score %0d expected %0d", score, n));
      // playback: exactly one lamp per cycle for n cycles
      lit = 0;
      while (state == S_OUTPUT_SEQ && lit <= n) begin
        if (lamps() != 4'b0000) begin
          check($countones(lamps()) == 1, "one lamp at a time in playback");
          c = r_out ? 2'd0 : b_out ? 2'd1 : g_out ? 2'd2 : 2'd3;
          if (lit < n - 1) check(c == seq[lit], $sformatf("replayed term %0d changed", lit));
          else begin
            if (!rng_known) begin   // calibrate the counter copy once
              rng0 = c - 2'(t_start - 1);
              rng_known = 1;
            end
            check(c == rng_at(t_start - 1),
                  $sformatf("new term %0d expected counter value %0d", c, rng_at(t_start - 1)));
            seq[lit] = c;
            n_newterm++;
          end
          lit++;
        end
        tick();
      end
      check(lit == n, $sformatf("playback of %0d terms, expected %0d", lit, n));
      n_playback++;
      check(state == S_POST_OUT, "POST_OUT after playback");
      tick();
      check(state == S_INPUT_SEQ && cyc == t_start + n + 4,
            $sformatf("input request at %0d cycles after START, expected %0d", cyc - t_start, n + 4));
      if (game < 3 && n <= 8) game_seq[game - 1][n - 1] = seq[n - 1];
      if (n == stop_at) return;
      // player's turn
      for (int k = 0; k < n; k++) begin
        check(cheat_out == {1'b1, seq[k]}, $sformatf("cheat_out %b for term %0d", cheat_out, k));
        if ($urandom % 8 == 0) begin            // idle cycles: the core keeps waiting
          repeat (1 + $urandom % 3) tick();
          check(state == S_INPUT_SEQ, "waits for a press");
          n_wait++;
        end
        if ($urandom % 8 == 0) begin            // two buttons at once are ignored
          {red, green} = 2'b11;
          tick();
          release_all();
          check(state == S_INPUT_SEQ, "multi-button press ignored");
          n_mash++;
        end
        c = (n == wrong_at && k == n - 1) ? seq[k] + 2'd1 : seq[k];
        press(c);
        tick();
        check(state == S_CHECK, "CHECK after press");
        tick();
        release_all();
        if (c != seq[k]) begin
          check(state == S_LOSE, "LOSE after wrong colour");
          check(lamps() == 4'b1010, "LOSE lights red and green only");
          check(score == 7'(n), "score kept at LOSE");
          repeat (5) tick();
          check(state == S_LOSE && lamps() == 4'b1010, "LOSE holds");
          n_lose++;
          return;
        end
        check(state == S_CHECK_WIN, "CHECK_WIN after correct colour");
        tick();
        if (k < n - 1) check(state == S_INPUT_SEQ, "next input requested");
      end
      if (n == MAXS) begin
        check(state == S_WIN, "WIN after the last stage");
        check(lamps() == 4'b1111 && score == 7'(MAXS), "WIN lights all lamps, score 63");
        repeat (5) tick();
        check(state == S_WIN && lamps() == 4'b1111, "WIN holds");
        n_win++;
        return;
      end
    end
  endtask

  task automatic do_reset();
    reset = 1;
    repeat (2) tick();
    check(state == S_START && score == 0 && cheat_out == 3'b000, "reset gives START, score 0");
    reset = 0;
  endtask

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // power up without reset for a while, then take the counter reference
    repeat (5) tick();
    cyc = 0;
    // game 1: win
    do_reset();
    play(0, 0, 1);
    // game 2: lose at stage 7
    repeat ($urandom % 4) tick();
    do_reset();
    play(7, 0, 2);
    // game 3: restart in the middle of stage 4
    repeat ($urandom % 4) tick();
    do_reset();
    play(0, 4, 3);
    check(score == 4, "score 4 before restart");
    do_reset();
    n_restart++;
    tick();
    check(state == S_PRE_OUTPUT, "restarted game proceeds");
    tick();
    check(score == 1, "restarted game begins with one stage");
    // the two complete games should not have played the same sequence
    for (int i = 0; i < 7; i++) if (game_seq[0][i] != game_seq[1][i]) n_differs = 1;

    check(n_win > 0, "win happened");
    check(n_lose > 0, "loss happened");
    check(n_restart > 0, "mid-game restart happened");
    check(n_mash > 0, "multi-button press happened");
    check(n_wait > 0, "idle waiting happened");
    check(n_differs > 0, "second game had a different sequence");
    $display("mechanisms: win=%0d lose=%0d restart=%0d multi-button=%0d waits=%0d playbacks=%0d new-terms=%0d",
             n_win, n_lose, n_restart, n_mash, n_wait, n_playback, n_newterm);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
