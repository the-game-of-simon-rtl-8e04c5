// simondatapath_tb: random increment/clear controls against reference
// counters; mem_in must be the random colour of the previous cycle.
module simondatapath_tb;
  logic       ph1 = 0, ph2 = 0, reset, curr_posinc, scoreinc, resetcurr_pos;
  logic [1:0] rng_out, mem_in, prev_rng;
  logic [6:0] score, curr_pos, m_score, m_pos;
  int checks = 0, failures = 0;

  simondatapath dut (
    .ph1(ph1), .ph2(ph2), .reset(reset), .curr_posinc(curr_posinc), .scoreinc(scoreinc),
    .resetcurr_pos(resetcurr_pos), .rng_out(rng_out), .score(score), .curr_pos(curr_pos),
    .mem_in(mem_in)
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
    reset = 1; curr_posinc = 0; scoreinc = 0; resetcurr_pos = 0; rng_out = 0;
    tick();
    m_score = 0; m_pos = 0;
    for (int i = 0; i < 5000; i++) begin
      reset         = ($urandom % 100) == 0;
      resetcurr_pos = ($urandom % 20) == 0;
      curr_posinc   = ($urandom % 3) != 0;
      scoreinc      = ($urandom % 3) != 0;
      rng_out       = 2'($urandom);
      prev_rng      = rng_out;
      tick();
      if (reset || resetcurr_pos) m_pos = 0;
      else if (curr_posinc)       m_pos = m_pos + 1;
      if (reset)                  m_score = 0;
      else if (scoreinc)          m_score = m_score + 1;
      checks += 3;
      if (curr_pos !== m_pos) begin failures++; $display("FAIL curr_pos %0d exp %0d", curr_pos, m_pos); end
      if (score !== m_score)  begin failures++; $display("FAIL score %0d exp %0d", score, m_score); end
      if (mem_in !== prev_rng) begin failures++; $display("FAIL mem_in %0d exp %0d", mem_in, prev_rng); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
