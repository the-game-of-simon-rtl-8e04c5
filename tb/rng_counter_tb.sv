// rng_counter_tb: the counter must advance by one (mod 4) on every clock
// cycle and change only when ph1 rises, and samples taken after random
// numbers of cycles must show all four colours. Clock: ph2 then ph1 pulse.
module rng_counter_tb;
  logic       ph1 = 0, ph2 = 0;
  logic [1:0] count_out, prev;
  int hist [4];
  int checks = 0, failures = 0;

  rng_counter dut (.ph1(ph1), .ph2(ph2), .count_out(count_out));

  task automatic tick();
    #1 ph2 = 1; #4 ph2 = 0; #1 ph1 = 1; #4 ph1 = 0;
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    tick();
    for (int i = 0; i < 400; i++) begin
      prev = count_out;
      #1 ph2 = 1; #4 ph2 = 0;
      checks++;
      if (count_out !== prev) begin
        failures++;
        $display("FAIL counter changed during ph2");
      end
      #1 ph1 = 1; #4 ph1 = 0;
      checks++;
      if (count_out !== prev + 2'd1) begin
        failures++;
        $display("FAIL cycle %0d: %0d after %0d", i, count_out, prev);
      end
      hist[count_out]++;
    end
    for (int v = 0; v < 4; v++) begin
      checks++;
      if (hist[v] != 100) begin
        failures++;
        $display("FAIL value %0d seen %0d times", v, hist[v]);
      end
    end
    // sampled at random moments, as a game would, every colour must turn up
    for (int v = 0; v < 4; v++) hist[v] = 0;
    for (int i = 0; i < 400; i++) begin
      repeat (1 + $urandom % 7) begin #1 ph2 = 1; #4 ph2 = 0; #1 ph1 = 1; #4 ph1 = 0; end
      hist[count_out]++;
    end
    for (int v = 0; v < 4; v++) begin
      checks++;
      if (hist[v] < 50) begin
        failures++;
        $display("FAIL value %0d sampled only %0d times of 400", v, hist[v]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
