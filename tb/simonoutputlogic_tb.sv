// simonoutputlogic_tb: every state code (valid and invalid) with random
// memory word and counters, outputs compared with the reference model.
module simonoutputlogic_tb;
  import simon_pkg::*;
  import simon_ref_pkg::*;
  logic [3:0] st;
  logic [1:0] mem_out;
  logic [6:0] score, curr_pos;
  ref_out_t   got, exp_o;
  int checks = 0, failures = 0;

  simonoutputlogic dut (
    .state(state_t'(st)), .mem_out(mem_out), .score(score), .curr_pos(curr_pos),
    .cheat_out(got.cheat), .scoreinc(got.scoreinc), .curr_posinc(got.curr_posinc),
    .resetcurr_pos(got.resetcurr_pos), .write_en(got.write_en), .read_en(got.read_en),
    .input_en(got.input_en), .r_out(got.r), .g_out(got.g), .b_out(got.b), .y_out(got.y)
  );

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 2000; i++) begin
      st       = 4'(i % 16);
      mem_out  = 2'($urandom);
      score    = 7'($urandom % 64);
      curr_pos = ($urandom % 3 == 0) ? score : 7'($urandom % 64);
      #1;
      exp_o = ref_outputs(st, mem_out, int'(score), int'(curr_pos));
      checks++;
      if (got !== exp_o) begin
        failures++;
        $display("FAIL state %b mem %0d score %0d pos %0d: got %b expected %b",
                 st, mem_out, score, curr_pos, got, exp_o);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
