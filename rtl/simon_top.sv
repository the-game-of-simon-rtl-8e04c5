// simon_top: core of the Simon memory game.
//
// The chip plays a growing random sequence of colours on four lamps and the
// player must repeat it on four buttons. A free-running 2-bit counter
// (rng_counter) supplies the colour of each new term; the terms are kept in a
// 64 x 2-bit SRAM (sequence_mem) addressed by the position counter; the
// button decoder (input_handler) turns the buttons into {valid, colour}; and
// the game processor (simonprocessing) runs the state machine, the score and
// position counters and the lamps. After 63 correct stages all lamps light
// (win); a wrong button lights red and green only (lose). reset starts a new
// game; the counter feeding the colours keeps running through it.
//
// Clocking: two non-overlapping phases ph1/ph2. Registers sample at the end
// of ph2 and update when ph1 rises, so one clock cycle is ph1 then ph2. The
// level-sensitive SRAM write is qualified with ph2 here, while address and
// data are stable (this qualification is this design's choice).
// Buttons are sampled at the end of ph2. A press must be held from the cycle
// in which the core waits for input (cheat_out[2] = 1) through the following
// cycle, when it is compared, and released before the core waits again; the
// external debouncer is expected to deliver such a pulse.
// Ports follow the chip pin list; state is an extra observation port.
// Loop warnings (score, curr_pos, rng_out) are register feedback paths that
// cross a ph2 latch and a ph1 latch, never transparent together; the
// level-sensitive memory write is open only during ph2. None is a real
// combinational loop. curr_pos[6] is not used: 63 stages fit in 64 words.
module simon_top
  import simon_pkg::*;
#(
  parameter int unsigned MAX_STAGES_P = MAX_STAGES
) (
  input  logic               ph1,
  input  logic               ph2,
  input  logic               reset,
  input  logic               red,
  input  logic               yellow,
  input  logic               green,
  input  logic               blue,
  output logic               r_out,
  output logic               y_out,
  output logic               g_out,
  output logic               b_out,
  output logic [SCORE_W-1:0] score,
  output logic [2:0]         cheat_out,
  output state_t             state
);
  logic [1:0]         rng_out;
  logic [1:0]         mem_in;
  logic [1:0]         mem_out;
  logic               write_en;
  logic               read_en;
  logic               input_en;
  button_t            button_out;
  logic [SCORE_W-1:0] curr_pos;

  // The two-phase registers rely on ph1 and ph2 never being high together.
  always_comb begin : ph_nonoverlap
    assert (!(ph1 && ph2)) else $error("clock phases ph1 and ph2 overlap");
  end

  rng_counter rng (.ph1(ph1), .ph2(ph2), .count_out(rng_out));

  sequence_mem simon_mem (
    .adr     (curr_pos[ADDR_W-1:0]),
    .readen  (read_en),
    .writeen (write_en & ph2),
    .writeval(mem_in),
    .readval (mem_out)
  );

  input_handler simon_in (
    .r(red), .g(green), .b(blue), .y(yellow), .en(input_en), .color_out(button_out)
  );

  simonprocessing #(.MAX_STAGES_P(MAX_STAGES_P)) ssm (
    .ph1(ph1), .ph2(ph2), .reset(reset), .button_out(button_out), .rng_out(rng_out),
    .mem_out(mem_out), .write_en(write_en), .read_en(read_en), .r_out(r_out),
    .y_out(y_out), .g_out(g_out), .b_out(b_out), .input_en(input_en), .mem_in(mem_in),
    .score(score), .curr_pos(curr_pos), .cheat_out(cheat_out), .state(state)
  );
endmodule
