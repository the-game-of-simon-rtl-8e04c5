// sram_64x2_nodec: 64-word by 2-bit SRAM array without address decoder.
//
// Each word has its own word line. A cell is written while its word line
// and writeen are both high, and read while its word line and readen are
// both high (the per-row AND gates of the original array). The read value is
// the OR of all read-enabled words, so with a one-hot word line it is the
// addressed word, and with readen low it is 00. Writes are level-sensitive:
// writeen must only be high while word line and data are stable.
module sram_64x2_nodec #(
  parameter int unsigned DEPTH = 64,
  parameter int unsigned WIDTH = 2
) (
  input  logic [DEPTH-1:0] wrdline,
  input  logic             readen,
  input  logic             writeen,
  input  logic [WIDTH-1:0] writeval,
  output logic [WIDTH-1:0] readval
);
  logic [WIDTH-1:0] word_out [DEPTH];

  for (genvar w = 0; w < DEPTH; w++) begin : g_word
    for (genvar k = 0; k < WIDTH; k++) begin : g_bit
      sram_cell u_cell (
        .write(wrdline[w] & writeen),
        .read (wrdline[w] & readen),
        .din  (writeval[k]),
        .dout (word_out[w][k])
      );
    end
  end

  always_comb begin
    readval = '0;
    for (int w = 0; w < DEPTH; w++) readval |= word_out[w];
  end
endmodule
