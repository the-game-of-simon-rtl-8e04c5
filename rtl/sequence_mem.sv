// sequence_mem: 64 x 2-bit sequence SRAM with address decoder.
//
// Holds the colour sequence of the game, one 2-bit colour per stage. The
// 6-bit address is decoded to 64 word lines by decoder6_64 and applied to the
// cell array sram_64x2_nodec. Reading is combinational: readval shows the
// addressed word while readen is high and 00 otherwise. Writing is
// level-sensitive: the addressed word follows writeval while writeen is high,
// so writeen must be a pulse during which adr and writeval are stable (the
// core qualifies it with clock phase 2).
module sequence_mem
  import simon_pkg::*;
(
  input  logic [ADDR_W-1:0] adr,
  input  logic              readen,
  input  logic              writeen,
  input  logic [1:0]        writeval,
  output logic [1:0]        readval
);
  logic [MEM_DEPTH-1:0] wrdline;

  decoder6_64 dec (.adr(adr), .wrdline(wrdline));

  sram_64x2_nodec #(.DEPTH(MEM_DEPTH), .WIDTH(2)) array (
    .wrdline (wrdline),
    .readen  (readen),
    .writeen (writeen),
    .writeval(writeval),
    .readval (readval)
  );
endmodule
