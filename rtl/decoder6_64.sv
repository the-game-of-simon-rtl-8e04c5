// decoder6_64: 6-to-64 one-hot word-line decoder of the sequence SRAM.
//
// wrdline[i] is high exactly when adr == i. Purely combinational. The
// original block was synthesized from a case statement; this is the same
// function written as a shift.
module decoder6_64 (
  input  logic [5:0]  adr,
  output logic [63:0] wrdline
);
  assign wrdline = 64'd1 << adr;
endmodule
