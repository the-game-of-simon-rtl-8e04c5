// sram_cell: one bit of the sequence SRAM (12-transistor static cell).
//
// The stored bit is written from din while write is high (level-sensitive,
// so the storage is a latch by intent) and is driven onto dout while read is
// high; with read low dout is 0. The transistor-level cell drives a shared
// bit line through tri-state devices; in this model each cell's gated output
// is OR-combined by the array instead, which gives the same value for a
// one-hot read and needs no high-impedance state.
module sram_cell (
  input  logic write,
  input  logic read,
  input  logic din,
  output logic dout
);
  logic bit_q;

  always_latch begin
    if (write) bit_q = din;
  end

  assign dout = read & bit_q;
endmodule
