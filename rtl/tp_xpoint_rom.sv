// tp_xpoint_rom: printed crossbar (cross-point) instruction ROM, one bit per dot.
//
// The ROM is a grid of ROWS x COLS cross-points repeated in WORD_W
// sub-blocks, one sub-block per bit of the instruction word. A bit is a 1
// where conductive material was printed across the cross-point and a 0 where
// it was left open. The read address is split into a row (upper bits) and a
// column (lower bits); the row decoder and the column decoder are shared by
// all sub-blocks, and each sub-block senses the single selected cross-point
// through its sensing resistor, giving one output bit. This module models
// the sensing digitally: a sub-block output is the OR over all cross-points of
// (row selected AND column selected AND dot printed).
//
// The contents are fixed when the ROM is printed. Here they come from a hex
// file of instruction words (INIT_FILE, one word per line, address 0 first);
// the dot at (row r, column c) of sub-block b is bit b of word r*COLS + c.
// With no file the ROM reads all zeros. Reads are combinational.
//
// The default size, 256 words of 24 bits, is the full TP-ISA instruction
// space; the 16-row/16-column split is this design's choice.
module tp_xpoint_rom #(
  parameter int unsigned WORD_W    = 24,
  parameter int unsigned ROWS      = 16,
  parameter int unsigned COLS      = 16,
  parameter string       INIT_FILE = "",
  localparam int unsigned DEPTH    = ROWS * COLS,
  localparam int unsigned ADDR_W   = $clog2(DEPTH)
) (
  input  logic [ADDR_W-1:0] addr,
  output logic [WORD_W-1:0] data
);

  // Printed pattern, stored word by word.
  logic [WORD_W-1:0] dots [DEPTH];

  initial begin
    for (int i = 0; i < DEPTH; i++) dots[i] = '0;
    if (INIT_FILE != "") $readmemh(INIT_FILE, dots);
  end

  logic [ROWS-1:0] row_sel;
  logic [COLS-1:0] col_sel;

  // Shared one-hot row and column decoders.
  always_comb begin
    row_sel = '0;
    col_sel = '0;
    row_sel[32'(addr) / COLS] = 1'b1;
    col_sel[32'(addr) % COLS] = 1'b1;
  end

  // Sensing, done for all WORD_W sub-blocks at once (bit b of a word is the
  // dot of sub-block b). The row decoder drives one row; each column line then
  // carries the dot of that row, and the column decoder passes one column to
  // the sensing point. A sub-block outputs 1 only if its selected dot is
  // printed.
  logic [WORD_W-1:0] col_line [COLS];

  always_comb begin
    for (int c = 0; c < COLS; c++) col_line[c] = '0;
    for (int r = 0; r < ROWS; r++) begin
      for (int c = 0; c < COLS; c++) begin
        if (row_sel[r]) col_line[c] = col_line[c] | dots[r*COLS + c];
      end
    end
    data = '0;
    for (int c = 0; c < COLS; c++) begin
      if (col_sel[c]) data = data | col_line[c];
    end
  end

endmodule
