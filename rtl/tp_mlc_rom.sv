// tp_mlc_rom: behavioural model of the multi-level (MLC) cross-point ROM.
//
// Behavioural model: the cross-points of this ROM are printed resistors of
// graded size, which is analog. Each printed dot holds BITS_PER_DOT bits,
// so a WORD_W-bit instruction needs only ceil(WORD_W / BITS_PER_DOT)
// sub-blocks (the last one padded with zeros).
// As in the one-bit ROM, shared row and column decoders select one
// cross-point per sub-block; the selected dot and the sub-block's sensing
// resistor form a voltage divider, and a per-sub-block ADC (tp_adc) turns the
// sensed voltage back into BITS_PER_DOT bits.
//
// Model: a dot storing level L is given the resistance that puts the sensed
// voltage in the middle of ADC bin L, R_L = RS_OHM * (2N - (2L+1)) / (2L+1)
// with N = 2**BITS_PER_DOT, and the sense voltage is
// VDD_MV * RS_OHM / (RS_OHM + R_L). Sub-block k supplies instruction bits
// [k*BITS_PER_DOT +: BITS_PER_DOT]. Contents are read from INIT_FILE as
// instruction words, exactly as for tp_xpoint_rom. Reads are combinational.
// Resistor values, the sensing resistance and the supply are this design's
// choices; the 2-bit default follows the published MLC evaluation.
module tp_mlc_rom #(
  parameter int unsigned WORD_W       = 24,
  parameter int unsigned BITS_PER_DOT = 2,
  parameter int unsigned ROWS         = 16,
  parameter int unsigned COLS         = 16,
  parameter string       INIT_FILE    = "",
  parameter int unsigned VDD_MV       = 1000,
  parameter int unsigned RS_OHM       = 10000,
  localparam int unsigned DEPTH       = ROWS * COLS,
  localparam int unsigned ADDR_W      = $clog2(DEPTH),
  localparam int unsigned SUBBLOCKS   = (WORD_W + BITS_PER_DOT - 1) / BITS_PER_DOT
) (
  input  logic [ADDR_W-1:0] addr,
  output logic [WORD_W-1:0] data
);

  localparam int unsigned N      = 1 << BITS_PER_DOT;
  localparam int unsigned FULL_W = SUBBLOCKS * BITS_PER_DOT;

  logic [FULL_W-1:0] words [DEPTH];
  logic [FULL_W-1:0] data_full;

  initial begin
    for (int i = 0; i < DEPTH; i++) words[i] = '0;
    if (INIT_FILE != "") $readmemh(INIT_FILE, words);
  end

  // Printed resistance of a dot at level lvl, in ohms.
  function automatic longint unsigned dot_ohm(input int unsigned lvl);
    return (longint'(RS_OHM) * (2 * N - (2 * lvl + 1))) / (2 * lvl + 1);
  endfunction

  logic [ROWS-1:0] row_sel;
  logic [COLS-1:0] col_sel;
  logic [15:0]     vsense [SUBBLOCKS];

  always_comb begin
    row_sel = '0;
    col_sel = '0;
    row_sel[32'(addr) / COLS] = 1'b1;
    col_sel[32'(addr) % COLS] = 1'b1;
  end

  // Decoders drive one row and one column; every sub-block then sees the
  // level printed at that cross-point (levels of all sub-blocks side by side
  // in one word).
  logic [FULL_W-1:0] col_line [COLS];
  logic [FULL_W-1:0] levels;

  always_comb begin
    for (int c = 0; c < COLS; c++) col_line[c] = '0;
    for (int r = 0; r < ROWS; r++) begin
      for (int c = 0; c < COLS; c++) begin
        if (row_sel[r]) col_line[c] = col_line[c] | words[r*COLS + c];
      end
    end
    levels = '0;
    for (int c = 0; c < COLS; c++) begin
      if (col_sel[c]) levels = levels | col_line[c];
    end
  end

  // Voltage divider of each sub-block's selected dot and its sensing resistor.
  always_comb begin
    for (int k = 0; k < SUBBLOCKS; k++) begin
      vsense[k] = 16'((longint'(VDD_MV) * RS_OHM) /
          (longint'(RS_OHM) + dot_ohm(32'(levels[k*BITS_PER_DOT +: BITS_PER_DOT]))));
    end
  end

  for (genvar k = 0; k < SUBBLOCKS; k++) begin : g_sub
    tp_adc #(.BITS(BITS_PER_DOT), .VDD_MV(VDD_MV)) u_adc (
      .vin_mv (vsense[k]),
      .code   (data_full[k*BITS_PER_DOT +: BITS_PER_DOT])
    );
  end

  assign data = data_full[WORD_W-1:0];

endmodule
