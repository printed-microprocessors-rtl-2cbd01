// tb_tp_mlc_rom: self-checking test of the multi-level cross-point ROM model.
//
// Two ROMs hold the same 256 x 24-bit pattern as the one-bit ROM test
// (word i = ((i * 0x9E3779) ^ (i << 7) ^ 0x5A5A5A) mod 2**24): one with two
// bits per printed dot (12 sub-blocks) and one with four (6 sub-blocks). Both
// must return every word exactly, i.e. every sensed voltage must fall in the
// right ADC bin.
module tb_tp_mlc_rom;
  logic        clk = 1'b0;
  logic [7:0]  addr;
  logic [23:0] data2, data4, expected;
  int          checks = 0, failures = 0;

  tp_mlc_rom #(.WORD_W(24), .BITS_PER_DOT(2), .ROWS(16), .COLS(16),
               .INIT_FILE("tb/tp_rom_pattern.hex")) dut2 (.addr(addr), .data(data2));
  tp_mlc_rom #(.WORD_W(24), .BITS_PER_DOT(4), .ROWS(16), .COLS(16),
               .INIT_FILE("tb/tp_rom_pattern.hex")) dut4 (.addr(addr), .data(data4));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 256; i++) begin
      @(negedge clk);
      addr = 8'(i);
      #1;
      expected = 24'((32'(addr) * 32'h9E3779) ^ (32'(addr) << 7) ^ 32'h5A5A5A);
      checks++;
      if (data2 !== expected || data4 !== expected) begin
        failures++;
        $display("FAIL addr=%h 2b=%h 4b=%h expected %h", addr, data2, data4, expected);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
