// tb_tp_xpoint_rom: self-checking test of the one-bit cross-point ROM.
//
// The ROM is printed with the 256 x 24-bit pattern in tp_rom_pattern.hex,
// whose word i is ((i * 0x9E3779) ^ (i << 7) ^ 0x5A5A5A) mod 2**24. Every
// address is read and compared with that formula; a second, empty ROM must
// read all zeros (no dot printed).
module tb_tp_xpoint_rom;
  logic        clk = 1'b0;
  logic [7:0]  addr;
  logic [23:0] data, data_empty, expected;
  int          checks = 0, failures = 0;

  tp_xpoint_rom #(.WORD_W(24), .ROWS(16), .COLS(16),
                  .INIT_FILE("tb/tp_rom_pattern.hex")) dut (.addr(addr), .data(data));
  tp_xpoint_rom #(.WORD_W(24), .ROWS(16), .COLS(16)) dut_empty (.addr(addr), .data(data_empty));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int pass = 0; pass < 2; pass++) begin
      for (int i = 0; i < 256; i++) begin
        @(negedge clk);
        addr = 8'(pass == 0 ? i : 255 - i);
        #1;
        expected = 24'((32'(addr) * 32'h9E3779) ^ (32'(addr) << 7) ^ 32'h5A5A5A);
        checks++;
        if (data !== expected || data_empty !== 24'h0) begin
          failures++;
          $display("FAIL addr=%h data=%h expected %h empty=%h", addr, data, expected, data_empty);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
