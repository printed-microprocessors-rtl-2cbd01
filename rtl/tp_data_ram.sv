// tp_data_ram: data memory of the TP-ISA system (printed SRAM).
//
// DEPTH words of DATA_W bits with two combinational read ports and one
// write port written on the rising clock edge. A single-cycle memory-memory
// instruction reads both of its operands and writes its result in the same
// cycle, hence the two read ports. A write and a read of the same address in
// one cycle return the old value (the write lands at the clock edge).
// The TP-ISA addresses at most 256 data words; data width is free. Contents
// are not reset (a static RAM is not), but they start cleared at power-up in
// simulation. The port arrangement is this design's choice.
module tp_data_ram #(
  parameter int unsigned DATA_W = 8,
  parameter int unsigned DEPTH  = 256,
  localparam int unsigned ADDR_W = $clog2(DEPTH)
) (
  input  logic              clk,
  input  logic [ADDR_W-1:0] raddr1,
  output logic [DATA_W-1:0] rdata1,
  input  logic [ADDR_W-1:0] raddr2,
  output logic [DATA_W-1:0] rdata2,
  input  logic              we,
  input  logic [ADDR_W-1:0] waddr,
  input  logic [DATA_W-1:0] wdata
);

  logic [DATA_W-1:0] mem [DEPTH];

  initial begin
    for (int i = 0; i < DEPTH; i++) mem[i] = '0;
  end

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  assign rdata1 = mem[raddr1];
  assign rdata2 = mem[raddr2];

endmodule
