// tp_system: a complete printed TP-ISA microprocessor system.
//
// Harvard organisation: a single-cycle TP-ISA core (tp_core) fetches from a
// printed cross-point instruction ROM and works on a printed SRAM data
// memory. The program is fixed when the ROM is printed (PROGRAM names the hex
// image); the default is an 8-bit shift-and-add multiply. With the defaults
// this is the standard 8-bit core with two BARs (BAR[0] = 0 and one real
// BAR), a 256 x 24-bit ROM and 256 data words. A program-specific system is
// the same RTL with PC_W, NUM_BARS, FLAG_MASK, OP1_W/OP2_W and DMEM_DEPTH cut
// down to what its program uses. ROM_BITS_PER_DOT > 1 selects the
// multi-level ROM, whose cross-points hold several bits each and are read
// through ADCs (a behavioural model).
//
// Interface and timing: while run = 0 the core is frozen and the data memory
// belongs to the ext_* port, through which a sensor or a tester loads input
// data (write on the rising edge) and reads results (combinational). While
// run = 1 the core executes one instruction per clock. rst_n (active low,
// asynchronous) returns PC, BARs and flags to zero. pc, instr, flags,
// branch_taken and dmem_we expose the execution for observation. The ext_*
// port and the run control are this design's choice; the published system
// only shows core, instruction ROM and data memory.
module tp_system
  import tp_pkg::*;
#(
  parameter int unsigned DATA_W           = 8,
  parameter int unsigned NUM_BARS         = 2,
  parameter int unsigned PC_W             = 8,
  parameter int unsigned OP1_W            = 8,
  parameter int unsigned OP2_W            = 8,
  parameter int unsigned DMEM_DEPTH       = 256,
  parameter logic [3:0]  FLAG_MASK        = 4'b1111,
  parameter int unsigned ROM_BITS_PER_DOT = 1,
  parameter string       PROGRAM          = "rtl/tp_prog_mult8.hex",
  localparam int unsigned INSTR_W         = 8 + OP1_W + OP2_W,
  localparam int unsigned DADDR_W         = $clog2(DMEM_DEPTH)
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               run,
  input  logic               ext_we,
  input  logic [DADDR_W-1:0] ext_addr,
  input  logic [DATA_W-1:0]  ext_wdata,
  output logic [DATA_W-1:0]  ext_rdata,
  output logic [PC_W-1:0]    pc,
  output logic [INSTR_W-1:0] instr,
  output flags_t             flags,
  output logic               branch_taken,
  output logic               dmem_we
);

  // ROM grid: columns take the low half of the address bits.
  localparam int unsigned COL_BITS = PC_W / 2;
  localparam int unsigned ROM_COLS = 1 << COL_BITS;
  localparam int unsigned ROM_ROWS = 1 << (PC_W - COL_BITS);

  logic [DADDR_W-1:0] c_addr1, c_addr2;
  logic [DATA_W-1:0]  rdata1, rdata2, c_wdata;
  logic               c_we;

  tp_core #(
    .DATA_W    (DATA_W),
    .NUM_BARS  (NUM_BARS),
    .PC_W      (PC_W),
    .OP1_W     (OP1_W),
    .OP2_W     (OP2_W),
    .ADDR_W    (DADDR_W),
    .FLAG_MASK (FLAG_MASK)
  ) u_core (
    .clk          (clk),
    .rst_n        (rst_n),
    .en           (run),
    .imem_addr    (pc),
    .imem_data    (instr),
    .dmem_addr1   (c_addr1),
    .dmem_rdata1  (rdata1),
    .dmem_addr2   (c_addr2),
    .dmem_rdata2  (rdata2),
    .dmem_we      (c_we),
    .dmem_wdata   (c_wdata),
    .flags        (flags),
    .branch_taken (branch_taken)
  );

  if (ROM_BITS_PER_DOT == 1) begin : g_rom
    tp_xpoint_rom #(
      .WORD_W    (INSTR_W),
      .ROWS      (ROM_ROWS),
      .COLS      (ROM_COLS),
      .INIT_FILE (PROGRAM)
    ) u_rom (
      .addr (pc),
      .data (instr)
    );
  end else begin : g_mlc_rom
    tp_mlc_rom #(
      .WORD_W       (INSTR_W),
      .BITS_PER_DOT (ROM_BITS_PER_DOT),
      .ROWS         (ROM_ROWS),
      .COLS         (ROM_COLS),
      .INIT_FILE    (PROGRAM)
    ) u_rom (
      .addr (pc),
      .data (instr)
    );
  end

  logic [DADDR_W-1:0] ram_raddr2, ram_waddr;
  logic [DATA_W-1:0]  ram_wdata;
  logic               ram_we;

  always_comb begin
    ram_raddr2 = run ? c_addr2 : ext_addr;
    ram_waddr  = run ? c_addr1 : ext_addr;
    ram_wdata  = run ? c_wdata : ext_wdata;
    ram_we     = run ? c_we    : ext_we;
    dmem_we    = c_we;
    ext_rdata  = rdata2;
  end

  tp_data_ram #(
    .DATA_W (DATA_W),
    .DEPTH  (DMEM_DEPTH)
  ) u_dmem (
    .clk    (clk),
    .raddr1 (c_addr1),
    .rdata1 (rdata1),
    .raddr2 (ram_raddr2),
    .rdata2 (rdata2),
    .we     (ram_we),
    .waddr  (ram_waddr),
    .wdata  (ram_wdata)
  );

endmodule
