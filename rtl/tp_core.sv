// tp_core: single-cycle TP-ISA microprocessor core.
//
// A two-operand memory-memory machine with no register file: its only state
// is the program counter, the base address registers and the flags. Every
// instruction completes in one clock cycle (CPI = 1): the instruction word
// arrives combinationally from the instruction ROM at address pc, both operand
// addresses are resolved through the BARs, both data words are read
// combinationally from the data memory, the ALU result is written back to the
// operand-1 address and the flags/PC/BARs update on the rising clock edge.
// One pipeline stage is the configuration the published design space
// exploration found best, because flip-flops are the most expensive printed
// cells.
//
// Instruction classes (word = {opcode, W C A B, operand1, operand2}):
//  * M-type ALU ops: mem[addr1] <= mem[addr1] op mem[addr2] when W = 1;
//    flags always update (CMP/TEST are the W = 0 forms).
//  * STORE: mem[addr1] <= immediate (operand 2, zero-extended).
//  * SETBAR: BAR[immediate] <= mem[operand1], operand 1 taken as a direct
//    address (its BAR-select bits are ignored); operand 2 is the BAR number.
//  * BR/BRN: pc <= operand1 when (flags & bmask) != 0, or == 0 for BRN.
// Unused opcode values execute as no-operations (this design's choice).
//
// Program-specific cores are built by parameters alone: PC_W, NUM_BARS,
// FLAG_MASK and the operand widths OP1_W/OP2_W shrink the state and the
// instruction word exactly as the published program-specific ISA does.
//
// Interface: en = 0 freezes all state (the system holds the core while data
// is loaded). dmem_* is a two-read/one-write asynchronous-read data memory
// port; the write address is always dmem_addr1.
module tp_core
  import tp_pkg::*;
#(
  parameter int unsigned DATA_W    = 8,
  parameter int unsigned NUM_BARS  = 2,
  parameter int unsigned PC_W      = 8,
  parameter int unsigned OP1_W     = 8,
  parameter int unsigned OP2_W     = 8,
  parameter int unsigned ADDR_W    = 8,
  parameter logic [3:0]  FLAG_MASK = 4'b1111,
  localparam int unsigned INSTR_W  = 8 + OP1_W + OP2_W,
  localparam int unsigned SEL_W    = (NUM_BARS > 1) ? $clog2(NUM_BARS) : 1
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               en,
  // instruction ROM
  output logic [PC_W-1:0]    imem_addr,
  input  logic [INSTR_W-1:0] imem_data,
  // data memory
  output logic [ADDR_W-1:0]  dmem_addr1,
  input  logic [DATA_W-1:0]  dmem_rdata1,
  output logic [ADDR_W-1:0]  dmem_addr2,
  input  logic [DATA_W-1:0]  dmem_rdata2,
  output logic               dmem_we,
  output logic [DATA_W-1:0]  dmem_wdata,
  // status
  output flags_t             flags,
  output logic               branch_taken
);

  opcode_e           opcode;
  ctl_t              ctl;
  logic [OP1_W-1:0]  op1;
  logic [OP2_W-1:0]  op2;
  logic              is_alu, is_store, is_bar, is_br;
  logic [DATA_W-1:0] alu_y;
  flags_t            alu_flags;
  logic [31:0]       op1_x, op2_x, rdata1_x;
  logic [ADDR_W-1:0] bar_wdata;

  always_comb begin
    opcode   = opcode_e'(imem_data[INSTR_W-1 -: 4]);
    ctl      = ctl_t'(imem_data[INSTR_W-5 -: 4]);
    op1      = imem_data[OP1_W+OP2_W-1 : OP2_W];
    op2      = imem_data[OP2_W-1:0];
    op1_x    = 32'(op1);
    op2_x    = 32'(op2);
    is_alu   = (opcode <= OP_RR);
    is_store = (opcode == OP_STORE);
    is_bar   = (opcode == OP_BAR);
    is_br    = (opcode == OP_BR);
    rdata1_x  = 32'(dmem_rdata1);
    bar_wdata = rdata1_x[ADDR_W-1:0];
  end

  tp_bar_file #(
    .NUM_BARS (NUM_BARS),
    .OP1_W    (OP1_W),
    .OP2_W    (OP2_W),
    .ADDR_W   (ADDR_W)
  ) u_bars (
    .clk       (clk),
    .rst_n     (rst_n),
    .op1       (op1),
    .op2       (op2),
    .direct1   (is_bar),
    .bar_we    (en && is_bar && ctl.w),
    .bar_idx   (op2_x[SEL_W-1:0]),
    .bar_wdata (bar_wdata),
    .addr1     (dmem_addr1),
    .addr2     (dmem_addr2)
  );

  tp_alu #(.DATA_W(DATA_W)) u_alu (
    .op       (alu_op_e'(opcode[2:0])),
    .a        (dmem_rdata1),
    .b        (dmem_rdata2),
    .cin_en   (ctl.c),
    .invert_b (ctl.a),
    .flag_c   (flags.c),
    .y        (alu_y),
    .flags_o  (alu_flags)
  );

  tp_flag_reg #(.FLAG_MASK(FLAG_MASK)) u_flags (
    .clk   (clk),
    .rst_n (rst_n),
    .we    (en && is_alu),
    .d     (alu_flags),
    .q     (flags)
  );

  tp_pc_unit #(.PC_W(PC_W)) u_pc (
    .clk       (clk),
    .rst_n     (rst_n),
    .en        (en),
    .is_branch (is_br),
    .negate    (ctl.a),
    .bmask     (op2_x[3:0]),
    .flags     (flags),
    .target    (op1_x[PC_W-1:0]),
    .pc        (imem_addr),
    .taken     (branch_taken)
  );

  always_comb begin
    dmem_we    = en && ctl.w && (is_alu || is_store);
    dmem_wdata = is_store ? op2_x[DATA_W-1:0] : alu_y;
  end

endmodule
