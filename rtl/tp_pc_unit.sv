// tp_pc_unit: program counter and branch resolution of the TP-ISA core.
//
// Each cycle the PC either steps to the next instruction or, for a taken
// branch, loads the target carried in operand 1. A branch (BR) is taken when
// any flag selected by its 4-bit mask is set; the negated branch (BRN, control
// bit A = 1) is taken when none is. BRN with an empty mask is therefore an
// unconditional jump. The branch is resolved in the same cycle, so a taken
// branch costs no extra cycle in the single-stage core.
//
// Interface: is_branch/negate/bmask/flags/target come from the decoder and
// the flags register; pc is the address of the instruction being executed.
// Reset (active-low, asynchronous) starts execution at address 0; the reset
// address is this design's choice. PC_W is 8 in the standard ISA and
// ceil(log2 N) for a program of N instructions in a program-specific core.
module tp_pc_unit
  import tp_pkg::*;
#(
  parameter int unsigned PC_W = 8
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            en,
  input  logic            is_branch,
  input  logic            negate,
  input  logic [3:0]      bmask,
  input  flags_t          flags,
  input  logic [PC_W-1:0] target,
  output logic [PC_W-1:0] pc,
  output logic            taken
);

  always_comb begin
    taken = is_branch && ((|(bmask & flags)) ^ negate);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     pc <= '0;
    else if (en)    pc <= taken ? target : pc + 1'b1;
  end

endmodule
