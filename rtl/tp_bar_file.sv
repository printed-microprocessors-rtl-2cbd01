// tp_bar_file: base address registers (BARs) and operand address resolution.
//
// A TP-ISA operand is {bar_select, offset}: its most significant bits pick a
// base address register and the remaining bits are an offset added to it.
// BAR[0] is hard-wired to zero, so select value 0 gives direct addressing.
// Both operands of an instruction are resolved at once (two adders). With
// direct1 = 1 operand 1 ignores its select bits and addresses memory directly
// (SETBAR's pointer operand). SETBAR writes BAR[index] on the rising clock
// edge; writes to BAR[0] are ignored.
//
// NUM_BARS counts every selectable base including the zero BAR[0]
// (the standard 2-BAR core has one real register). With NUM_BARS = 1 there are
// no select bits and no registers at all: an operand is the address itself,
// as in a program-specific core whose program needs no BAR.
//
// Interface: op1/op2 are the raw instruction operands, addr1/addr2 the
// resolved data memory addresses (combinational). bar_we/bar_idx/bar_wdata
// form the SETBAR write port. Reset (active-low, asynchronous) clears the BARs;
// the reset behaviour is this design's choice.
module tp_bar_file #(
  parameter int unsigned NUM_BARS = 2,   // 1, 2 or 4 (powers of two)
  parameter int unsigned OP1_W    = 8,
  parameter int unsigned OP2_W    = 8,
  parameter int unsigned ADDR_W   = 8,
  localparam int unsigned SEL_W   = (NUM_BARS > 1) ? $clog2(NUM_BARS) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [OP1_W-1:0]  op1,
  input  logic [OP2_W-1:0]  op2,
  input  logic              direct1,
  input  logic              bar_we,
  input  logic [SEL_W-1:0]  bar_idx,
  input  logic [ADDR_W-1:0] bar_wdata,
  output logic [ADDR_W-1:0] addr1,
  output logic [ADDR_W-1:0] addr2
);

  // Zero-extend (or truncate) an offset to the address width.
  function automatic logic [ADDR_W-1:0] ext(input logic [31:0] v);
    return v[ADDR_W-1:0];
  endfunction

  if (NUM_BARS > 1) begin : g_bars
    // BAR[0] is the constant zero and has no register.
    logic [ADDR_W-1:0] bar_q [1:NUM_BARS-1];
    logic [SEL_W-1:0]  sel1, sel2;
    logic [31:0]       off1, off2;

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        for (int i = 1; i < NUM_BARS; i++) bar_q[i] <= '0;
      end else if (bar_we && (bar_idx != '0)) begin
        bar_q[bar_idx] <= bar_wdata;
      end
    end

    always_comb begin
      sel1  = op1[OP1_W-1 -: SEL_W];
      sel2  = op2[OP2_W-1 -: SEL_W];
      off1  = 32'(op1[OP1_W-SEL_W-1:0]);
      off2  = 32'(op2[OP2_W-SEL_W-1:0]);
      addr1 = (direct1 || sel1 == '0) ? ext(off1) : bar_q[sel1] + ext(off1);
      addr2 = (sel2 == '0) ? ext(off2) : bar_q[sel2] + ext(off2);
    end
  end else begin : g_nobars
    // No base registers: the SETBAR port has nothing to write and direct1
    // changes nothing.
    always_comb begin
      addr1 = ext(32'(op1));
      addr2 = ext(32'(op2));
    end
  end

endmodule
