// tp_flag_reg: the TP-ISA flags register (Sign, Zero, Carry, oVerflow).
//
// Loaded on the rising clock edge whenever an ALU (M-type) instruction
// executes, including CMP and TEST, which write no memory. FLAG_MASK lists the
// flags that physically exist: in a program-specific core the flags a program
// never tests are removed, and a removed flag reads as 0 and has no
// flip-flop. The default keeps all four, as in the standard ISA.
//
// Interface: we loads d; q is the current value. Reset (active-low,
// asynchronous) clears the flags, which is this design's choice.
module tp_flag_reg
  import tp_pkg::*;
#(
  parameter logic [3:0] FLAG_MASK = 4'b1111   // {S, Z, C, V}
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   we,
  input  flags_t d,
  output flags_t q
);

  for (genvar i = 0; i < 4; i++) begin : g_flag
    if (FLAG_MASK[i]) begin : g_ff
      logic bit_q;
      always_ff @(posedge clk or negedge rst_n) begin
        if (!rst_n)  bit_q <= 1'b0;
        else if (we) bit_q <= d[i];
      end
      assign q[i] = bit_q;
    end else begin : g_none
      assign q[i] = 1'b0;
    end
  end

endmodule
