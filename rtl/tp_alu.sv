// tp_alu: the TP-ISA arithmetic and logic unit.
//
// Purely combinational. It computes ADD/ADC/SUB/SBB/CMP (one adder with an
// optional inverted second operand), AND/TEST, OR, XOR, NOT and the rotates
// RL/RLC/RR/RRC/RRA, and the four flags Sign, Zero, Carry and oVerflow of the
// result. There is no shifter and no population count: the published ISA
// leaves both out to save cells, and rotates through carry plus ADC/SBB are
// what lets a narrow core work on wider ("coalesced") data.
//
// Interface: op selects the operation, a is the operand-1 memory word, b the
// operand-2 memory word, cin_en/invert_b/arith are the C and A control bits,
// flag_c is the current carry flag. y is the result, flags_o the new flags.
//
// Choices of this design (the ISA table names the operations only):
//  * carry-in of the adder is flag C when C=1, otherwise A, so SUB = a+~b+1 and
//    SBB = a+~b+C (carry set means "no borrow");
//  * the one-operand operations NOT/RL/RR take their source from operand 2;
//  * logic operations clear C and V; rotates put the bit rotated out into C
//    and clear V; RRA is an arithmetic right shift by one (sign bit kept).
module tp_alu
  import tp_pkg::*;
#(
  parameter int unsigned DATA_W = 8
) (
  input  alu_op_e           op,
  input  logic [DATA_W-1:0] a,
  input  logic [DATA_W-1:0] b,
  input  logic              cin_en,
  input  logic              invert_b,
  input  logic              flag_c,
  output logic [DATA_W-1:0] y,
  output flags_t            flags_o
);

  logic [DATA_W-1:0] b_eff;
  logic [DATA_W:0]   sum;
  logic              cin;
  logic              c_out;
  logic              v_out;

  always_comb begin
    b_eff = invert_b ? ~b : b;
    cin   = cin_en ? flag_c : invert_b;
    sum   = {1'b0, a} + {1'b0, b_eff} + {{DATA_W{1'b0}}, cin};
    y     = '0;
    c_out = 1'b0;
    v_out = 1'b0;
    unique case (op)
      ALU_ADD: begin
        y     = sum[DATA_W-1:0];
        c_out = sum[DATA_W];
        v_out = (a[DATA_W-1] == b_eff[DATA_W-1]) && (y[DATA_W-1] != a[DATA_W-1]);
      end
      ALU_AND: y = a & b;
      ALU_OR:  y = a | b;
      ALU_XOR: y = a ^ b;
      ALU_NOT: y = ~b;
      ALU_RL: begin
        y     = {b[DATA_W-2:0], (cin_en ? flag_c : b[DATA_W-1])};
        c_out = b[DATA_W-1];
      end
      ALU_RR: begin
        if (cin_en)        y = {flag_c, b[DATA_W-1:1]};
        else if (invert_b) y = {b[DATA_W-1], b[DATA_W-1:1]};
        else               y = {b[0], b[DATA_W-1:1]};
        c_out = b[0];
      end
      default: y = '0;
    endcase
    flags_o.s = y[DATA_W-1];
    flags_o.z = (y == '0);
    flags_o.c = c_out;
    flags_o.v = v_out;
  end

endmodule
