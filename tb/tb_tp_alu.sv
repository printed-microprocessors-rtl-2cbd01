// tb_tp_alu: self-checking test of the TP-ISA ALU.
//
// Drives every operation and control-bit combination the ISA defines with
// random operands (plus corner values) at DATA_W = 8 and compares result and
// flags with a reference computed here from integer arithmetic.
module tb_tp_alu;
  import tp_pkg::*;

  localparam int unsigned W = 8;

  logic         clk = 1'b0;
  alu_op_e      op;
  logic [W-1:0] a, b, y;
  logic         cin_en, invert_b, flag_c;
  flags_t       fl;
  int           checks = 0, failures = 0;

  tp_alu #(.DATA_W(W)) dut (
    .op(op), .a(a), .b(b), .cin_en(cin_en), .invert_b(invert_b),
    .flag_c(flag_c), .y(y), .flags_o(fl)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Reference model: integers, not the ALU's expressions.
  task automatic check(input string name);
    int ia, ib, res, c_exp, v_exp, sa, sb, sr;
    logic [W-1:0] ry;
    ia = int'(a); ib = int'(b); c_exp = 0; v_exp = 0;
    case (op)
      ALU_ADD: begin
        if (!invert_b) res = ia + ib + (cin_en ? int'(flag_c) : 0);
        else           res = ia + (255 - ib) + (cin_en ? int'(flag_c) : 1);
        c_exp = (res > 255) ? 1 : 0;
        ry = W'(res);
        sa = (ia > 127) ? ia - 256 : ia;
        sb = invert_b ? (((255 - ib) > 127) ? (255 - ib) - 256 : (255 - ib))
                      : ((ib > 127) ? ib - 256 : ib);
        sr = sa + sb + ((cin_en ? int'(flag_c) : int'(invert_b)));
        v_exp = (sr > 127 || sr < -128) ? 1 : 0;
      end
      ALU_AND: ry = W'(ia & ib);
      ALU_OR:  ry = W'(ia | ib);
      ALU_XOR: ry = W'(ia ^ ib);
      ALU_NOT: ry = W'(255 - ib);
      ALU_RL: begin
        ry = W'((ib * 2) % 256 + (cin_en ? int'(flag_c) : ib / 128));
        c_exp = ib / 128;
      end
      default: begin // ALU_RR
        if (cin_en)        ry = W'(ib / 2 + 128 * int'(flag_c));
        else if (invert_b) ry = W'(ib / 2 + 128 * (ib / 128));
        else               ry = W'(ib / 2 + 128 * (ib % 2));
        c_exp = ib % 2;
      end
    endcase
    checks++;
    if (y !== ry || fl.c !== c_exp[0] || fl.v !== v_exp[0] ||
        fl.z !== (ry == 0) || fl.s !== ry[W-1]) begin
      failures++;
      $display("FAIL %s a=%h b=%h cin_en=%b inv=%b fc=%b: y=%h flags=%b expected y=%h c=%0d v=%0d",
               name, a, b, cin_en, invert_b, flag_c, y, fl, ry, c_exp, v_exp);
    end
  endtask

  // Mnemonic table: {op, C, A}
  typedef struct { alu_op_e op; logic c; logic a; string name; } mn_t;
  mn_t mns [15];

  initial begin
    mns[0]  = '{ALU_ADD, 1'b0, 1'b0, "ADD"};
    mns[1]  = '{ALU_ADD, 1'b1, 1'b0, "ADC"};
    mns[2]  = '{ALU_ADD, 1'b0, 1'b1, "SUB"};
    mns[3]  = '{ALU_ADD, 1'b1, 1'b1, "SBB"};
    mns[4]  = '{ALU_AND, 1'b0, 1'b0, "AND"};
    mns[5]  = '{ALU_OR,  1'b0, 1'b0, "OR"};
    mns[6]  = '{ALU_XOR, 1'b0, 1'b0, "XOR"};
    mns[7]  = '{ALU_NOT, 1'b0, 1'b0, "NOT"};
    mns[8]  = '{ALU_RL,  1'b0, 1'b0, "RL"};
    mns[9]  = '{ALU_RL,  1'b1, 1'b0, "RLC"};
    mns[10] = '{ALU_RR,  1'b0, 1'b0, "RR"};
    mns[11] = '{ALU_RR,  1'b1, 1'b0, "RRC"};
    mns[12] = '{ALU_RR,  1'b0, 1'b1, "RRA"};
    mns[13] = '{ALU_ADD, 1'b0, 1'b1, "CMP"};
    mns[14] = '{ALU_AND, 1'b0, 1'b0, "TEST"};
    @(posedge clk);
    // Directed corner cases.
    op = ALU_ADD; cin_en = 0; invert_b = 0; flag_c = 0;
    a = 8'h7f; b = 8'h01; #1 check("ADD-ovf");
    if (y !== 8'h80 || !fl.v || !fl.s) begin failures++; $display("FAIL 7f+01"); end
    checks++;
    a = 8'hff; b = 8'h01; #1 check("ADD-carry");
    if (y !== 8'h00 || !fl.c || !fl.z) begin failures++; $display("FAIL ff+01"); end
    checks++;
    invert_b = 1; a = 8'h05; b = 8'h05; #1 check("SUB-zero");
    if (y !== 8'h00 || !fl.c || !fl.z) begin failures++; $display("FAIL 5-5"); end
    checks++;
    a = 8'h04; b = 8'h05; #1 check("SUB-borrow");
    if (y !== 8'hff || fl.c) begin failures++; $display("FAIL 4-5"); end
    checks++;
    op = ALU_RR; invert_b = 1; b = 8'h82; #1 check("RRA");
    if (y !== 8'hc1 || fl.c) begin failures++; $display("FAIL RRA 82"); end
    checks++;
    // Random sweep over all mnemonics.
    for (int i = 0; i < 6000; i++) begin
      @(posedge clk);
      op       = mns[i % 15].op;
      cin_en   = mns[i % 15].c;
      invert_b = mns[i % 15].a;
      a        = W'($urandom);
      b        = W'($urandom);
      flag_c   = 1'($urandom);
      #1 check(mns[i % 15].name);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
