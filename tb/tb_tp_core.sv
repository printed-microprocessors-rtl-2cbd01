// tb_tp_core: self-checking random-instruction test of the single-cycle core.
//
// The core runs from a 256-word instruction memory filled with random TP-ISA
// instructions (every opcode, random control bits, operands and branch
// masks) against a data memory modelled here. An instruction-set model
// written in this testbench executes the same instructions in lock step; each
// cycle the PC, the write-back (enable, address, data), the flags and the
// branch decision must agree. Each instruction must take exactly one cycle.
// Coverage counters make sure that every instruction class, taken and
// untaken branches and BAR-relative addressing all occurred.
module tb_tp_core;
  import tp_pkg::*;

  logic        clk = 1'b0, rst_n = 1'b0, en = 1'b0;
  logic [7:0]  pc, a1, a2;
  logic [23:0] instr;
  logic [7:0]  rd1, rd2, wd;
  logic        we, taken;
  flags_t      flags;

  logic [23:0] imem [256];
  logic [7:0]  dmem [256];

  // Reference state.
  logic [7:0]  r_pc, r_bar1;
  logic [3:0]  r_flags;
  logic [7:0]  r_mem [256];

  int checks = 0, failures = 0;
  int n_op [16];
  int n_taken = 0, n_not_taken = 0, n_bar_rel = 0, n_nowrite = 0;

  tp_core dut (
    .clk(clk), .rst_n(rst_n), .en(en), .imem_addr(pc), .imem_data(instr),
    .dmem_addr1(a1), .dmem_rdata1(rd1), .dmem_addr2(a2), .dmem_rdata2(rd2),
    .dmem_we(we), .dmem_wdata(wd), .flags(flags), .branch_taken(taken)
  );

  assign instr = imem[pc];
  assign rd1   = dmem[a1];
  assign rd2   = dmem[a2];
  always_ff @(posedge clk) if (we) dmem[a1] <= wd;

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [7:0] resolve(input logic [7:0] op);
    return (op[7] ? r_bar1 : 8'h00) + {1'b0, op[6:0]};
  endfunction

  // Expected effect of one instruction on the reference state.
  logic       e_we, e_taken, e_flag_we;
  logic [7:0] e_addr, e_data, e_pc;
  logic [3:0] e_flags;

  task automatic model_step(input logic [23:0] w);
    int op, wbit, cbit, abit, o1, o2, x, y, res, cin, carry, ovf, sx, sy, sr;
    op = int'(w[23:20]); wbit = int'(w[19]); cbit = int'(w[18]); abit = int'(w[17]);
    o1 = int'(w[15:8]); o2 = int'(w[7:0]);
    e_we = 0; e_taken = 0; e_flag_we = 0; e_addr = resolve(8'(o1)); e_data = 0;
    e_pc = r_pc + 1; e_flags = r_flags;
    x = int'(r_mem[resolve(8'(o1))]); y = int'(r_mem[resolve(8'(o2))]);
    carry = 0; ovf = 0; res = 0;
    if (op <= 6) begin
      case (op)
        0: begin
          if (abit) y = 255 - y;
          cin = cbit ? int'(r_flags[1]) : abit;
          res = x + y + cin;
          carry = res / 256;
          sx = (x >= 128) ? x - 256 : x; sy = (y >= 128) ? y - 256 : y;
          sr = sx + sy + cin;
          ovf = (sr > 127 || sr < -128) ? 1 : 0;
          res = res % 256;
        end
        1: res = x & y;
        2: res = x | y;
        3: res = x ^ y;
        4: res = 255 - y;
        5: begin res = (y * 2) % 256 + (cbit ? int'(r_flags[1]) : y / 128); carry = y / 128; end
        default: begin
          res = y / 2 + 128 * (cbit ? int'(r_flags[1]) : (abit ? y / 128 : y % 2));
          carry = y % 2;
        end
      endcase
      e_flag_we = 1;
      e_flags = {res >= 128, res == 0, carry[0], ovf[0]};
      e_we = wbit[0];
      e_data = 8'(res);
    end else if (op == 7) begin
      e_we = wbit[0]; e_data = 8'(o2);
    end else if (op == 9) begin
      e_taken = ((int'(r_flags) & (o2 % 16)) != 0) ^ abit[0];
      if (e_taken) e_pc = 8'(o1);
    end
  endtask

  // Random instruction: opcode 0..9 mostly, sometimes an unused code.
  function automatic logic [23:0] rand_instr();
    logic [3:0] op;
    logic [3:0] ctl;
    logic [7:0] o1, o2;
    op = ($urandom % 20 == 0) ? 4'(10 + $urandom % 6) : 4'($urandom % 10);
    ctl = 4'($urandom);
    o1 = 8'($urandom % 24) | ($urandom % 2 ? 8'h80 : 8'h00);
    o2 = 8'($urandom % 24) | ($urandom % 2 ? 8'h80 : 8'h00);
    if (op == 4'd8) begin ctl[3] = 1'b1; o1 = 8'($urandom % 24) | ($urandom % 2 ? 8'h80 : 8'h00); o2 = 8'($urandom % 2); end
    if (op == 4'd7) o2 = 8'($urandom);
    if (op == 4'd9) begin ctl[0] = 1'b1; o1 = 8'($urandom); o2 = 8'($urandom % 16); end
    return {op, ctl, o1, o2};
  endfunction

  initial begin
    for (int i = 0; i < 16; i++) n_op[i] = 0;
    for (int i = 0; i < 256; i++) begin
      imem[i] = rand_instr(); dmem[i] = 8'($urandom); r_mem[i] = dmem[i];
    end
    r_pc = 0; r_bar1 = 0; r_flags = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    // Held core: nothing may change while en = 0.
    repeat (3) @(posedge clk);
    #1;
    checks++;
    if (pc !== 8'h00 || flags !== 4'h0) begin failures++; $display("FAIL core moved while held"); end
    en = 1;
    for (int cyc = 0; cyc < 20000; cyc++) begin
      // Re-seed the program now and then so that branches do not trap it in a loop.
      if (cyc % 500 == 499) for (int i = 0; i < 256; i++) imem[i] = rand_instr();
      @(negedge clk);
      checks++;
      if (pc !== r_pc) begin
        failures++; $display("FAIL cyc %0d pc=%h expected %h", cyc, pc, r_pc);
        r_pc = pc;
      end
      model_step(imem[r_pc]);
      n_op[int'(imem[r_pc][23:20])]++;
      if (imem[r_pc][23:20] <= 4'd7 && imem[r_pc][15]) n_bar_rel++;
      if (imem[r_pc][23:20] <= 4'd6 && !imem[r_pc][19]) n_nowrite++;
      if (imem[r_pc][23:20] == 4'd9) begin if (e_taken) n_taken++; else n_not_taken++; end
      checks++;
      if (we !== e_we || (e_we && (a1 !== e_addr || wd !== e_data)) || taken !== e_taken) begin
        failures++;
        $display("FAIL cyc %0d instr=%h we=%b a1=%h wd=%h taken=%b; expected we=%b a=%h d=%h taken=%b",
                 cyc, imem[r_pc], we, a1, wd, taken, e_we, e_addr, e_data, e_taken);
      end
      // Update the reference state as the clock edge will.
      if (e_we) r_mem[e_addr] = e_data;
      if (e_flag_we) r_flags = e_flags;
      if (imem[r_pc][23:20] == 4'd8 && imem[r_pc][19] && imem[r_pc][0]) r_bar1 = r_mem[{1'b0, imem[r_pc][14:8]}];
      r_pc = e_pc;
      @(posedge clk);
      #1;
      checks++;
      if (flags !== r_flags) begin
        failures++; $display("FAIL cyc %0d flags=%b expected %b", cyc, flags, r_flags);
        r_flags = flags;
      end
    end
    for (int i = 0; i < 256; i++) begin
      checks++;
      if (dmem[i] !== r_mem[i]) begin failures++; $display("FAIL mem[%0d]=%h expected %h", i, dmem[i], r_mem[i]); end
    end
    for (int i = 0; i < 10; i++) begin
      checks++;
      if (n_op[i] == 0) begin failures++; $display("FAIL opcode %0d never executed", i); end
    end
    checks++;
    if (n_taken == 0 || n_not_taken == 0 || n_bar_rel == 0 || n_nowrite == 0) begin
      failures++; $display("FAIL coverage taken=%0d not=%0d bar=%0d nowrite=%0d",
                           n_taken, n_not_taken, n_bar_rel, n_nowrite);
    end
    $display("coverage: taken=%0d not_taken=%0d bar_relative=%0d no_write=%0d",
             n_taken, n_not_taken, n_bar_rel, n_nowrite);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
