// tb_tp_pc_unit: self-checking test of the program counter and branch unit.
//
// Random sequences of non-branch steps, BR and BRN with random masks and
// flags; the expected PC is tracked here. Also checks the hold (en = 0) and
// the 8-bit wrap-around.
module tb_tp_pc_unit;
  import tp_pkg::*;
  logic       clk = 1'b0, rst_n = 1'b0, en, is_branch, negate, taken;
  logic [3:0] bmask;
  flags_t     flags;
  logic [7:0] target, pc, exp_pc;
  int         checks = 0, failures = 0, n_taken = 0, n_not = 0;

  tp_pc_unit #(.PC_W(8)) dut (
    .clk(clk), .rst_n(rst_n), .en(en), .is_branch(is_branch), .negate(negate),
    .bmask(bmask), .flags(flags), .target(target), .pc(pc), .taken(taken)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit t;
    en = 0; is_branch = 0; negate = 0; bmask = 0; flags = '0; target = 0;
    exp_pc = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      en = ($urandom % 8) != 0;
      is_branch = 1'($urandom); negate = 1'($urandom);
      bmask = 4'($urandom); flags = flags_t'(4'($urandom)); target = 8'($urandom);
      t = 0;
      if (is_branch) begin
        t = 0;
        for (int k = 0; k < 4; k++) if (bmask[k] && flags[k]) t = 1;
        if (negate) t = !t;
      end
      #1;
      checks++;
      if (taken !== t) begin failures++; $display("FAIL taken=%b expected %b", taken, t); end
      if (is_branch) begin if (t) n_taken++; else n_not++; end
      @(posedge clk);
      if (en) exp_pc = t ? target : 8'(exp_pc + 1);
      #1;
      checks++;
      if (pc !== exp_pc) begin failures++; $display("FAIL pc=%h expected %h", pc, exp_pc); end
    end
    checks++;
    if (n_taken == 0 || n_not == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
