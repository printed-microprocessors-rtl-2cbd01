// tb_tp_system_full: the complete system at its default size running its
// default program, an 8 x 8 -> 16-bit shift-and-add multiply.
//
// For each operand pair the testbench writes A to word 0x10 and B to word
// 0x11 through the external port, releases the core, waits until it reaches
// the closing branch-to-self and reads the product from words 0x12 (low) and
// 0x13 (high). The product must equal A * B, and with one instruction per
// cycle the run must last exactly 66 + 2 * popcount(B) cycles: 10 set-up
// instructions and 8 loop passes of 7 instructions, 2 more when the
// multiplier bit is set.
module tb_tp_system_full;
  import tp_pkg::*;

  logic        clk = 1'b0, rst_n = 1'b0, run = 1'b0, ext_we = 1'b0, taken, dwe;
  logic [7:0]  ext_addr = '0, ext_wdata = '0, ext_rdata, pc;
  logic [23:0] instr;
  flags_t      flags;
  int          checks = 0, failures = 0;

  tp_system dut (
    .clk(clk), .rst_n(rst_n), .run(run), .ext_we(ext_we), .ext_addr(ext_addr),
    .ext_wdata(ext_wdata), .ext_rdata(ext_rdata), .pc(pc), .instr(instr),
    .flags(flags), .branch_taken(taken), .dmem_we(dwe)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic poke(input logic [7:0] addr, input logic [7:0] data);
    @(negedge clk); ext_we = 1; ext_addr = addr; ext_wdata = data;
    @(negedge clk); ext_we = 0;
  endtask

  task automatic peek(input logic [7:0] addr, output logic [7:0] data);
    @(negedge clk); ext_addr = addr; #1 data = ext_rdata;
  endtask

  task automatic multiply(input logic [7:0] a, input logic [7:0] b);
    int cycles, expect_cycles;
    logic [7:0] lo, hi;
    run = 0;
    rst_n = 0; @(negedge clk); rst_n = 1;
    poke(8'h10, a); poke(8'h11, b);
    @(negedge clk); run = 1;
    cycles = 0;
    // Halt: a taken branch whose target is its own address.
    while (!(taken && instr[15:8] == pc)) begin
      @(posedge clk); #1 cycles++;
      if (cycles > 1000) break;
    end
    @(negedge clk); run = 0;
    peek(8'h12, lo); peek(8'h13, hi);
    expect_cycles = 66 + 2 * $countones(b);
    checks += 2;
    if ({hi, lo} !== 16'(int'(a) * int'(b))) begin
      failures++; $display("FAIL %0d * %0d = %0d, expected %0d", a, b, {hi, lo}, int'(a) * int'(b));
    end
    if (cycles != expect_cycles) begin
      failures++; $display("FAIL %0d * %0d took %0d cycles, expected %0d", a, b, cycles, expect_cycles);
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    multiply(8'd0, 8'd0);
    multiply(8'd255, 8'd255);
    multiply(8'd1, 8'd200);
    multiply(8'd13, 8'd11);
    for (int i = 0; i < 300; i++) multiply(8'($urandom), 8'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
