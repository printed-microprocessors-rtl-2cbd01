// tb_tp_bar_file: self-checking test of the BAR registers and address resolution.
//
// Uses the 4-BAR configuration (2 select bits, 6-bit offsets) so that every
// select value and the hard-wired zero BAR[0] are exercised. A shadow copy of
// the BARs kept here gives the expected addresses.
module tb_tp_bar_file;
  localparam int unsigned NB = 4;
  logic       clk = 1'b0, rst_n = 1'b0;
  logic [7:0] op1, op2, addr1, addr2, bar_wdata;
  logic       bar_we, direct1;
  logic [1:0] bar_idx;
  logic [7:0] shadow [NB];
  int         checks = 0, failures = 0;

  tp_bar_file #(.NUM_BARS(NB)) dut (
    .clk(clk), .rst_n(rst_n), .op1(op1), .op2(op2), .direct1(direct1), .bar_we(bar_we),
    .bar_idx(bar_idx), .bar_wdata(bar_wdata), .addr1(addr1), .addr2(addr2)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [7:0] expect_addr(input logic [7:0] op);
    return shadow[op[7:6]] + {2'b00, op[5:0]};
  endfunction

  initial begin
    for (int i = 0; i < NB; i++) shadow[i] = '0;
    direct1 = 0; bar_we = 0; bar_idx = 0; bar_wdata = 0; op1 = 0; op2 = 0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      op1 = 8'($urandom); op2 = 8'($urandom); direct1 = ($urandom % 4) == 0;
      #1;
      checks++;
      if (addr1 !== (direct1 ? {2'b00, op1[5:0]} : expect_addr(op1)) || addr2 !== expect_addr(op2)) begin
        failures++;
        $display("FAIL op1=%h op2=%h addr1=%h addr2=%h exp %h %h",
                 op1, op2, addr1, addr2, expect_addr(op1), expect_addr(op2));
      end
      // Random SETBAR, including attempts to write BAR[0].
      bar_we = 1'($urandom); bar_idx = 2'($urandom); bar_wdata = 8'($urandom);
      @(posedge clk);
      if (bar_we && bar_idx != 0) shadow[bar_idx] = bar_wdata;
      #1 bar_we = 0;
    end
    // BAR[0] must still read zero: select 0 is direct addressing.
    @(negedge clk); op1 = 8'h3f; op2 = 8'h00; #1;
    checks++;
    if (addr1 !== 8'h3f || addr2 !== 8'h00) begin failures++; $display("FAIL BAR0 not zero"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
