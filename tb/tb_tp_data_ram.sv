// tb_tp_data_ram: self-checking test of the two-read, one-write data memory.
//
// Random writes and reads on both ports against a shadow array, including a
// read of the address being written in the same cycle (old data expected).
module tb_tp_data_ram;
  localparam int unsigned W = 8, D = 256;
  logic         clk = 1'b0, we;
  logic [7:0]   raddr1, raddr2, waddr;
  logic [W-1:0] rdata1, rdata2, wdata;
  logic [W-1:0] shadow [D];
  int           checks = 0, failures = 0;

  tp_data_ram #(.DATA_W(W), .DEPTH(D)) dut (
    .clk(clk), .raddr1(raddr1), .rdata1(rdata1), .raddr2(raddr2), .rdata2(rdata2),
    .we(we), .waddr(waddr), .wdata(wdata)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; raddr1 = 0; raddr2 = 0; waddr = 0; wdata = 0;
    // Fill every word first.
    for (int i = 0; i < D; i++) begin
      @(negedge clk); we = 1; waddr = 8'(i); wdata = W'($urandom); shadow[i] = wdata;
    end
    for (int i = 0; i < 4000; i++) begin
      @(negedge clk);
      we = 1'($urandom); waddr = 8'($urandom); wdata = W'($urandom);
      raddr1 = (i % 4 == 0) ? waddr : 8'($urandom);
      raddr2 = 8'($urandom);
      #1;
      checks++;
      if (rdata1 !== shadow[raddr1] || rdata2 !== shadow[raddr2]) begin
        failures++;
        $display("FAIL r1[%h]=%h exp %h r2[%h]=%h exp %h", raddr1, rdata1, shadow[raddr1],
                 raddr2, rdata2, shadow[raddr2]);
      end
      @(posedge clk);
      if (we) shadow[waddr] = wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
