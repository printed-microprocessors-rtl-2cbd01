// tb_tp_flag_reg: self-checking test of the flags register.
//
// Instantiates the full four-flag register and a program-specific one that
// keeps only Zero and Carry, loads random values with random enables and
// checks the held values and that removed flags read as zero.
module tb_tp_flag_reg;
  import tp_pkg::*;
  logic   clk = 1'b0, rst_n = 1'b0, we;
  flags_t d, q_full, q_zc, exp_full;
  int     checks = 0, failures = 0;

  tp_flag_reg #(.FLAG_MASK(4'b1111)) dut_full (.clk(clk), .rst_n(rst_n), .we(we), .d(d), .q(q_full));
  tp_flag_reg #(.FLAG_MASK(4'b0110)) dut_zc   (.clk(clk), .rst_n(rst_n), .we(we), .d(d), .q(q_zc));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; d = '0; exp_full = '0;
    repeat (2) @(posedge clk);
    checks++;
    if (q_full !== 4'b0000) begin failures++; $display("FAIL reset value %b", q_full); end
    rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      we = 1'($urandom); d = flags_t'(4'($urandom));
      @(posedge clk);
      if (we) exp_full = d;
      #1;
      checks++;
      if (q_full !== exp_full || q_zc !== (exp_full & 4'b0110)) begin
        failures++;
        $display("FAIL q_full=%b q_zc=%b expected %b", q_full, q_zc, exp_full);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
