// tb_tp_adc: self-checking test of the flash ADC model.
//
// Sweeps the input from 0 to 1100 mV in 1 mV steps for a 2-bit and a 4-bit
// converter (VDD = 1000 mV) and checks the code against the bin edges
// k * 1000 / 2**BITS, with inputs above VDD clamped to the top code.
module tb_tp_adc;
  logic        clk = 1'b0;
  logic [15:0] vin;
  logic [1:0]  code2;
  logic [3:0]  code4;
  int          checks = 0, failures = 0;

  tp_adc #(.BITS(2), .VDD_MV(1000)) dut2 (.vin_mv(vin), .code(code2));
  tp_adc #(.BITS(4), .VDD_MV(1000)) dut4 (.vin_mv(vin), .code(code4));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int e2, e4;
    for (int mv = 0; mv <= 1100; mv++) begin
      @(negedge clk);
      vin = 16'(mv);
      #1;
      e2 = 0; while (e2 < 3  && mv >= (e2 + 1) * 250)  e2++;
      e4 = 0; while (e4 < 15 && mv * 2 >= (e4 + 1) * 125) e4++;
      checks++;
      if (code2 !== 2'(e2) || code4 !== 4'(e4)) begin
        failures++;
        $display("FAIL %0d mV: code2=%0d exp %0d code4=%0d exp %0d", mv, code2, e2, code4, e4);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
