// tp_adc: behavioural model of the flash ADC behind a multi-level ROM sub-block.
//
// Behavioural model, not synthesizable hardware: the real part is an analog
// converter. The analog input is carried as a voltage in millivolts. The
// converter divides 0..VDD_MV into 2**BITS equal bins and outputs the bin
// number, clamped to the top code: code = min(floor(vin_mv * 2**BITS / VDD_MV),
// 2**BITS - 1). The conversion is instantaneous here; the printed converter's
// settling time is part of the ROM access time, not modelled. Uniform bins
// are this design's choice; the published design only states that an ADC
// tells the voltage levels of a multi-bit cross-point apart.
module tp_adc #(
  parameter int unsigned BITS   = 2,
  parameter int unsigned VDD_MV = 1000
) (
  input  logic [15:0]     vin_mv,
  output logic [BITS-1:0] code
);

  localparam int unsigned LEVELS = 1 << BITS;

  always_comb begin
    int unsigned bin;
    bin = (32'(vin_mv) * LEVELS) / VDD_MV;
    if (bin > LEVELS - 1) bin = LEVELS - 1;
    code = BITS'(bin);
  end

endmodule
