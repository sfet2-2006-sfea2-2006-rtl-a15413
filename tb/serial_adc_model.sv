// serial_adc_model: behavioural model of a serial-output ADC for testbenches.
//
// On the rising edge of `en` the model converts `value` and drives its most
// significant bit on `data`; each falling edge of `sclk` while `en` is high
// moves to the next bit. `conversions` counts the conversions.
module serial_adc_model #(
  parameter int unsigned BITS = 12
) (
  input  logic            en,
  input  logic            sclk,
  input  logic [BITS-1:0] value,
  output logic            data,
  output int              conversions
);
  logic [BITS-1:0] sh;
  initial begin data = 1'b0; sh = '0; conversions = 0; end

  always @(posedge en) begin
    sh          = value;
    data        = sh[BITS-1];
    conversions = conversions + 1;
  end

  always @(negedge sclk) begin
    if (en) begin
      sh   = {sh[BITS-2:0], 1'b0};
      data = sh[BITS-1];
    end
  end
endmodule
