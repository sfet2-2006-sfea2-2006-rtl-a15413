// tb_charge_readout: five serial ADC models hold random 12-bit values; after
// each FT the block must raise `sample` exactly SAMPLE_DLY cycles after the
// clock edge that takes ft_pulse (1.7 us at the default), read all five ADCs
// and deliver their values with charge_valid SAMPLE_DLY + 2*ADC_BITS + 2
// cycles after that edge. (The monitor sees each output one edge after it
// is set, hence the +1 in the checks.) An FT
// during a conversion must be counted as missed.
`timescale 1ns/1ps
module tb_charge_readout;
  localparam int NCH = 5, BITS = 12, DLY = 68;
  // expected cycle counts from the FT to sample and to the result, as seen here
  localparam int T_SAMPLE = DLY + 1, T_VALID = DLY + 2*BITS + 3;
  logic clk = 1'b0, rst_n = 1'b1, ft_pulse = 1'b0;
  logic sample, adc_en, adc_clk, valid, busy;
  logic [NCH-1:0] adc_data;
  logic [NCH-1:0][BITS-1:0] charge;
  logic [NCH-1:0][BITS-1:0] value;
  logic [15:0] missed;
  int conv [NCH];
  int checks = 0, failures = 0;
  longint cyc = 0, t_ft = 0, t_sample = 0, t_valid = 0;

  charge_readout #(.NCH(NCH), .ADC_BITS(BITS), .SAMPLE_DLY(DLY)) dut (
    .clk, .rst_n, .ft_pulse, .sample, .adc_en, .adc_clk, .adc_data,
    .charge, .charge_valid(valid), .busy, .missed);

  for (genvar i = 0; i < NCH; i++) begin : g_adc
    serial_adc_model #(.BITS(BITS)) u_adc (
      .en(adc_en), .sclk(adc_clk), .value(value[i]), .data(adc_data[i]), .conversions(conv[i]));
  end

  always #12.5 clk = ~clk;

  logic sample_q = 1'b0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    sample_q <= sample;
    if (sample && !sample_q) t_sample = cyc;
    if (valid) t_valid = cyc;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #200000;
    $display("FAIL: watchdog"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1 rst_n = 1'b0;
    value = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int k = 0; k < 6; k++) begin
      for (int i = 0; i < NCH; i++) value[i] = BITS'($urandom);
      if (k == 0) value = '1;
      @(negedge clk);
      ft_pulse = 1'b1; t_ft = cyc;
      @(negedge clk);
      ft_pulse = 1'b0;
      if (k == 2) begin            // second FT during the conversion
        repeat (10) @(negedge clk);
        ft_pulse = 1'b1;
        @(negedge clk);
        ft_pulse = 1'b0;
      end
      wait (valid);
      @(posedge clk);
      #1;
      check(charge == value, $sformatf("charges %h expected %h", charge, value));
      check(int'(t_sample - t_ft) == T_SAMPLE, $sformatf("sample after %0d cycles", t_sample - t_ft));
      check(int'(t_valid - t_ft) == T_VALID, $sformatf("result after %0d cycles", t_valid - t_ft));
      check(!sample && !adc_en, "sample and enable released");
    end
    check(missed == 16'd1, $sformatf("missed %0d", missed));
    check(conv[0] == 6, $sformatf("conversions %0d", conv[0]));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
