// sfet2_board: digital logic of one SFET2 (TOF) or SFEA2 (ACC) board.
//
// Each TOF channel's anode signal drives three comparators. The low
// threshold (LT, 10-20 % of the peak) gives the time: its output goes to the
// HPTDC, whose record of the edges forms the hit history. The high (HT) and
// super-high (SHT) thresholds mark a charged particle and a Z>1 particle:
// they are formed into 250 ns pulses for the pre-trigger, and their logical
// sums are also recorded by the HPTDC (channels 6 and 7) so that offline
// analysis can tell real hits from LT noise. The pre-trigger returns the
// fast trigger FT, which is recorded on HPTDC channel 5 and, delayed, read
// out the HPTDC history; the FPGA also starts the charge measurement.
//
// This module holds the digital part of that scheme: tdc_input_map (the
// HPTDC channel assignment and the HT/SHT sums), trigger_fpga (HT/SHT pulse
// forming) and sfet2_fpga (control and readout). The comparators, shapers,
// ADCs, DAC and the HPTDC itself are external parts whose signals are ports.
// An SFEA2 is the same board with four ACC channels (IS_SFEA2=1): it has one
// threshold per channel, wired to the lt_comp and ht_comp inputs, and its
// HPTDC sum inputs are not used.
module sfet2_board
  import sfet2_pkg::*;
#(
  parameter bit          IS_SFEA2        = 1'b0,
  parameter int unsigned OUT_DEPTH       = 16,
  parameter int unsigned TRIG_DLY_MAX    = 256,
  parameter int unsigned SAMPLE_DLY      = 68,
  parameter int unsigned ADC_BITS        = 12,
  parameter int unsigned SETUP_LEN       = 647,
  parameter int unsigned PLL_INIT_CYCLES = 400000,
  parameter int unsigned PULSE_NS        = 250,
  localparam int unsigned NCH = IS_SFEA2 ? ACC_CH : TOF_LT_CH
) (
  input  logic                          clk,
  input  logic                          rst_n,
  // comparator outputs (asynchronous, active high)
  input  logic [4:0]                    lt_comp,
  input  logic [4:0]                    ht_comp,
  input  logic [4:0]                    sht_comp,
  // fast trigger from SPT2
  input  logic                          ft,
  // to SPT2
  output logic [4:0]                    ht_out,
  output logic [4:0]                    sht_out,
  // configuration and monitoring
  input  logic [$clog2(TRIG_DLY_MAX)-1:0] trig_delay,
  input  logic [SETUP_LEN-1:0]          tdc_setup,
  input  logic                          tdc_reinit,
  input  logic [TEMP_W-1:0]             temperature,
  // HPTDC
  output logic [7:0]                    tdc_hit,
  output logic                          tdc_trigger,
  output logic                          tdc_reset,
  input  logic                          tdc_sdata,
  output logic                          tdc_tck,
  output logic                          tdc_tms,
  output logic                          tdc_tdi,
  input  logic                          tdc_tdo,
  // shapers and ADCs
  output logic                          sample,
  output logic                          adc_en,
  output logic                          adc_clk,
  input  logic [4:0]                    adc_data,
  // DAQ
  output fpga_word_t                    daq_word,
  output logic                          daq_valid,
  input  logic                          daq_ready,
  output logic [4:0][ADC_BITS-1:0]      charge,
  output logic                          charge_valid,
  // status
  output logic                          tdc_ready,
  output logic                          cfg_error,
  output logic [15:0]                   lost_words,
  output logic [15:0]                   tdc_errors,
  output logic [15:0]                   missed_charge
);
  logic [NCH-1:0][ADC_BITS-1:0] ch_charge;

  tdc_input_map #(.NCH(NCH), .SUM_HT_EN(!IS_SFEA2), .SUM_SHT_EN(!IS_SFEA2)) u_map (
    .lt_comp, .ht_comp, .sht_comp, .ft, .tdc_hit);

  trigger_fpga #(.NCH(5), .WIDTH_NS(PULSE_NS), .CLK_NS(CLK_PERIOD_NS)) u_trg (
    .clk, .rst_n, .ht_comp, .sht_comp, .ht_out, .sht_out);

  sfet2_fpga #(
    .NCH(NCH), .OUT_DEPTH(OUT_DEPTH), .TRIG_DLY_MAX(TRIG_DLY_MAX),
    .SAMPLE_DLY(SAMPLE_DLY), .ADC_BITS(ADC_BITS), .SETUP_LEN(SETUP_LEN),
    .PLL_INIT_CYCLES(PLL_INIT_CYCLES)
  ) u_fpga (
    .clk, .rst_n, .trig_delay, .tdc_setup, .tdc_reinit, .temperature, .ft,
    .tdc_trigger, .tdc_reset, .tdc_sdata, .tdc_tck, .tdc_tms, .tdc_tdi, .tdc_tdo,
    .sample, .adc_en, .adc_clk, .adc_data(adc_data[NCH-1:0]),
    .daq_word, .daq_valid, .daq_ready,
    .charge(ch_charge), .charge_valid,
    .tdc_ready, .cfg_error, .lost_words, .tdc_errors, .missed_charge);

  always_comb begin
    charge = '0;
    for (int i = 0; i < NCH; i++) charge[i] = ch_charge[i];
  end
endmodule
