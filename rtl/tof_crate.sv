// tof_crate: the time-of-flight front end of one S-crate.
//
// A crate holds four SFET2 boards (a..d, five TOF channels each) and one
// SFEA2 board (four anticoincidence channels): 20 TOF + 4 ACC inputs. Each
// board measures hit times with its HPTDC, forms the HT/SHT trigger signals
// for the pre-trigger SPT2 and sends its event words to the DAQ board SDR2
// over its own link. This module instantiates the five boards (links 1..5)
// and, for every link, the raw event packing that turns each 26-bit board
// word into two 16-bit words tagged with the link number.
//
// Signals of the parts outside this logic (comparators, HPTDCs, shapers,
// ADCs, SPT2, SDR2) are ports, indexed by board: index 0..3 = SFET2a..d,
// index 4 = SFEA2. All boards share the clock, reset, fast trigger, trigger
// delay and HPTDC setup word.
module tof_crate
  import sfet2_pkg::*;
#(
  parameter int unsigned OUT_DEPTH       = 16,
  parameter int unsigned TRIG_DLY_MAX    = 256,
  parameter int unsigned SAMPLE_DLY      = 68,
  parameter int unsigned ADC_BITS        = 12,
  parameter int unsigned SETUP_LEN       = 647,
  parameter int unsigned PLL_INIT_CYCLES = 400000
) (
  input  logic                              clk,
  input  logic                              rst_n,
  input  logic [4:0][4:0]                   lt_comp,
  input  logic [4:0][4:0]                   ht_comp,
  input  logic [4:0][4:0]                   sht_comp,
  input  logic                              ft,
  output logic [4:0][4:0]                   ht_out,
  output logic [4:0][4:0]                   sht_out,
  input  logic [$clog2(TRIG_DLY_MAX)-1:0]   trig_delay,
  input  logic [SETUP_LEN-1:0]              tdc_setup,
  input  logic                              tdc_reinit,
  input  logic [4:0][TEMP_W-1:0]            temperature,
  output logic [4:0][7:0]                   tdc_hit,
  output logic [4:0]                        tdc_trigger,
  output logic [4:0]                        tdc_reset,
  input  logic [4:0]                        tdc_sdata,
  output logic [4:0]                        tdc_tck,
  output logic [4:0]                        tdc_tms,
  output logic [4:0]                        tdc_tdi,
  input  logic [4:0]                        tdc_tdo,
  output logic [4:0]                        sample,
  output logic [4:0]                        adc_en,
  output logic [4:0]                        adc_clk,
  input  logic [4:0][4:0]                   adc_data,
  output logic [4:0][15:0]                  sdr2_word,
  output logic [4:0]                        sdr2_valid,
  input  logic [4:0]                        sdr2_ready,
  output logic [4:0][4:0][ADC_BITS-1:0]     charge,
  output logic [4:0]                        charge_valid,
  output logic [4:0]                        tdc_ready,
  output logic [4:0]                        cfg_error,
  output logic [4:0][15:0]                  lost_words,
  output logic [4:0][15:0]                  tdc_errors,
  output logic [4:0][15:0]                  missed_charge
);
  fpga_word_t [4:0] daq_word;
  logic       [4:0] daq_valid, daq_ready;

  for (genvar b = 0; b < 5; b++) begin : g_board
    localparam bit    ACC  = (b == 4);
    localparam link_t LINK = link_t'(b + 1);

    sfet2_board #(
      .IS_SFEA2(ACC), .OUT_DEPTH(OUT_DEPTH), .TRIG_DLY_MAX(TRIG_DLY_MAX),
      .SAMPLE_DLY(SAMPLE_DLY), .ADC_BITS(ADC_BITS), .SETUP_LEN(SETUP_LEN),
      .PLL_INIT_CYCLES(PLL_INIT_CYCLES)
    ) u_board (
      .clk, .rst_n,
      .lt_comp(lt_comp[b]), .ht_comp(ht_comp[b]), .sht_comp(sht_comp[b]),
      .ft, .ht_out(ht_out[b]), .sht_out(sht_out[b]),
      .trig_delay, .tdc_setup, .tdc_reinit, .temperature(temperature[b]),
      .tdc_hit(tdc_hit[b]), .tdc_trigger(tdc_trigger[b]), .tdc_reset(tdc_reset[b]),
      .tdc_sdata(tdc_sdata[b]), .tdc_tck(tdc_tck[b]), .tdc_tms(tdc_tms[b]),
      .tdc_tdi(tdc_tdi[b]), .tdc_tdo(tdc_tdo[b]),
      .sample(sample[b]), .adc_en(adc_en[b]), .adc_clk(adc_clk[b]),
      .adc_data(adc_data[b]),
      .daq_word(daq_word[b]), .daq_valid(daq_valid[b]), .daq_ready(daq_ready[b]),
      .charge(charge[b]), .charge_valid(charge_valid[b]),
      .tdc_ready(tdc_ready[b]), .cfg_error(cfg_error[b]),
      .lost_words(lost_words[b]), .tdc_errors(tdc_errors[b]),
      .missed_charge(missed_charge[b]));

    sdr2_link_packer #(.LINK(LINK)) u_pack (
      .clk, .rst_n,
      .in_word(daq_word[b]), .in_valid(daq_valid[b]), .in_ready(daq_ready[b]),
      .out_word(sdr2_word[b]), .out_valid(sdr2_valid[b]), .out_ready(sdr2_ready[b]));
  end
endmodule
