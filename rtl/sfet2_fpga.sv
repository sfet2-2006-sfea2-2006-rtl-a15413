// sfet2_fpga: the control FPGA of one SFET2/SFEA2 board.
//
// It connects the HPTDC to the DAQ board (SDR2):
//   * HPTDC bring-up: JTAG programming of the setup word and the 10 ms PLL
//     wait (tdc_init_seq);
//   * trigger: the fast trigger FT is delayed by trig_delay cycles of 25 ns
//     and sent to the HPTDC trigger input (ft_trigger_delay), which then
//     reads out the hits recorded in its history window;
//   * data collection: 32-bit HPTDC words arrive on the serial link
//     (hptdc_serial_rx), measurements become 26-bit time words
//     (tdc_word_formatter);
//   * event output: for every FT the board temperature is sent first as a
//     temperature word, followed by the time words of the event, through an
//     output buffer (word_fifo, OUT_DEPTH words) with a valid/ready handshake
//     toward the DAQ link;
//   * charge: after every FT the shapers are sampled and the serial ADCs read
//     (charge_readout); the results leave on the separate charge link.
// The functions are those the specification assigns to the FPGA; the word
// order (temperature first) follows its raw event example; buffer size,
// handshakes and counters are this design's choices. Lost words (buffer
// full) and HPTDC error words are counted.
module sfet2_fpga
  import sfet2_pkg::*;
#(
  parameter int unsigned NCH             = 5,
  parameter int unsigned OUT_DEPTH       = 16,
  parameter int unsigned TRIG_DLY_MAX    = 256,
  parameter int unsigned SAMPLE_DLY      = 68,
  parameter int unsigned ADC_BITS        = 12,
  parameter int unsigned SETUP_LEN       = 647,
  parameter int unsigned PLL_INIT_CYCLES = 400000
) (
  input  logic                          clk,
  input  logic                          rst_n,
  // configuration
  input  logic [$clog2(TRIG_DLY_MAX)-1:0] trig_delay,
  input  logic [SETUP_LEN-1:0]          tdc_setup,
  input  logic                          tdc_reinit,
  input  logic [TEMP_W-1:0]             temperature,
  // fast trigger from the pre-trigger
  input  logic                          ft,
  // HPTDC
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
  input  logic [NCH-1:0]                adc_data,
  // DAQ: time link
  output fpga_word_t                    daq_word,
  output logic                          daq_valid,
  input  logic                          daq_ready,
  // DAQ: charge link
  output logic [NCH-1:0][ADC_BITS-1:0]  charge,
  output logic                          charge_valid,
  // status
  output logic                          tdc_ready,
  output logic                          cfg_error,
  output logic [15:0]                   lost_words,
  output logic [15:0]                   tdc_errors,
  output logic [15:0]                   missed_charge
);
  logic        ft_pulse;
  logic [31:0] rx_word;
  logic        rx_valid;
  fpga_word_t  t_word;
  logic        t_valid, t_err;
  logic        temp_pending;
  fpga_word_t  temp_word;
  fpga_word_t  push_word;
  logic        push, overflow, busy;
  logic [$clog2(OUT_DEPTH):0] level;

  tdc_init_seq #(.SETUP_LEN(SETUP_LEN), .PLL_INIT_CYCLES(PLL_INIT_CYCLES)) u_init (
    .clk, .rst_n, .reinit(tdc_reinit), .setup(tdc_setup),
    .tdc_reset, .tdc_ready, .cfg_error,
    .tck(tdc_tck), .tms(tdc_tms), .tdi(tdc_tdi), .tdo(tdc_tdo));

  ft_trigger_delay #(.MAX_DELAY(TRIG_DLY_MAX)) u_trig (
    .clk, .rst_n, .ft, .delay(trig_delay), .ft_pulse, .tdc_trigger);

  hptdc_serial_rx u_rx (
    .clk, .rst_n, .sdata(tdc_sdata), .word(rx_word), .word_valid(rx_valid));

  tdc_word_formatter u_fmt (
    .clk, .rst_n, .in_word(rx_word), .in_valid(rx_valid),
    .out_word(t_word), .out_valid(t_valid), .err(t_err));

  charge_readout #(.NCH(NCH), .ADC_BITS(ADC_BITS), .SAMPLE_DLY(SAMPLE_DLY)) u_charge (
    .clk, .rst_n, .ft_pulse, .sample, .adc_en, .adc_clk, .adc_data,
    .charge, .charge_valid, .busy, .missed(missed_charge));

  // Temperature word of the event: latched at FT, written as soon as the
  // buffer input is free of time words.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      temp_pending <= 1'b0;
      temp_word    <= '0;
    end else begin
      if (ft_pulse) begin
        temp_pending <= 1'b1;
        temp_word    <= make_temp_word(temperature);
      end else if (temp_pending && !t_valid) begin
        temp_pending <= 1'b0;
      end
    end
  end

  assign push      = t_valid || temp_pending;
  assign push_word = t_valid ? t_word : temp_word;

  word_fifo #(.W(FPGA_WORD_W), .DEPTH(OUT_DEPTH)) u_out (
    .clk, .rst_n, .in_word(push_word), .push, .overflow,
    .out_word(daq_word), .out_valid(daq_valid), .out_ready(daq_ready), .level);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      lost_words <= '0;
      tdc_errors <= '0;
    end else begin
      if (overflow) lost_words <= lost_words + 1'b1;
      if (t_err)    tdc_errors <= tdc_errors + 1'b1;
    end
  end
endmodule
