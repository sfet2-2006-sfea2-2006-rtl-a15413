// sfet2_pkg: types and constants shared by the SFET2/SFEA2 time-of-flight
// front-end logic.
//
// All logic runs from one 40 MHz system clock, so one clock cycle is 25 ns,
// the step in which the HPTDC trigger timing is adjustable. The word layouts
// are:
//   HPTDC word, 32 bits : [31:28] type, [27:24] TDC id, [23:21] channel,
//                         [20:0] 21-bit time (3-bit channel + 21-bit time as
//                         the HPTDC gives them in very high resolution mode).
//   FPGA output word, 26 bits, sent to the DAQ board (SDR2):
//     time word        : [25] 0, [24] S (edge: 0 leading, 1 trailing),
//                        [23:21] channel, [20:19] interpolation bits,
//                        [18:0] edge time
//     temperature word : [25] 1, [24] 0, [23:16] 0, [15:0] temperature
//   SDR2 raw event word pair, 16 bits each, most significant first:
//     word0 = {1'b0, link[2:0], fpga[23:12]}
//     word1 = {S,    link[2:0], fpga[11:0]}
// The placement of the channel, interpolation and edge time fields and the
// link numbers follow the specification; the use of bits 25:24 of the FPGA
// word and of the HPTDC type codes is this design's choice.
package sfet2_pkg;

  localparam int unsigned CLK_PERIOD_NS = 25;   // 40 MHz system clock

  localparam int unsigned TOF_LT_CH     = 5;    // TOF channels per SFET2
  localparam int unsigned ACC_CH        = 4;    // ACC channels on SFEA2
  localparam int unsigned TDC_CH_FT     = 5;    // FT on TDC channel 5
  localparam int unsigned TDC_CH_SUMHT  = 6;    // sum(HT)  on TDC channel 6
  localparam int unsigned TDC_CH_SUMSHT = 7;    // sum(SHT) on TDC channel 7

  localparam int unsigned TDC_TIME_W    = 21;
  localparam int unsigned FPGA_WORD_W   = 26;
  localparam int unsigned TEMP_W        = 16;

  // HPTDC word types (upper nibble) that carry a measurement.
  localparam logic [3:0] HPTDC_LEADING  = 4'b0100;
  localparam logic [3:0] HPTDC_TRAILING = 4'b0101;
  localparam logic [3:0] HPTDC_ERROR    = 4'b0110;

  typedef logic [31:0]            hptdc_word_t;
  typedef logic [FPGA_WORD_W-1:0] fpga_word_t;
  typedef logic [2:0]             link_t;

  // Link numbers of the five boards of one S-crate.
  localparam link_t LINK_SFET2A = 3'd1;
  localparam link_t LINK_SFET2B = 3'd2;
  localparam link_t LINK_SFET2C = 3'd3;
  localparam link_t LINK_SFET2D = 3'd4;
  localparam link_t LINK_SFEA2  = 3'd5;

  typedef enum logic [1:0] {
    WORD_TIME_LEAD  = 2'b00,
    WORD_TIME_TRAIL = 2'b01,
    WORD_TEMP       = 2'b10
  } fpga_kind_t;

  function automatic fpga_word_t make_time_word(input logic trailing,
                                                input logic [2:0] chan,
                                                input logic [TDC_TIME_W-1:0] t);
    return {1'b0, trailing, chan, t};
  endfunction

  function automatic fpga_word_t make_temp_word(input logic [TEMP_W-1:0] temp);
    return {2'b10, 8'h00, temp};
  endfunction

endpackage
