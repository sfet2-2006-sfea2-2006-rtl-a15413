// tdc_input_map: assigns the signals of one board to the 8 HPTDC inputs.
//
// Channel assignment, as specified: TDC channels 0-4 take the low-threshold
// (LT) comparator outputs of the counters (a board with fewer counters leaves
// the rest unconnected), channel 5 takes the fast trigger FT, channel 6 the
// logical sum (OR) of the HT comparators and channel 7 the logical sum of the
// SHT comparators. The two sums let offline analysis tell real particle hits
// from noise on LT; the specification calls them optional, so each has an
// enable parameter. On an SFEA2 (ACC) board the four ACC threshold outputs
// take channels 0-3.
//
// The path is purely combinational: the HPTDC measures the edges of these
// signals directly, so no clock may be placed in it.
module tdc_input_map
  import sfet2_pkg::*;
#(
  parameter int unsigned NCH        = 5,   // LT inputs used (5 TOF, 4 ACC)
  parameter bit          SUM_HT_EN  = 1'b1,
  parameter bit          SUM_SHT_EN = 1'b1
) (
  input  logic [4:0] lt_comp,
  input  logic [4:0] ht_comp,
  input  logic [4:0] sht_comp,
  input  logic       ft,
  output logic [7:0] tdc_hit
);
  logic [4:0] used;

  always_comb begin
    for (int i = 0; i < 5; i++) used[i] = (i < NCH);
    tdc_hit[4:0] = lt_comp & used;
    tdc_hit[TDC_CH_FT]     = ft;
    tdc_hit[TDC_CH_SUMHT]  = SUM_HT_EN  & (|(ht_comp  & used));
    tdc_hit[TDC_CH_SUMSHT] = SUM_SHT_EN & (|(sht_comp & used));
  end
endmodule
