// tdc_word_formatter: converts HPTDC words to 26-bit FPGA output time words.
//
// Each hit is reported to the DAQ as one 26-bit word holding the 3-bit TDC
// channel, the 21-bit time (two interpolation bits and a 19-bit edge time, in
// the field order of the raw event format) and a flag S marking a trailing
// edge (see sfet2_pkg). Leading and trailing edge measurements are passed on;
// an HPTDC error word raises err for one cycle and is dropped, as are header,
// trailer and other words. Which HPTDC type codes carry measurements, and the
// meaning of S, are this design's choices.
//
// Timing: one register stage, out_valid follows in_valid by one cycle.
module tdc_word_formatter
  import sfet2_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  hptdc_word_t in_word,
  input  logic        in_valid,
  output fpga_word_t  out_word,
  output logic        out_valid,
  output logic        err
);
  logic [3:0] wtype;
  assign wtype = in_word[31:28];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_word  <= '0;
      out_valid <= 1'b0;
      err       <= 1'b0;
    end else begin
      out_valid <= 1'b0;
      err       <= 1'b0;
      if (in_valid) begin
        unique case (wtype)
          HPTDC_LEADING, HPTDC_TRAILING: begin
            out_word  <= make_time_word(wtype == HPTDC_TRAILING,
                                        in_word[23:21], in_word[20:0]);
            out_valid <= 1'b1;
          end
          HPTDC_ERROR: err <= 1'b1;
          default: ;
        endcase
      end
    end
  end
endmodule
