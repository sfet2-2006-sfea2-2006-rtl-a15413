// hptdc_serial_rx: receives 32-bit words from the HPTDC serial readout.
//
// The HPTDC sends its data words to the board FPGA over a serial link. Frame
// format (this design's choice; the specification only names the link): the
// line idles low, a frame is one start bit '1' followed by the 32 data bits,
// most significant first, one bit per system clock cycle, the HPTDC serial
// clock being taken from the same 40 MHz board clock. A frame may follow the
// previous one immediately.
//
// The input is registered once. word_valid pulses for one cycle with the
// received word two cycles after its last bit has been driven on the line.
module hptdc_serial_rx (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        sdata,
  output logic [31:0] word,
  output logic        word_valid
);
  logic        din;
  logic        busy;
  logic [5:0]  nbits;
  logic [31:0] shreg;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      din        <= 1'b0;
      busy       <= 1'b0;
      nbits      <= '0;
      shreg      <= '0;
      word       <= '0;
      word_valid <= 1'b0;
    end else begin
      din        <= sdata;
      word_valid <= 1'b0;
      if (!busy) begin
        if (din) begin
          busy  <= 1'b1;
          nbits <= '0;
        end
      end else begin
        shreg <= {shreg[30:0], din};
        nbits <= nbits + 1'b1;
        if (nbits == 6'd31) begin
          busy       <= 1'b0;
          word       <= {shreg[30:0], din};
          word_valid <= 1'b1;
        end
      end
    end
  end
endmodule
