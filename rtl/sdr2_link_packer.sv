// sdr2_link_packer: puts the 26-bit words of one board link into the DAQ
// raw event format.
//
// Each FPGA word becomes two consecutive 16-bit words, most significant
// first, both tagged with the 3-bit link number of the board (SFET2a..d =
// 1..4, SFEA2 = 5):
//   word0 = {0, link, fpga[23:12]}
//   word1 = {S, link, fpga[11:0]}     S = fpga[24]
// as laid out by the raw event buffer format; taking S from bit 24 is this
// design's choice (see sfet2_pkg). Bit 25 (temperature/time) is not carried:
// the DAQ tells temperature words by their place at the head of the event.
//
// Handshake: valid/ready on both sides. A word is accepted when in_valid and
// in_ready are high; in_ready is high only while no word is held, so a word
// takes two output transfers and the packer passes one FPGA word every two
// cycles when the output is never stalled.
module sdr2_link_packer
  import sfet2_pkg::*;
#(
  parameter link_t LINK = LINK_SFET2A
) (
  input  logic        clk,
  input  logic        rst_n,
  input  fpga_word_t  in_word,
  input  logic        in_valid,
  output logic        in_ready,
  output logic [15:0] out_word,
  output logic        out_valid,
  input  logic        out_ready
);
  fpga_word_t held;
  logic       full;     // a word is held
  logic       second;   // word1 is next

  assign in_ready  = !full;
  assign out_valid = full;
  assign out_word  = second ? {held[24], LINK, held[11:0]}
                            : {1'b0,     LINK, held[23:12]};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      held   <= '0;
      full   <= 1'b0;
      second <= 1'b0;
    end else begin
      if (!full) begin
        if (in_valid) begin
          held   <= in_word;
          full   <= 1'b1;
          second <= 1'b0;
        end
      end else if (out_ready) begin
        if (second) begin
          full   <= 1'b0;
          second <= 1'b0;
        end else begin
          second <= 1'b1;
        end
      end
    end
  end

  // A held word must not change until both halves have left.
  a_stable: assert property (@(posedge clk) disable iff (!rst_n)
                             full && !(out_ready && second) |=> $stable(held));
endmodule
