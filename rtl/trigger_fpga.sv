// trigger_fpga: the trigger logic of one SFET2/SFEA2 board.
//
// It forms the high-threshold (HT) and super-high-threshold (SHT) comparator
// outputs of every channel into 250 ns logic pulses, each extended by later
// hits, and sends them to the pre-trigger module SPT2, where HT builds the
// fast trigger FT and SHT the Z>1 trigger FTZ. HT and SHT are always active:
// as the specification requires, there is no mask on the board.
//
// One pulse_former per signal; the outputs are registered and follow the
// comparators by three clock cycles (see pulse_former).
module trigger_fpga #(
  parameter int unsigned NCH      = 5,
  parameter int unsigned WIDTH_NS = 250,
  parameter int unsigned CLK_NS   = 25
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic [NCH-1:0] ht_comp,
  input  logic [NCH-1:0] sht_comp,
  output logic [NCH-1:0] ht_out,
  output logic [NCH-1:0] sht_out
);
  for (genvar i = 0; i < NCH; i++) begin : g_ch
    pulse_former #(.WIDTH_NS(WIDTH_NS), .CLK_NS(CLK_NS)) u_ht (
      .clk, .rst_n, .comp_in(ht_comp[i]), .pulse_out(ht_out[i]));
    pulse_former #(.WIDTH_NS(WIDTH_NS), .CLK_NS(CLK_NS)) u_sht (
      .clk, .rst_n, .comp_in(sht_comp[i]), .pulse_out(sht_out[i]));
  end
endmodule
