// pulse_former: turns a comparator output into a formatted logic pulse.
//
// The HT and SHT discriminator outputs of a TOF counter are sent to the
// pre-trigger as logic signals 250 ns long. A hit arriving while the pulse is
// still high extends it, so the output always ends 250 ns after the latest
// hit; a hit arriving after the output has fallen starts a new pulse at once,
// with no dead time beyond one clock cycle. Both behaviours follow the
// specification.
//
// Implementation (this design's choice): the rising edge of the asynchronous
// comparator output, which may be only 7-8 ns wide, is caught by an
// edge_catcher and reloads a down counter of WIDTH_NS/CLK_NS cycles; the
// output is high while the counter is not zero. With the 40 MHz clock a
// pulse is 10 cycles (250 ns) long, and the output rises three or four
// clock edges after the comparator edge. Extension therefore works to one
// clock period (25 ns), and a second hit within about 50 ns of the previous
// one is merged with it.
//
// Ports: comp_in (asynchronous, active high), pulse_out (registered).
module pulse_former #(
  parameter int unsigned WIDTH_NS = 250,
  parameter int unsigned CLK_NS   = 25
) (
  input  logic clk,
  input  logic rst_n,
  input  logic comp_in,
  output logic pulse_out
);
  localparam int unsigned WIDTH = (WIDTH_NS + CLK_NS - 1) / CLK_NS;
  localparam int unsigned CW    = $clog2(WIDTH + 1);

  logic [CW-1:0] cnt;
  logic          hit;

  edge_catcher u_edge (.clk, .rst_n, .async_in(comp_in), .pulse(hit));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt  <= '0;
    end else begin
      if (hit)
        cnt <= CW'(WIDTH);
      else if (cnt != '0)
        cnt <= cnt - 1'b1;
    end
  end

  assign pulse_out = (cnt != '0);

endmodule
