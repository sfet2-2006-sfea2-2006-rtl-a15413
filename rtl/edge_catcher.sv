// edge_catcher: turns the rising edge of an asynchronous signal into one
// system clock pulse, even when the signal is much shorter than a clock
// period.
//
// The comparator outputs are only 7-8 ns wide for small signals, shorter
// than the 25 ns clock, so they cannot simply be sampled. Here the input
// itself clocks a capture flip-flop to 1; the capture is passed through a
// two-stage synchroniser, and as soon as it has been seen it is cleared
// again (asynchronously, from a registered clock-domain signal). `pulse` is
// high for one cycle, two or three clock edges after the input edge. An
// input edge that arrives during the two cycles in which the capture is
// being cleared is merged with the previous one. Pulses are suppressed for
// the first four cycles after reset, while a capture flip-flop left set at
// power-up is being cleared.
module edge_catcher (
  input  logic clk,
  input  logic rst_n,
  input  logic async_in,
  output logic pulse
);
  logic cap;
  logic [2:0] sync;
  logic clr;
  logic [2:0] arm;

  assign clr = sync[1] | ~rst_n;

  always_ff @(posedge async_in or posedge clr) begin
    if (clr) cap <= 1'b0;
    else     cap <= 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sync <= '0;
      arm  <= '0;
    end else begin
      sync <= {sync[1:0], cap};
      if (!arm[2]) arm <= arm + 1'b1;
    end
  end

  assign pulse = sync[1] & ~sync[2] & arm[2];
endmodule
