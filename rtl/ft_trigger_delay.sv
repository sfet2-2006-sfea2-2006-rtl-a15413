// ft_trigger_delay: produces the HPTDC trigger from the fast trigger FT.
//
// The rising edge of the FT pulse from the pre-trigger, caught by an
// edge_catcher, gives a one-cycle pulse ft_pulse, and that pulse travels down
// a MAX_DELAY-stage shift register. tdc_trigger is taken from stage
// delay-1, so it follows ft_pulse by `delay` cycles of 25 ns, the step in
// which the HPTDC timing is adjustable. The specification leaves open whether
// the delay is fixed; here it is a run-time input. Because every FT has its
// own place in the shift register, FTs closer together than the delay are
// all delivered: the board adds no dead time after an FT.
//
// Default delay (this design's choice): 240 cycles = 6 us, so the trigger
// reaches the HPTDC only after the end of the required history window
// (FT - 10 us to FT + 6 us); the HPTDC trigger latency then reaches back
// 16 us. A delay of 0 is treated as 1. `delay` is meant to be changed only
// when no FT has arrived for MAX_DELAY cycles: a pulse still travelling down
// the line would otherwise be seen again at the new tap.
module ft_trigger_delay #(
  parameter int unsigned MAX_DELAY = 256,
  localparam int unsigned DW = $clog2(MAX_DELAY)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          ft,          // asynchronous fast trigger
  input  logic [DW-1:0] delay,       // cycles from ft_pulse to tdc_trigger
  output logic          ft_pulse,    // one cycle per FT, synchronous
  output logic          tdc_trigger  // one cycle, to the HPTDC trigger input
);
  logic [MAX_DELAY-1:0] line;
  logic [DW-1:0]        tap;

  edge_catcher u_edge (.clk, .rst_n, .async_in(ft), .pulse(ft_pulse));
  // ft_pulse reaches line[k] after k+1 cycles; the output register adds one.
  assign tap      = (delay < 2) ? '0 : delay - DW'(2);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      line        <= '0;
      tdc_trigger <= 1'b0;
    end else begin
      line        <= {line[MAX_DELAY-2:0], ft_pulse};
      tdc_trigger <= (delay <= 1) ? ft_pulse : line[tap];
    end
  end
endmodule
