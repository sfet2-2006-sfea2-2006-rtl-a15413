// charge_readout: charge measurement control of one board.
//
// The shaper of each channel integrates the anode charge and presents it as
// a DC level; the FPGA tells it when to sample and then reads the level
// through a serial ADC, sending the results to the DAQ over the charge link.
// The specification gives the signal names (sample, enable, clock, data), a
// single gain and a charge window ending 1.7 us after FT. With 1 MIP = 60
// counts and a range of 50 MIPs (3000 counts) a 12-bit ADC suffices, which
// sets the default ADC_BITS.
//
// Sequence (timing and protocol are this design's choices):
//   * SAMPLE_DLY cycles (default 68 x 25 ns = 1.7 us) after ft_pulse,
//     `sample` goes high and holds the shaper levels;
//   * adc_en goes high, then ADC_BITS periods of adc_clk (half the system
//     clock) follow; each ADC drives its data most significant bit first and
//     moves to the next bit on the falling edge of adc_clk, and the
//     bits are taken just before that edge, one data line per channel,
//     clock and enable shared;
//   * adc_en and sample drop, and charge_valid pulses for one cycle with
//     the NCH results.
// A conversion takes SAMPLE_DLY + 2*ADC_BITS + 2 cycles after ft_pulse.
// An FT that arrives while a conversion is in progress gets no charge
// measurement; it is counted in `missed`.
module charge_readout #(
  parameter int unsigned NCH        = 5,
  parameter int unsigned ADC_BITS   = 12,
  parameter int unsigned SAMPLE_DLY = 68
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          ft_pulse,
  output logic                          sample,
  output logic                          adc_en,
  output logic                          adc_clk,
  input  logic [NCH-1:0]                adc_data,
  output logic [NCH-1:0][ADC_BITS-1:0]  charge,
  output logic                          charge_valid,
  output logic                          busy,
  output logic [15:0]                   missed
);
  typedef enum logic [1:0] {S_IDLE, S_WAIT, S_CONV, S_DONE} state_t;

  localparam int unsigned CW = $clog2(SAMPLE_DLY + 2*ADC_BITS + 2);

  state_t                         state;
  logic [CW-1:0]                  cnt;
  logic [NCH-1:0][ADC_BITS-1:0]   shreg;

  assign busy = (state != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state        <= S_IDLE;
      cnt          <= '0;
      sample       <= 1'b0;
      adc_en       <= 1'b0;
      adc_clk      <= 1'b0;
      shreg        <= '0;
      charge       <= '0;
      charge_valid <= 1'b0;
      missed       <= '0;
    end else begin
      charge_valid <= 1'b0;
      if (ft_pulse && state != S_IDLE) missed <= missed + 1'b1;
      unique case (state)
        S_IDLE: if (ft_pulse) begin
          state <= S_WAIT;
          cnt   <= CW'(SAMPLE_DLY - 1);
        end
        S_WAIT: begin
          if (cnt == '0) begin
            sample <= 1'b1;
            adc_en <= 1'b1;
            state  <= S_CONV;
            cnt    <= CW'(2*ADC_BITS);
          end else begin
            cnt <= cnt - 1'b1;
          end
        end
        S_CONV: begin
          // cnt counts half periods; adc_clk rises on odd, falls on even.
          if (cnt == '0) begin
            state <= S_DONE;
          end else begin
            cnt     <= cnt - 1'b1;
            adc_clk <= ~adc_clk;
            if (adc_clk)
              for (int i = 0; i < NCH; i++)
                shreg[i] <= {shreg[i][ADC_BITS-2:0], adc_data[i]};
          end
        end
        S_DONE: begin
          sample       <= 1'b0;
          adc_en       <= 1'b0;
          charge       <= shreg;
          charge_valid <= 1'b1;
          state        <= S_IDLE;
        end
      endcase
    end
  end
endmodule
