// tdc_init_seq: brings the HPTDC up at power-up and on request.
//
// The HPTDC internal PLL must be (re)initialised at power-up and at periodic
// resets, and needs 10 ms to do so; until then its time measurements are not
// valid. This sequencer, started by the end of reset or by a `reinit` pulse:
//   1. holds tdc_reset high and loads the setup word into the HPTDC over
//      JTAG (instruction SETUP_IR, SETUP_LEN bits);
//   2. loads it a second time: the bits shifted out must be the ones just
//      loaded, otherwise cfg_error is set (a readback check of the JTAG
//      path);
//   3. releases tdc_reset and waits PLL_INIT_CYCLES (default 400000 cycles
//      of 25 ns = 10 ms) for the PLL to lock, then raises tdc_ready.
// The 10 ms wait follows the specification. The reset pin, the double load
// and the instruction code are this design's choices; SETUP_IR and
// SETUP_LEN must match the HPTDC.
module tdc_init_seq #(
  parameter int unsigned IR_LEN          = 5,
  parameter logic [4:0]  SETUP_IR        = 5'b11000,
  parameter int unsigned SETUP_LEN       = 647,
  parameter int unsigned PLL_INIT_CYCLES = 400000
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 reinit,
  input  logic [SETUP_LEN-1:0] setup,
  output logic                 tdc_reset,
  output logic                 tdc_ready,
  output logic                 cfg_error,
  output logic                 tck,
  output logic                 tms,
  output logic                 tdi,
  input  logic                 tdo
);
  typedef enum logic [2:0] {I_START, I_LOAD1, I_LOAD2, I_CHECK, I_WAIT, I_READY} istate_t;

  localparam int unsigned LW = $clog2(SETUP_LEN + 1);
  localparam int unsigned WW = $clog2(PLL_INIT_CYCLES + 1);

  istate_t                st;
  logic                   jstart, jdone;
  logic [SETUP_LEN-1:0]   jout;
  logic [WW-1:0]          wait_cnt;

  jtag_master #(.IR_LEN(IR_LEN), .DR_MAX(SETUP_LEN)) u_jtag (
    .clk, .rst_n,
    .start (jstart),
    .ir    (SETUP_IR[IR_LEN-1:0]),
    .dr_len(LW'(SETUP_LEN)),
    .dr_in (setup),
    .dr_out(jout),
    .busy  (),
    .done  (jdone),
    .tck, .tms, .tdi, .tdo
  );

  assign jstart    = (st == I_START) || (st == I_LOAD1 && jdone);
  assign tdc_ready = (st == I_READY);
  assign tdc_reset = (st == I_START) || (st == I_LOAD1) || (st == I_LOAD2) || (st == I_CHECK);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st        <= I_START;
      wait_cnt  <= '0;
      cfg_error <= 1'b0;
    end else begin
      unique case (st)
        I_START: st <= I_LOAD1;
        I_LOAD1: if (jdone) st <= I_LOAD2;
        I_LOAD2: if (jdone) st <= I_CHECK;
        I_CHECK: begin
          cfg_error <= (jout != setup);
          wait_cnt  <= WW'(PLL_INIT_CYCLES - 1);
          st        <= I_WAIT;
        end
        I_WAIT: begin
          if (wait_cnt == '0) st <= I_READY;
          else                wait_cnt <= wait_cnt - 1'b1;
        end
        I_READY: ;
        default: st <= I_START;
      endcase
      if (reinit && st != I_LOAD1 && st != I_LOAD2) st <= I_START;
    end
  end
endmodule
