// jtag_master: IEEE 1149.1 test-access-port master used to program the HPTDC.
//
// The HPTDC is configured through its JTAG port, driven by the board FPGA.
// On `start` this master resets the TAP (five TMS=1 cycles), goes through
// Run-Test/Idle to Shift-IR, shifts the IR_LEN-bit instruction `ir`, passes
// Update-IR to Shift-DR, shifts the low `dr_len` bits of `dr_in` (least
// significant bit first) while capturing TDO into `dr_out`, and returns to
// Run-Test/Idle, where it raises `done` for one cycle. `dr_out` bit i is
// the TDO bit seen while dr_in bit i was shifted, so it holds the register
// content from before the update.
//
// TCK runs at half the system clock: TMS and TDI change while TCK is low,
// the target samples them on the rising edge, and TDO (which the target
// changes on falling edges) is taken at the end of the high phase. Each TCK
// period is one step of the walk; with 16 steps outside the two shift states
// an operation takes 2*(16+IR_LEN+dr_len)+1 system cycles from start to
// done. The TAP state
// sequence is the standard one; the instruction length and codes belong to
// the HPTDC and are parameters here.
module jtag_master #(
  parameter int unsigned IR_LEN = 5,
  parameter int unsigned DR_MAX = 647,
  localparam int unsigned LW = $clog2(DR_MAX + 1)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic [IR_LEN-1:0] ir,
  input  logic [LW-1:0]     dr_len,     // 1 .. DR_MAX
  input  logic [DR_MAX-1:0] dr_in,
  output logic [DR_MAX-1:0] dr_out,
  output logic              busy,
  output logic              done,
  output logic              tck,
  output logic              tms,
  output logic              tdi,
  input  logic              tdo
);
  typedef enum logic [3:0] {
    J_IDLE, J_TLR, J_RTI, J_SELDR, J_SELIR, J_CAPIR, J_SHIR0, J_SHIR,
    J_UPDIR, J_SELDR2, J_CAPDR, J_SHDR0, J_SHDR, J_UPDDR, J_END
  } jstate_t;

  jstate_t           st;
  logic [LW-1:0]     n;        // bits / cycles left in the current step
  logic [IR_LEN-1:0] ir_sh;
  logic [DR_MAX-1:0] dr_sh;
  logic [LW-1:0]     dr_idx;

  assign busy = (st != J_IDLE);

  // Drive TMS/TDI for the current step (changed only while TCK is low).
  always_comb begin
    tms = 1'b0;
    tdi = 1'b0;
    unique case (st)
      J_TLR:                       tms = 1'b1;
      J_SELDR, J_SELIR, J_UPDIR,
      J_SELDR2, J_UPDDR:           tms = 1'b1;
      J_SHIR: begin tdi = ir_sh[0]; tms = (n == LW'(1)); end
      J_SHDR: begin tdi = dr_sh[0]; tms = (n == LW'(1)); end
      default:                     tms = 1'b0;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st     <= J_IDLE;
      n      <= '0;
      tck    <= 1'b0;
      ir_sh  <= '0;
      dr_sh  <= '0;
      dr_idx <= '0;
      dr_out <= '0;
      done   <= 1'b0;
    end else begin
      done <= 1'b0;
      if (st == J_IDLE) begin
        tck <= 1'b0;
        if (start) begin
          st     <= J_TLR;
          n      <= LW'(5);
          ir_sh  <= ir;
          dr_sh  <= dr_in;
          dr_idx <= '0;
          dr_out <= '0;
        end
      end else if (!tck) begin
        tck <= 1'b1;                     // rising edge: target samples
      end else begin
        tck <= 1'b0;                     // end of high phase: next step
        unique case (st)
          J_TLR:    begin n <= n - 1'b1; if (n == LW'(1)) st <= J_RTI; end
          J_RTI:    st <= J_SELDR;
          J_SELDR:  st <= J_SELIR;
          J_SELIR:  st <= J_CAPIR;
          J_CAPIR:  st <= J_SHIR0;
          J_SHIR0:  begin st <= J_SHIR; n <= LW'(IR_LEN); end
          J_SHIR: begin
            ir_sh <= ir_sh >> 1;
            n     <= n - 1'b1;
            if (n == LW'(1)) st <= J_UPDIR;
          end
          J_UPDIR:  st <= J_SELDR2;
          J_SELDR2: st <= J_CAPDR;
          J_CAPDR:  st <= J_SHDR0;
          J_SHDR0:  begin st <= J_SHDR; n <= dr_len; end
          J_SHDR: begin
            dr_sh          <= dr_sh >> 1;
            dr_out[dr_idx] <= tdo;
            dr_idx         <= dr_idx + 1'b1;
            n              <= n - 1'b1;
            if (n == LW'(1)) st <= J_UPDDR;
          end
          J_UPDDR:  st <= J_END;
          J_END:    begin st <= J_IDLE; done <= 1'b1; end
          default:  st <= J_IDLE;
        endcase
      end
    end
  end
endmodule
