// jtag_tap_model: behavioural model of a JTAG test-access port with one
// data register, standing in for the HPTDC configuration port in
// testbenches.
//
// Full IEEE 1149.1 TAP state machine on TCK. When the instruction register
// holds SETUP_IR, the data path is a LEN-bit shift register (TDI enters at
// the top, TDO leaves from bit 0, so the first bit shifted in ends in bit 0
// after LEN shifts) copied to `setup` on Update-DR; otherwise a 1-bit bypass.
// TDO changes on the falling edge of TCK. `updates` counts Update-DR of the
// setup register.
module jtag_tap_model #(
  parameter int unsigned IR_LEN   = 5,
  parameter logic [4:0]  SETUP_IR = 5'b11000,
  parameter int unsigned LEN      = 16
) (
  input  logic           tck,
  input  logic           tms,
  input  logic           tdi,
  output logic           tdo,
  output logic [LEN-1:0] setup,
  output int             updates
);
  typedef enum int {TLR, RTI, SDR, CDR, SHDR, E1DR, PDR, E2DR, UDR,
                    SIR, CIR, SHIR, E1IR, PIR, E2IR, UIR} tap_t;
  tap_t st = TLR;
  logic [IR_LEN-1:0] ir = '0, ir_sh = '0;
  logic [LEN-1:0]    dr_sh = '0;
  logic              byp = 1'b0;

  initial begin
    tdo     = 1'b0;
    setup   = '0;
    updates = 0;
  end

  always @(posedge tck) begin
    case (st)
      SHIR: ir_sh <= {tdi, ir_sh[IR_LEN-1:1]};
      SHDR: if (ir == SETUP_IR[IR_LEN-1:0]) dr_sh <= {tdi, dr_sh[LEN-1:1]};
            else byp <= tdi;
      CIR:  ;
      default: ;
    endcase
    case (st)
      CIR: ir_sh <= IR_LEN'(1);
      CDR: begin dr_sh <= setup; byp <= 1'b0; end
      UIR: ir <= ir_sh;
      UDR: if (ir == SETUP_IR[IR_LEN-1:0]) begin setup <= dr_sh; updates <= updates + 1; end
      default: ;
    endcase
    case (st)
      TLR:  st <= tms ? TLR  : RTI;
      RTI:  st <= tms ? SDR  : RTI;
      SDR:  st <= tms ? SIR  : CDR;
      CDR:  st <= tms ? E1DR : SHDR;
      SHDR: st <= tms ? E1DR : SHDR;
      E1DR: st <= tms ? UDR  : PDR;
      PDR:  st <= tms ? E2DR : PDR;
      E2DR: st <= tms ? UDR  : SHDR;
      UDR:  st <= tms ? SDR  : RTI;
      SIR:  st <= tms ? TLR  : CIR;
      CIR:  st <= tms ? E1IR : SHIR;
      SHIR: st <= tms ? E1IR : SHIR;
      E1IR: st <= tms ? UIR  : PIR;
      PIR:  st <= tms ? E2IR : PIR;
      E2IR: st <= tms ? UIR  : SHIR;
      UIR:  st <= tms ? SDR  : RTI;
      default: st <= TLR;
    endcase
    if (st == TLR) ir <= SETUP_IR[IR_LEN-1:0] ^ IR_LEN'(1); // any non-setup code
  end

  always @(negedge tck) begin
    if (st == SHDR) tdo <= (ir == SETUP_IR[IR_LEN-1:0]) ? dr_sh[0] : byp;
    else if (st == SHIR) tdo <= ir_sh[0];
  end
endmodule
