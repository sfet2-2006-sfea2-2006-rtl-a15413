// tb_jtag_master: the master programs a TAP model holding a 40-bit setup
// register. Checks: after the first operation the model's register holds
// the random word shifted in; a second operation with a new word reads the
// first one back on dr_out; a shorter dr_len also works; each operation
// takes 2*(16+IR_LEN+dr_len)+1 cycles from start to done.
`timescale 1ns/1ps
module tb_jtag_master;
  localparam int LEN = 40, IRL = 5;
  // expected operation lengths in system clock cycles: 2*(16 + IR + DR) + 1
  localparam int T_FULL = 2*(16+IRL+LEN) + 1, T_16 = 2*(16+IRL+16) + 1;
  localparam logic [4:0] SETUP = 5'b11000;
  logic clk = 1'b0, rst_n = 1'b1, start = 1'b0;
  logic [LEN-1:0] din, dout, tap_setup;
  logic [$clog2(LEN+1)-1:0] len;
  logic busy, done, tck, tms, tdi, tdo;
  int updates;
  int checks = 0, failures = 0;
  longint cyc = 0, t_start = 0, t_done = 0;

  jtag_master #(.IR_LEN(IRL), .DR_MAX(LEN)) dut (
    .clk, .rst_n, .start, .ir(SETUP), .dr_len(len), .dr_in(din), .dr_out(dout),
    .busy, .done, .tck, .tms, .tdi, .tdo);

  jtag_tap_model #(.IR_LEN(IRL), .SETUP_IR(SETUP), .LEN(LEN)) tap (
    .tck, .tms, .tdi, .tdo, .setup(tap_setup), .updates);

  always #12.5 clk = ~clk;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (done) t_done = cyc;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic run(input logic [LEN-1:0] v, input int n);
    @(negedge clk);
    din = v; len = ($clog2(LEN+1))'(n); start = 1'b1; t_start = cyc;
    @(negedge clk);
    start = 1'b0;
    wait (done);
    @(posedge clk); #1;
  endtask

  initial begin
    #200000;
    $display("FAIL: watchdog"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [LEN-1:0] a, b;
    #1 rst_n = 1'b0;
    din = '0; len = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    a = LEN'({$urandom, $urandom});
    b = LEN'({$urandom, $urandom});
    run(a, LEN);
    check(tap_setup == a, $sformatf("setup %h expected %h", tap_setup, a));
    check(updates == 1, "one update");
    check(int'(t_done - t_start) == T_FULL, $sformatf("cycles %0d", t_done - t_start));
    run(b, LEN);
    check(tap_setup == b, $sformatf("setup %h expected %h", tap_setup, b));
    check(dout == a, $sformatf("readback %h expected %h", dout, a));
    // a 16-bit shift moves the register by 16 places
    run(a, 16);
    check(tap_setup == {a[15:0], b[LEN-1:16]}, $sformatf("partial shift %h", tap_setup));
    check(dout[15:0] == b[15:0], "partial readback");
    check(int'(t_done - t_start) == T_16, $sformatf("cycles %0d", t_done - t_start));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
