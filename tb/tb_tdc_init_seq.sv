// tb_tdc_init_seq: HPTDC bring-up with a 24-bit setup word and a shortened
// 100-cycle PLL wait. Checks that the setup word reaches the TAP model
// (loaded twice), that the readback check passes, that tdc_reset is high
// only while loading, that tdc_ready comes exactly PLL_INIT_CYCLES after
// the reset is released, and that `reinit` repeats the whole sequence.
`timescale 1ns/1ps
module tb_tdc_init_seq;
  localparam int LEN = 24, PLL = 100;
  logic clk = 1'b0, rst_n = 1'b1, reinit = 1'b0;
  logic [LEN-1:0] setup, tap_setup;
  logic tdc_reset, ready, cfg_error, tck, tms, tdi, tdo;
  int updates;
  int checks = 0, failures = 0;
  longint cyc = 0, t_rel = 0, t_rdy = 0;
  logic reset_q = 1'b0, ready_q = 1'b0;

  tdc_init_seq #(.SETUP_LEN(LEN), .PLL_INIT_CYCLES(PLL)) dut (
    .clk, .rst_n, .reinit, .setup, .tdc_reset, .tdc_ready(ready), .cfg_error,
    .tck, .tms, .tdi, .tdo);

  jtag_tap_model #(.LEN(LEN)) tap (.tck, .tms, .tdi, .tdo, .setup(tap_setup), .updates);

  always #12.5 clk = ~clk;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    reset_q <= tdc_reset;
    ready_q <= ready;
    if (reset_q && !tdc_reset) t_rel = cyc;
    if (!ready_q && ready) t_rdy = cyc;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #200000;
    $display("FAIL: watchdog"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1 rst_n = 1'b0;
    setup = 24'hA5C3_96;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(tdc_reset && !ready, "reset held while loading");
    wait (ready);
    @(posedge clk); #1;
    check(tap_setup == setup, $sformatf("setup %h", tap_setup));
    check(updates == 2, $sformatf("updates %0d", updates));
    check(!cfg_error, "readback matches");
    check(!tdc_reset, "reset released");
    check(t_rdy - t_rel == longint'(PLL), $sformatf("PLL wait %0d cycles", t_rdy - t_rel));
    // re-initialisation with a new word
    @(negedge clk);
    setup = 24'h0F1E2D;
    reinit = 1'b1;
    @(negedge clk);
    reinit = 1'b0;
    @(negedge clk);
    check(!ready && tdc_reset, "reinit restarts");
    wait (ready);
    @(posedge clk); #1;
    check(tap_setup == setup && updates == 4 && !cfg_error, "second bring-up");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
