// tb_sfet2_board: one SFET2 board with its HPTDC, TAP and ADC models, at a
// 24-bit setup word and a 50-cycle PLL wait (trigger delay 240 cycles,
// HPTDC window 640 cycles as in the full design).
//
// Checks the HPTDC input wiring on random comparator patterns (LT on
// channels 0-4, OR of HT on 6, OR of SHT on 7; FT on 5 is seen in the event), the 250 ns HT and
// SHT pulses to the pre-trigger, and one event: the board's 26-bit words
// must be the temperature word followed by exactly the in-window edges
// with the right channels and times relative to FT, and the charges.
`timescale 1ns/1ps
module tb_sfet2_board;
  import sfet2_pkg::*;
  logic clk = 1'b0, rst_n = 1'b1, ft = 1'b0;
  logic [4:0] lt = '0, ht = '0, sht = '0, ht_out, sht_out;
  logic [7:0] tdc_hit;
  logic tdc_trigger, tdc_reset, sdata, tck, tms, tdi, tdo;
  logic sample, adc_en, adc_clk, daq_valid, charge_valid, tdc_ready, cfg_error;
  logic [4:0] adc_data;
  logic [4:0][11:0] charge, value;
  fpga_word_t daq_word;
  logic [15:0] lost, errs, missed;
  logic [23:0] tap_setup;
  int updates, sent, conv[5];
  int checks = 0, failures = 0;
  fpga_word_t got[$];
  int ht_len = 0, sht_len = 0;

  sfet2_board #(.SETUP_LEN(24), .PLL_INIT_CYCLES(50)) dut (
    .clk, .rst_n, .lt_comp(lt), .ht_comp(ht), .sht_comp(sht), .ft,
    .ht_out, .sht_out, .trig_delay(8'd240), .tdc_setup(24'hC0FFEE), .tdc_reinit(1'b0),
    .temperature(16'h0321), .tdc_hit, .tdc_trigger, .tdc_reset, .tdc_sdata(sdata),
    .tdc_tck(tck), .tdc_tms(tms), .tdc_tdi(tdi), .tdc_tdo(tdo),
    .sample, .adc_en, .adc_clk, .adc_data, .daq_word, .daq_valid, .daq_ready(1'b1),
    .charge, .charge_valid, .tdc_ready, .cfg_error,
    .lost_words(lost), .tdc_errors(errs), .missed_charge(missed));

  hptdc_model u_tdc (.clk, .reset(tdc_reset), .hit(tdc_hit), .trigger(tdc_trigger),
                     .inject_err(1'b0), .sdata, .sent);
  jtag_tap_model #(.LEN(24)) u_tap (.tck, .tms, .tdi, .tdo, .setup(tap_setup), .updates);
  for (genvar i = 0; i < 5; i++) begin : g_adc
    serial_adc_model u_adc (.en(adc_en), .sclk(adc_clk), .value(value[i]),
                            .data(adc_data[i]), .conversions(conv[i]));
  end

  always #12.5 clk = ~clk;
  always @(posedge clk) begin
    if (rst_n && daq_valid) got.push_back(daq_word);
    if (ht_out[3])  ht_len++;
    if (sht_out[4]) sht_len++;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #2ms;
    $display("FAIL: watchdog"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ft_t, n;
    #1 rst_n = 1'b0;
    for (int i = 0; i < 5; i++) value[i] = 12'(400 + 333 * i);
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    wait (tdc_ready);
    check(tap_setup == 24'hC0FFEE && !cfg_error, "setup loaded");
    // HPTDC input wiring, combinational
    for (int k = 0; k < 50; k++) begin
      @(negedge clk);
      {lt, ht, sht} = 15'($urandom);   // FT stays low: no readout here
      #1;
      check(tdc_hit == {|sht, |ht, ft, lt}, $sformatf("tdc_hit %b", tdc_hit));
    end
    @(negedge clk);
    {lt, ht, sht, ft} = '0;
    repeat (1000) @(negedge clk);
    got.delete(); ht_len = 0; sht_len = 0;
    // event: LT ch k at -200+30k (4 cycles), HT ch3 at -50, SHT ch4 at +50
    // (2 cycles), LT ch0 again at -600 (outside the window), FT at 0
    for (int r = -620; r <= 100; r++) begin
      @(negedge clk);
      ft = (r >= 0 && r < 3);
      for (int k = 0; k < 5; k++) lt[k] = (r >= -200 + 30*k && r < -196 + 30*k);
      if (r >= -600 && r < -596) lt[0] = 1'b1;
      ht[3]  = (r >= -50 && r < -48);
      sht[4] = (r >= 50 && r < 52);
    end
    repeat (1200) @(negedge clk);
    check(ht_len == 10 && sht_len == 10, $sformatf("HT %0d / SHT %0d cycle pulses", ht_len, sht_len));
    check(got.size() == 1 + 10 + 2 + 2 + 2, $sformatf("%0d words", got.size()));
    if (got.size() > 0) check(got[0] == make_temp_word(16'h0321), "temperature word first");
    ft_t = -1;
    foreach (got[i]) if (i > 0 && got[i][23:21] == 3'd5 && !got[i][24]) ft_t = int'(got[i][20:0]);
    n = 0;
    foreach (got[i]) if (i > 0) begin
      int c, dt, e;
      c  = int'(got[i][23:21]);
      dt = int'(got[i][20:0]) - ft_t;
      e  = (c < 5) ? (-200 + 30*c) * 4 + (got[i][24] ? 16 : 0)
         : (c == 5) ? (got[i][24] ? 12 : 0)
         : (c == 6) ? (-50*4 + (got[i][24] ? 8 : 0))
         : (50*4 + (got[i][24] ? 8 : 0));
      check(dt == e, $sformatf("word %h: channel %0d dt %0d expected %0d", got[i], c, dt, e));
    end
    check(charge == value, "charges");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
