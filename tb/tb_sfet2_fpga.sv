// tb_sfet2_fpga: the control FPGA with an HPTDC model, a JTAG TAP model and
// five ADC models (setup word 24 bits, 50-cycle PLL wait, trigger delay 24
// cycles; HPTDC match window = the 64 cycles before the trigger).
//
// Event 1: hits on channels 0-4 at known offsets around FT (FT itself is
// recorded on channel 5), some inside and some outside the window. Checks
// that the temperature word comes first, then exactly the in-window edges
// with the right channel, edge flag S and time relative to the FT word, and
// that the five charges arrive. Event 2: the DAQ stalls and more words than
// the 16-word buffer arrive: the loss is counted. An HPTDC error word is
// counted. Before everything, the HPTDC setup must be loaded and ready.
`timescale 1ns/1ps
module tb_sfet2_fpga;
  import sfet2_pkg::*;
  localparam int SLEN = 24, PLL = 50;
  logic clk = 1'b0, rst_n = 1'b1, ft = 1'b0, daq_ready = 1'b1, inject = 1'b0;
  logic [7:0] hit = '0;
  logic tdc_trigger, tdc_reset, sdata, tck, tms, tdi, tdo;
  logic sample, adc_en, adc_clk, daq_valid, charge_valid, tdc_ready, cfg_error;
  logic [4:0] adc_data;
  logic [4:0][11:0] charge, value;
  fpga_word_t daq_word;
  logic [15:0] lost, errs, missed;
  logic [SLEN-1:0] tap_setup;
  int updates, sent, conv[5];
  int checks = 0, failures = 0;
  fpga_word_t got[$];
  int sent0;

  sfet2_fpga #(.SETUP_LEN(SLEN), .PLL_INIT_CYCLES(PLL)) dut (
    .clk, .rst_n, .trig_delay(8'd24), .tdc_setup(24'h5A5A33), .tdc_reinit(1'b0),
    .temperature(16'h1234), .ft,
    .tdc_trigger, .tdc_reset, .tdc_sdata(sdata), .tdc_tck(tck), .tdc_tms(tms),
    .tdc_tdi(tdi), .tdc_tdo(tdo), .sample, .adc_en, .adc_clk, .adc_data,
    .daq_word, .daq_valid, .daq_ready, .charge, .charge_valid,
    .tdc_ready, .cfg_error, .lost_words(lost), .tdc_errors(errs), .missed_charge(missed));

  hptdc_model #(.LATENCY(64), .MATCH(64), .REJECT(100)) tdc (
    .clk, .reset(tdc_reset), .hit, .trigger(tdc_trigger), .inject_err(inject),
    .sdata, .sent);
  jtag_tap_model #(.LEN(SLEN)) tap (.tck, .tms, .tdi, .tdo, .setup(tap_setup), .updates);
  for (genvar i = 0; i < 5; i++) begin : g_adc
    serial_adc_model u_adc (.en(adc_en), .sclk(adc_clk), .value(value[i]),
                            .data(adc_data[i]), .conversions(conv[i]));
  end

  always #12.5 clk = ~clk;
  always @(posedge clk) if (rst_n && daq_valid && daq_ready) got.push_back(daq_word);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // drive a 3-cycle pulse on channel c starting `at` cycles from now (in a fork)
  task automatic pulse(input int c, input int at);
    repeat (at) @(negedge clk);
    hit[c] = 1'b1;
    repeat (3) @(negedge clk);
    hit[c] = 1'b0;
  endtask

  initial begin
    #400000;
    $display("FAIL: watchdog"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1 rst_n = 1'b0;
    for (int i = 0; i < 5; i++) value[i] = 12'(100 * (i + 1) + 7);
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    wait (tdc_ready);
    check(tap_setup == 24'h5A5A33 && !cfg_error, "HPTDC setup loaded");
    repeat (5) @(negedge clk);
    // ---- event 1: FT at cycle 60 of this block
    fork
      pulse(0, 5);    // FT-55: outside (before the window)
      pulse(1, 30);   // FT-30: inside
      pulse(2, 50);   // FT-10: inside
      pulse(3, 70);   // FT+10: inside
      pulse(4, 110);  // FT+50: outside (after)
      begin repeat (60) @(negedge clk); ft = 1'b1; hit[5] = 1'b1;
            repeat (3) @(negedge clk); ft = 1'b0; hit[5] = 1'b0; end
    join
    repeat (400) @(negedge clk);   // 8 words x 33 serial bits
    begin
      int ft_t, n_time;
      check(got.size() == 9, $sformatf("event 1: %0d words, expected 1 temperature + 8 edges", got.size()));
      if (got.size() > 0)
        check(got[0] == make_temp_word(16'h1234), $sformatf("temperature word first: %h", got[0]));
      ft_t = -1;
      foreach (got[i]) if (i > 0 && got[i][23:21] == 3'd5 && !got[i][24]) ft_t = int'(got[i][20:0]);
      check(ft_t >= 0, "FT leading edge recorded");
      n_time = 0;
      foreach (got[i]) if (i > 0) begin
        int c, dt, exp_dt;
        c  = int'(got[i][23:21]);
        dt = int'(got[i][20:0]) - ft_t;
        exp_dt = (c == 1) ? -30*4 : (c == 2) ? -10*4 : (c == 3) ? 10*4 : 0;
        if (got[i][24]) exp_dt += 3*4;     // trailing edge 3 cycles later
        check(got[i][25] == 1'b0 && c >= 1 && c <= 5 && dt == exp_dt,
              $sformatf("word %h: channel %0d dt %0d expected %0d", got[i], c, dt, exp_dt));
        n_time++;
      end
    end
    check(charge == value, "charges of event 1");
    check(conv[0] == 1, "one ADC conversion");
    // ---- event 2: DAQ stalled, 12 hits on each of 2 channels -> 49 words
    got.delete();
    sent0 = sent;
    daq_ready = 1'b0;
    fork
      for (int k = 0; k < 12; k++) begin pulse(0, 1); end
      for (int k = 0; k < 12; k++) begin pulse(1, 1); end
      begin repeat (30) @(negedge clk); ft = 1'b1; repeat (3) @(negedge clk); ft = 1'b0; end
    join
    repeat (2500) @(negedge clk);
    daq_ready = 1'b1;
    repeat (40) @(negedge clk);
    check(lost > 0 && got.size() == 16, $sformatf("overflow: lost %0d, delivered %0d", lost, got.size()));
    check(int'(lost) + got.size() == 1 + sent - sent0,
          $sformatf("lost %0d + delivered %0d = 1 + %0d sent", lost, got.size(), sent - sent0));
    // ---- error word
    @(negedge clk); inject = 1'b1; @(negedge clk); inject = 1'b0;
    repeat (60) @(negedge clk);
    check(errs == 16'd1, $sformatf("error words %0d", errs));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
