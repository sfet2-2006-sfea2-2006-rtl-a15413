// tb_tof_crate: end-to-end test of one S-crate (four SFET2 boards and one
// SFEA2 board) at the design's default parameters: 647-bit HPTDC setup,
// 10 ms PLL wait, trigger delay 240 cycles (6 us), charge sample at 1.7 us.
// Each board has an HPTDC model (trigger latency and match window 640
// cycles = 16 us, so the history window is FT-10 us .. FT+6 us), a JTAG TAP
// model and five ADC models.
//
// Sequence: power-up and HPTDC programming on all boards; event A, where
// every board sees LT hits inside and outside the history window, double HT
// hits 100 ns apart and an SHT hit, and the SDR2 raw event words of every
// link are decoded and checked (temperature word first, every in-window
// edge with channel, edge flag and time relative to the FT word, link
// number, charges); event B, where link 0 is stalled while many hits
// arrive (buffer overflow), a second FT comes during the charge conversion
// and board 2's HPTDC reports an error. Each mechanism is counted and must
// have happened at least once.
`timescale 1ns/1ps
module tb_tof_crate;
  import sfet2_pkg::*;
  localparam int SLEN = 647;
  localparam logic [SLEN-1:0] SETUP = SLEN'({21{32'h9E37_79B9}});

  logic clk = 1'b0, rst_n = 1'b1, ft = 1'b0;
  logic [4:0][4:0] lt = '0, ht = '0, sht = '0;
  logic [4:0][4:0] ht_out, sht_out;
  logic [4:0][15:0] temp;
  logic [4:0][7:0]  tdc_hit;
  logic [4:0] tdc_trigger, tdc_reset, sdata, tck, tms, tdi, tdo;
  logic [4:0] sample, adc_en, adc_clk, sdr2_valid, charge_valid, tdc_ready, cfg_error;
  logic [4:0] sdr2_ready = '1;
  logic [4:0] inject = '0;
  logic [4:0][4:0] adc_data;
  logic [4:0][15:0] sdr2_word, lost, errs, missed;
  logic [4:0][4:0][11:0] charge, value;
  logic [SLEN-1:0] tap_setup [5];
  int updates [5], sent [5], conv [5][5];
  int checks = 0, failures = 0;
  longint cyc = 0;
  logic [15:0] rx [5][$];

  // mechanism counters
  int m_jtag = 0, m_pll = 0, m_ht = 0, m_ht_ext = 0, m_sht = 0, m_sum_ht = 0,
      m_sum_sht = 0, m_trig_delay = 0, m_temp = 0, m_lead = 0, m_trail = 0,
      m_window_cut = 0, m_charge = 0, m_acc = 0, m_overflow = 0, m_error = 0,
      m_missed = 0, m_stall = 0;

  tof_crate dut (
    .clk, .rst_n, .lt_comp(lt), .ht_comp(ht), .sht_comp(sht), .ft,
    .ht_out, .sht_out, .trig_delay(8'd240), .tdc_setup(SETUP), .tdc_reinit(1'b0),
    .temperature(temp), .tdc_hit, .tdc_trigger, .tdc_reset, .tdc_sdata(sdata),
    .tdc_tck(tck), .tdc_tms(tms), .tdc_tdi(tdi), .tdc_tdo(tdo),
    .sample, .adc_en, .adc_clk, .adc_data,
    .sdr2_word, .sdr2_valid, .sdr2_ready, .charge, .charge_valid,
    .tdc_ready, .cfg_error, .lost_words(lost), .tdc_errors(errs), .missed_charge(missed));

  for (genvar b = 0; b < 5; b++) begin : g_b
    hptdc_model #(.LATENCY(640), .MATCH(640), .REJECT(800), .TDC_ID(4'(b))) u_tdc (
      .clk, .reset(tdc_reset[b]), .hit(tdc_hit[b]), .trigger(tdc_trigger[b]),
      .inject_err(inject[b]), .sdata(sdata[b]), .sent(sent[b]));
    jtag_tap_model #(.LEN(SLEN)) u_tap (
      .tck(tck[b]), .tms(tms[b]), .tdi(tdi[b]), .tdo(tdo[b]),
      .setup(tap_setup[b]), .updates(updates[b]));
    for (genvar i = 0; i < 5; i++) begin : g_adc
      serial_adc_model u_adc (.en(adc_en[b]), .sclk(adc_clk[b]), .value(value[b][i]),
                              .data(adc_data[b][i]), .conversions(conv[b][i]));
    end
  end

  always #12.5 clk = ~clk;

  // ---------------------------------------------------------------- monitors
  longint ft_cyc = -1;
  int     ht_len [5], sht_len [5];
  always @(posedge clk) begin
    cyc <= cyc + 1;
    for (int b = 0; b < 5; b++) begin
      if (rst_n && sdr2_valid[b] && sdr2_ready[b]) rx[b].push_back(sdr2_word[b]);
      if (ht_out[b][0]) ht_len[b]++;
      if (sht_out[b][2]) sht_len[b]++;
      if (rst_n && sdr2_valid[b] && !sdr2_ready[b]) m_stall++;
    end
    if (tdc_trigger[0] && ft_cyc >= 0 && cyc - ft_cyc < 300) begin
      // FT is taken 2-3 cycles after its edge, then delayed 240 cycles
      if (cyc - ft_cyc >= 242 && cyc - ft_cyc <= 245) m_trig_delay++;
    end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #15ms;
    $display("FAIL: watchdog"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------------------- event A
  // Offsets (cycles) from FT. SFET2 board b: LT ch k at -300+50k+7b for
  // k = 0..3 (4 cycles wide), LT ch4 at -500 (outside the window), HT ch0 at
  // -100 and -96 (2 cycles wide each), SHT ch2 at +100. SFEA2: LT ch k at
  // -200+40k. FT is 3 cycles wide.
  function automatic int lt_at(int b, int k);
    if (b == 4) return -200 + 40*k;
    return (k == 4) ? -500 : -300 + 50*k + 7*b;
  endfunction

  task automatic drive_event_a();
    for (int r = -520; r <= 120; r++) begin
      @(negedge clk);
      ft = (r >= 0 && r < 3);
      if (r == 0) ft_cyc = cyc;
      for (int b = 0; b < 5; b++) begin
        for (int k = 0; k < 5; k++) begin
          if (b == 4 && k == 4) continue;
          lt[b][k] = (r >= lt_at(b, k) && r < lt_at(b, k) + 4);
        end
        if (b < 4) begin
          ht[b][0]  = (r >= -100 && r < -98) || (r >= -96 && r < -94);
          sht[b][2] = (r >= 100 && r < 102);
        end
      end
    end
  endtask

  // Decode the raw event words of link b; check against event A.
  task automatic check_event_a(input int b);
    int n, ft_t;
    logic [25:0] w [$];
    n = rx[b].size();
    check(n % 2 == 0, $sformatf("link %0d: even number of words", b));
    for (int i = 0; i + 1 < n; i += 2) begin
      logic [15:0] w0, w1;
      w0 = rx[b][i]; w1 = rx[b][i+1];
      check(w0[14:12] == 3'(b + 1) && w1[14:12] == 3'(b + 1) && !w0[15],
            $sformatf("link %0d: link field %h %h", b, w0, w1));
      w.push_back({1'b0, w1[15], w0[11:0], w1[11:0]});
    end
    // temperature word first
    check(w.size() > 0 && w[0][23:0] == {8'h0, temp[b]},
          $sformatf("link %0d: temperature word %h", b, w.size() > 0 ? w[0] : 26'h0));
    if (w.size() > 0 && w[0][23:0] == {8'h0, temp[b]}) m_temp++;
    ft_t = -1;
    for (int i = 1; i < w.size(); i++)
      if (w[i][23:21] == 3'd5 && !w[i][24]) ft_t = int'(w[i][20:0]);
    check(ft_t >= 0, $sformatf("link %0d: FT recorded", b));
    begin
      int exp_n;
      exp_n = (b == 4) ? 2*4 + 2 : 2*4 + 2 + 4 + 2;
      check(w.size() - 1 == exp_n, $sformatf("link %0d: %0d time words, expected %0d", b, w.size() - 1, exp_n));
    end
    for (int i = 1; i < w.size(); i++) begin
      int c, dt, lead_dt, width;
      bit ok;
      c  = int'(w[i][23:21]);
      dt = int'(w[i][20:0]) - ft_t;
      ok = 1'b0;
      case (c)
        0, 1, 2, 3: begin lead_dt = lt_at(b, c); width = 4; ok = 1'b1; end
        5:          begin lead_dt = 0;    width = 3; ok = 1'b1; end
        6:          begin lead_dt = (dt < -97*4) ? -100 : -96; width = 2; ok = (b < 4); m_sum_ht++; end
        7:          begin lead_dt = 100;  width = 2; ok = (b < 4); m_sum_sht++; end
        default:    begin lead_dt = 0; width = 0; ok = 1'b0; end
      endcase
      if (w[i][24]) begin lead_dt += width; m_trail++; end else m_lead++;
      if (b == 4) m_acc++;
      check(ok && dt == lead_dt*4, $sformatf("link %0d word %h: channel %0d dt %0d expected %0d",
                                             b, w[i], c, dt, lead_dt*4));
    end
  endtask

  // ---------------------------------------------------------------- main
  initial begin
    #1 rst_n = 1'b0;
    for (int b = 0; b < 5; b++) begin
      temp[b] = 16'h2000 + 16'(b * 16'h111);
      for (int i = 0; i < 5; i++) value[b][i] = 12'($urandom_range(60, 3000));
    end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // power-up: HPTDC programming and 10 ms PLL wait
    @(negedge clk);
    check(tdc_reset == 5'h1F && tdc_ready == 5'h0, "HPTDCs held in reset while programmed");
    wait (tdc_ready == 5'h1F);
    check(cyc >= 400000, $sformatf("ready after %0d cycles (PLL wait 400000)", cyc));
    if (cyc >= 400000) m_pll++;
    for (int b = 0; b < 5; b++) begin
      check(tap_setup[b] == SETUP && updates[b] == 2 && !cfg_error[b],
            $sformatf("board %0d: setup loaded", b));
      if (tap_setup[b] == SETUP) m_jtag++;
    end
    repeat (900) @(negedge clk);       // let the HPTDC models forget power-up edges
    for (int b = 0; b < 5; b++) begin ht_len[b] = 0; sht_len[b] = 0; rx[b].delete(); end

    // ---- event A
    drive_event_a();
    fork
      begin
        wait (charge_valid[0]);
        @(posedge clk); #1;
        for (int b = 0; b < 5; b++) begin
          for (int i = 0; i < ((b == 4) ? 4 : 5); i++) begin
            check(charge[b][i] == value[b][i], $sformatf("board %0d ch %0d charge %0d expected %0d",
                                                         b, i, charge[b][i], value[b][i]));
            if (charge[b][i] == value[b][i]) m_charge++;
          end
        end
      end
    join_none
    repeat (1500) @(negedge clk);
    for (int b = 0; b < 5; b++) begin
      if (b < 4) begin
        check(ht_len[b] == 14, $sformatf("board %0d: HT pulse %0d cycles, expected 14 (extended)", b, ht_len[b]));
        check(sht_len[b] == 10, $sformatf("board %0d: SHT pulse %0d cycles, expected 10", b, sht_len[b]));
        if (ht_len[b] == 14) begin m_ht++; m_ht_ext++; end
        if (sht_len[b] == 10) m_sht++;
      end
      check_event_a(b);
      // the LT ch4 hit of each SFET2 board was outside the window
      if (b < 4 && ht_len[b] >= 0) begin
        bit seen4;
        seen4 = 1'b0;
        for (int i = 1; i < rx[b].size(); i += 2) if (rx[b][i-1][11:9] == 3'd4) seen4 = 1'b1;
        check(!seen4, $sformatf("link %0d: out-of-window hit dropped", b));
        if (!seen4) m_window_cut++;
      end
    end

    // ---- event B: link 0 stalled, many hits, second FT during conversion,
    //      error word from board 2
    for (int b = 0; b < 5; b++) rx[b].delete();
    sdr2_ready[0] = 1'b0;
    for (int r = 0; r < 200; r++) begin
      @(negedge clk);
      lt[0][0] = (r % 8) < 3;
      lt[0][1] = (r % 8) >= 4 && (r % 8) < 7;
      ft = (r >= 100 && r < 103) || (r >= 140 && r < 143);
      inject[2] = (r == 150);
    end
    lt = '0; ft = 1'b0; inject = '0;
    repeat (3000) @(negedge clk);
    sdr2_ready[0] = 1'b1;
    repeat (3000) @(negedge clk);
    check(lost[0] > 0, $sformatf("link 0 overflow: %0d words lost", lost[0]));
    if (lost[0] > 0) m_overflow++;
    check(errs[2] == 16'd1 && errs[0] == 16'd0, $sformatf("HPTDC error words counted: %0d", errs[2]));
    if (errs[2] == 16'd1) m_error++;
    check(missed[1] == 16'd1, $sformatf("FT during conversion: %0d missed", missed[1]));
    if (missed[1] == 16'd1) m_missed++;
    check(rx[0].size() >= 32,
          $sformatf("link 0 delivered %0d raw words after the stall", rx[0].size()));

    // ---- mechanism coverage
    check(m_jtag > 0,       "mechanism: JTAG programming");
    check(m_pll > 0,        "mechanism: 10 ms PLL wait");
    check(m_ht > 0,         "mechanism: HT pulse forming");
    check(m_ht_ext > 0,     "mechanism: HT pulse extension");
    check(m_sht > 0,        "mechanism: SHT pulse forming");
    check(m_sum_ht > 0,     "mechanism: sum(HT) on TDC channel 6");
    check(m_sum_sht > 0,    "mechanism: sum(SHT) on TDC channel 7");
    check(m_trig_delay > 0, "mechanism: FT to TDC trigger delay");
    check(m_temp > 0,       "mechanism: temperature word");
    check(m_lead > 0 && m_trail > 0, "mechanism: leading and trailing edges");
    check(m_window_cut > 0, "mechanism: hit outside the history window dropped");
    check(m_charge > 0,     "mechanism: charge readout");
    check(m_acc > 0,        "mechanism: SFEA2 board");
    check(m_overflow > 0,   "mechanism: output buffer overflow");
    check(m_stall > 0,      "mechanism: DAQ back-pressure");
    check(m_error > 0,      "mechanism: HPTDC error word");
    check(m_missed > 0,     "mechanism: FT during charge conversion");
    $display("mechanisms: jtag=%0d pll=%0d ht=%0d ht_ext=%0d sht=%0d sumht=%0d sumsht=%0d trig=%0d temp=%0d lead=%0d trail=%0d cut=%0d charge=%0d acc=%0d ovf=%0d stall=%0d err=%0d missed=%0d",
             m_jtag, m_pll, m_ht, m_ht_ext, m_sht, m_sum_ht, m_sum_sht, m_trig_delay, m_temp,
             m_lead, m_trail, m_window_cut, m_charge, m_acc, m_overflow, m_stall, m_error, m_missed);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
