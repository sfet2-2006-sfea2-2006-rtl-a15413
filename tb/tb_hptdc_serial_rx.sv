// tb_hptdc_serial_rx: sends random 32-bit words as serial frames (start bit
// then 32 bits, most significant first), some back to back and some with
// idle gaps, and checks that each is received intact, word_valid coming
// two cycles after the last bit is on the line.
`timescale 1ns/1ps
module tb_hptdc_serial_rx;
  logic clk = 1'b0, rst_n = 1'b1, sdata = 1'b0;
  logic [31:0] word;
  logic valid;
  int checks = 0, failures = 0;
  logic [31:0] sentq[$];
  longint cyc = 0, last_bit_cyc = 0;

  hptdc_serial_rx dut (.clk, .rst_n, .sdata, .word, .word_valid(valid));

  always #12.5 clk = ~clk;

  // Serial line driver: one queued bit per clock, idle low.
  // Each entry is {last bit of a frame, bit}.
  logic [1:0] bitq[$];
  always @(posedge clk) begin
    if (rst_n && bitq.size() > 0) begin
      logic [1:0] e;
      e = bitq.pop_front();
      sdata <= e[0];
      if (e[1]) last_bit_cyc <= cyc;
    end else begin
      sdata <= 1'b0;
    end
  end

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (valid) begin
      checks++;
      if (sentq.size() == 0) begin failures++; $display("FAIL: spurious word"); end
      else begin
        logic [31:0] e;
        e = sentq.pop_front();
        if (word !== e || cyc - last_bit_cyc != 3) begin
          failures++;
          $display("FAIL: got %h exp %h, latency %0d", word, e, cyc - last_bit_cyc);
        end
      end
    end
  end

  initial begin
    #200000;
    $display("FAIL: watchdog"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1 rst_n = 1'b0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    repeat (2) @(posedge clk);
    for (int k = 0; k < 40; k++) begin
      logic [31:0] w;
      w = $urandom;
      if (k == 0) w = 32'hFFFF_FFFF;
      if (k == 1) w = 32'h0000_0000;
      sentq.push_back(w);
      bitq.push_back(2'b01);
      for (int b = 31; b >= 0; b--) bitq.push_back({b == 0, w[b]});
      if (k % 3 == 0) repeat ($urandom_range(1, 5)) bitq.push_back(2'b00);
    end
    wait (bitq.size() == 0);
    repeat (5) @(posedge clk);
    checks++;
    if (sentq.size() != 0) begin failures++; $display("FAIL: %0d words lost", sentq.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
