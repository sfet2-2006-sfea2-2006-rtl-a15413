// tb_pulse_former: checks the 250 ns HT/SHT pulse forming.
//
// Drives 8 ns comparator glitches (shorter than the 25 ns clock) and checks:
// one hit gives a 10-cycle pulse; a second hit 100 ns later extends the pulse
// to end 250 ns after it (14 cycles in all); a hit after the pulse has ended
// starts a new one; the output rises within 4 clock edges of the hit.
`timescale 1ns/1ps
module tb_pulse_former;
  logic clk = 1'b0, rst_n = 1'b1, comp = 1'b0, pout;
  int checks = 0, failures = 0;

  pulse_former dut (.clk, .rst_n, .comp_in(comp), .pulse_out(pout));

  always #12.5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic glitch();
    comp = 1'b1; #8; comp = 1'b0;
  endtask

  // Count the length of the next output pulse, and the clock edges from
  // `start` until it rose.
  int hi_len, rise_lat;
  task automatic measure(output int len, output int lat);
    lat = 0; len = 0;
    while (!pout) begin @(posedge clk); #1; lat++; end
    while (pout)  begin @(posedge clk); #1; len++; end
  endtask

  initial begin
    #2000;
    $display("FAIL: watchdog");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1 rst_n = 1'b0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (2) @(posedge clk);
    check(pout == 1'b0, "idle after reset");
    // single hit
    #5; glitch();
    measure(hi_len, rise_lat);
    check(hi_len == 10, $sformatf("single pulse 10 cycles, got %0d", hi_len));
    check(rise_lat <= 4, $sformatf("latency <= 4 edges, got %0d", rise_lat));
    repeat (3) @(posedge clk);
    // second hit 100 ns after the first extends the pulse by 100 ns
    fork
      measure(hi_len, rise_lat);
      begin #5; glitch(); #92; glitch(); end
    join
    check(hi_len == 14, $sformatf("extended pulse 14 cycles, got %0d", hi_len));
    // a hit right after the fall starts a new pulse
    #3; glitch();
    measure(hi_len, rise_lat);
    check(hi_len == 10 && rise_lat <= 4, $sformatf("new pulse after fall: len %0d lat %0d", hi_len, rise_lat));
    // a long comparator signal (300 ns) still gives 250 ns from its edge
    repeat (2) @(posedge clk);
    fork
      measure(hi_len, rise_lat);
      begin #5; comp = 1'b1; #300; comp = 1'b0; end
    join
    check(hi_len == 10, $sformatf("long input: 10-cycle pulse, got %0d", hi_len));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
