// tb_trigger_fpga: checks that each HT and SHT comparator input gives a
// 250 ns (10-cycle) pulse on its own output only, with no mask.
`timescale 1ns/1ps
module tb_trigger_fpga;
  logic clk = 1'b0, rst_n = 1'b1;
  logic [4:0] ht = '0, sht = '0, ht_o, sht_o;
  int checks = 0, failures = 0;

  trigger_fpga dut (.clk, .rst_n, .ht_comp(ht), .sht_comp(sht), .ht_out(ht_o), .sht_out(sht_o));

  always #12.5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #20000;
    $display("FAIL: watchdog"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1 rst_n = 1'b0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (2) @(posedge clk);
    for (int k = 0; k < 20; k++) begin
      int  ch, len;
      bit  s;
      logic [9:0] exp;
      ch = $urandom_range(0, 4);
      s  = 1'($urandom_range(0, 1));
      len = 0;
      #3;
      if (s) sht[ch] = 1'b1; else ht[ch] = 1'b1;
      #7;
      sht = '0; ht = '0;
      exp = s ? {5'(1 << ch), 5'b0} : {5'b0, 5'(1 << ch)};
      // wait for the rise (at most 4 edges), then measure the whole pulse
      for (int w = 0; w < 5 && {sht_o, ht_o} == '0; w++) begin @(posedge clk); #1; end
      check({sht_o, ht_o} == exp, $sformatf("hit %0d sht=%0d: outputs %b expected %b", ch, s, {sht_o, ht_o}, exp));
      while ({sht_o, ht_o} != '0) begin @(posedge clk); #1; len++; end
      check(len == 10, $sformatf("pulse length %0d", len));
      repeat ($urandom_range(1, 3)) @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
