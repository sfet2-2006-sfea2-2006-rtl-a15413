// tb_tdc_word_formatter: random HPTDC words of all types go in; leading and
// trailing measurements must come out one cycle later as 26-bit time words
// {0, S, channel, time} (S = trailing), error words must raise err, and all
// other words must be dropped.
`timescale 1ns/1ps
module tb_tdc_word_formatter;
  import sfet2_pkg::*;
  logic clk = 1'b0, rst_n = 1'b1;
  hptdc_word_t in_w;
  logic in_v = 1'b0;
  fpga_word_t out_w;
  logic out_v, err;
  int checks = 0, failures = 0;
  int n_meas = 0, n_err = 0;

  tdc_word_formatter dut (.clk, .rst_n, .in_word(in_w), .in_valid(in_v),
                          .out_word(out_w), .out_valid(out_v), .err);

  always #12.5 clk = ~clk;

  initial begin
    #100000;
    $display("FAIL: watchdog"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1 rst_n = 1'b0;
    in_w = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int k = 0; k < 400; k++) begin
      logic [31:0] w;
      logic        exp_v, exp_e;
      logic [25:0] exp_w;
      w = $urandom;
      if (k % 3 == 0) w[31:28] = 4'b0100;
      if (k % 3 == 1) w[31:28] = 4'b0101;
      @(negedge clk);
      in_w = w;
      in_v = (k % 7 != 6);
      exp_v = in_v && (w[31:28] == 4'b0100 || w[31:28] == 4'b0101);
      exp_e = in_v && (w[31:28] == 4'b0110);
      exp_w = {1'b0, w[28], w[23:0]};
      @(negedge clk);
      in_v = 1'b0;
      checks++;
      if (out_v !== exp_v || err !== exp_e || (exp_v && out_w !== exp_w)) begin
        failures++;
        $display("FAIL: in %h -> v=%b e=%b w=%h, expected v=%b e=%b w=%h", w, out_v, err, out_w, exp_v, exp_e, exp_w);
      end
      n_meas += int'(exp_v);
      n_err  += int'(exp_e);
    end
    checks++;
    if (n_meas < 100 || n_err < 2) begin failures++; $display("FAIL: too few cases %0d %0d", n_meas, n_err); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
