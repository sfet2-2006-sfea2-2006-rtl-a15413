// tb_tdc_input_map: checks the HPTDC channel assignment of an SFET2 board
// (5 LT channels, FT, sum(HT), sum(SHT)) and of an SFEA2 board (4 ACC
// channels, sums not fitted) against a reference model, on random inputs.
`timescale 1ns/1ps
module tb_tdc_input_map;
  logic [4:0] lt, ht, sht;
  logic       ft;
  logic [7:0] hit_t, hit_a;
  int checks = 0, failures = 0;

  tdc_input_map dut_t (.lt_comp(lt), .ht_comp(ht), .sht_comp(sht), .ft, .tdc_hit(hit_t));
  tdc_input_map #(.NCH(4), .SUM_HT_EN(1'b0), .SUM_SHT_EN(1'b0)) dut_a (
    .lt_comp(lt), .ht_comp(ht), .sht_comp(sht), .ft, .tdc_hit(hit_a));

  initial begin
    #100000;
    $display("FAIL: watchdog"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 300; k++) begin
      logic [7:0] exp_t, exp_a;
      {lt, ht, sht, ft} = 16'($urandom);
      if (k < 5) begin lt = '0; ht = 5'(1 << k); sht = 5'(1 << k); end
      #1;
      exp_t = {sht != 0, ht != 0, ft, lt};
      exp_a = {1'b0, 1'b0, ft, 1'b0, lt[3:0]};
      checks++;
      if (hit_t !== exp_t) begin failures++; $display("FAIL SFET2 %b exp %b", hit_t, exp_t); end
      checks++;
      if (hit_a !== exp_a) begin failures++; $display("FAIL SFEA2 %b exp %b", hit_a, exp_a); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
