// tb_ft_trigger_delay: checks that the HPTDC trigger follows each FT by
// exactly `delay` clock cycles (counted from the synchronous ft_pulse), for
// several delays including the default 240 (6 us), and that FTs closer
// together than the delay are all delivered, in order and spacing. Every
// driven FT must give exactly one ft_pulse and one trigger.
`timescale 1ns/1ps
module tb_ft_trigger_delay;
  logic clk = 1'b0, rst_n = 1'b1, ft = 1'b0, ft_pulse, trig;
  logic [7:0] delay = 8'd240;
  int checks = 0, failures = 0;
  longint cyc = 0;
  longint ft_times[$];
  int n_ft = 0, n_pulse = 0, n_trig = 0;   // FTs driven, ft_pulse and trigger outputs seen

  ft_trigger_delay dut (.clk, .rst_n, .ft, .delay, .ft_pulse, .tdc_trigger(trig));

  always #12.5 clk = ~clk;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (ft_pulse) begin ft_times.push_back(cyc); n_pulse++; end
    if (trig) begin
      n_trig++;
      checks++;
      if (ft_times.size() == 0) begin
        failures++; $display("FAIL: trigger without FT at %0d", cyc);
      end else begin
        longint t0;
        t0 = ft_times.pop_front();
        if (cyc - t0 != longint'(delay)) begin
          failures++; $display("FAIL: delay %0d expected %0d", cyc - t0, delay);
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

  task automatic pulse_ft();
    #3; ft = 1'b1; n_ft++; #40; ft = 1'b0;
  endtask

  initial begin
    #1 rst_n = 1'b0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int d = 0; d < 6; d++) begin
      delay = (d == 0) ? 8'd240 : (d == 1) ? 8'd1 : (d == 2) ? 8'd2 : 8'($urandom_range(3, 255));
      repeat (2) @(posedge clk);
      pulse_ft();
      repeat (270) @(posedge clk);   // let the pulse leave the whole line
    end
    // a burst of three FTs within one delay
    delay = 8'd100;
    repeat (2) @(posedge clk);
    pulse_ft(); repeat (5) @(posedge clk);
    pulse_ft(); repeat (20) @(posedge clk);
    pulse_ft(); repeat (130) @(posedge clk);
    checks++;
    if (ft_times.size() != 0) begin failures++; $display("FAIL: %0d triggers missing", ft_times.size()); end
    checks++;
    if (n_pulse != n_ft || n_trig != n_ft) begin
      failures++; $display("FAIL: %0d FTs gave %0d ft_pulse and %0d triggers", n_ft, n_pulse, n_trig);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
