// tb_sdr2_link_packer: random 26-bit words go in through the valid/ready
// handshake while the output is stalled at random; every word must come out
// as {0, link, w[23:12]} followed by {w[24], link, w[11:0]}, in order, with
// nothing lost or duplicated. Run for link 5 (SFEA2).
`timescale 1ns/1ps
module tb_sdr2_link_packer;
  import sfet2_pkg::*;
  logic clk = 1'b0, rst_n = 1'b1;
  fpga_word_t in_w;
  logic in_v = 1'b0, in_r, out_v, out_r = 1'b0;
  logic [15:0] out_w;
  int checks = 0, failures = 0;
  logic [15:0] expq[$];
  int sent = 0;

  sdr2_link_packer #(.LINK(LINK_SFEA2)) dut (
    .clk, .rst_n, .in_word(in_w), .in_valid(in_v), .in_ready(in_r),
    .out_word(out_w), .out_valid(out_v), .out_ready(out_r));

  always #12.5 clk = ~clk;

  always @(posedge clk) begin
    if (rst_n && in_v && in_r) begin
      expq.push_back({1'b0, 3'd5, in_w[23:12]});
      expq.push_back({in_w[24], 3'd5, in_w[11:0]});
      sent++;
    end
    if (rst_n && out_v && out_r) begin
      logic [15:0] e;
      checks++;
      if (expq.size() == 0) begin failures++; $display("FAIL: extra word %h", out_w); end
      else begin
        e = expq.pop_front();
        if (out_w !== e) begin failures++; $display("FAIL: got %h expected %h", out_w, e); end
      end
    end
  end

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
    while (sent < 200) begin
      @(negedge clk);
      if (!in_v || in_r) begin    // previous word taken (or none offered)
        in_v = ($urandom_range(0, 3) != 0);
        in_w = 26'($urandom);
      end
      out_r = ($urandom_range(0, 2) != 0);
    end
    @(negedge clk);
    in_v = 1'b0; out_r = 1'b1;
    repeat (5) @(negedge clk);
    checks++;
    if (expq.size() != 0) begin failures++; $display("FAIL: %0d words missing", expq.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
