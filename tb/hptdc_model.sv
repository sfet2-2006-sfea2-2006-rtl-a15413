// hptdc_model: simplified behavioural model of the HPTDC time-to-digital
// converter, for testbenches only.
//
// Every rising (leading) and falling (trailing) edge on the 8 hit inputs is
// time-stamped with the clock-cycle count times 4 (two interpolation bits,
// always 0 here) modulo 2^21 and kept in an L1 list. Hits older than
// REJECT cycles are discarded. A trigger pulse at cycle T selects the hits
// with time stamp in [T - LATENCY, T - LATENCY + MATCH) -- the match window
// opened by the generated trigger, LATENCY cycles before the trigger input --
// and sends them, oldest first, over the serial output: each word is a
// start bit '1' followed by 32 bits, most significant first. Words are
// {type, tdc id, channel[2:0], time[20:0]} with type 0100 (leading) or 0101
// (trailing). Pulsing `inject_err` queues one error word (type 0110).
// While `reset` is high the list is cleared. `sent` counts words sent.
module hptdc_model #(
  parameter int unsigned LATENCY = 640,
  parameter int unsigned MATCH   = 640,
  parameter int unsigned REJECT  = 800,
  parameter logic [3:0]  TDC_ID  = 4'h0
) (
  input  logic       clk,
  input  logic       reset,
  input  logic [7:0] hit,
  input  logic       trigger,
  input  logic       inject_err,
  output logic       sdata,
  output int         sent
);
  typedef struct { longint t; logic [2:0] ch; logic trail; } hit_t;
  hit_t        l1[$];
  logic [31:0] outq[$];
  logic [7:0]  prev = '0;
  longint      now = 0;
  logic [32:0] frame;
  int          bitn = 0;

  initial begin sdata = 1'b0; sent = 0; end

  always @(posedge clk) begin
    now <= now + 1;
    for (int c = 0; c < 8; c++)
      if (hit[c] != prev[c]) begin
        hit_t h;
        h.t = now; h.ch = 3'(c); h.trail = prev[c];
        l1.push_back(h);
      end
    prev <= hit;
    while (l1.size() > 0 && l1[0].t + longint'(REJECT) < now) void'(l1.pop_front());
    if (reset) l1.delete();
    if (trigger) begin
      longint lo;
      lo = now - longint'(LATENCY);
      foreach (l1[i])
        if (l1[i].t >= lo && l1[i].t < lo + longint'(MATCH)) begin
          logic [20:0] tt;
          tt = 21'(l1[i].t * 4);
          outq.push_back({l1[i].trail ? 4'b0101 : 4'b0100, TDC_ID, l1[i].ch, tt});
        end
    end
    if (inject_err) outq.push_back({4'b0110, TDC_ID, 24'h000001});
    // serial sender
    if (bitn == 0) begin
      if (outq.size() > 0) begin
        frame = {1'b1, outq.pop_front()};
        sdata <= 1'b1;
        bitn  = 32;
      end else begin
        sdata <= 1'b0;
      end
    end else begin
      sdata <= frame[bitn-1];
      bitn  = bitn - 1;
      if (bitn == 0) sent <= sent + 1;
    end
  end
endmodule
