// word_fifo: synchronous first-in first-out buffer with valid/ready output.
//
// Stores up to DEPTH words of W bits in a register array. A push when full
// is refused and reported by `overflow` for one cycle (the word is lost).
// Output is first-word-fall-through: out_valid is high whenever the buffer
// holds a word, and the word leaves when out_ready is high. A push and a pop
// may happen in the same cycle; a word written is readable one cycle later.
module word_fifo #(
  parameter int unsigned W     = 26,
  parameter int unsigned DEPTH = 16,
  localparam int unsigned AW = $clog2(DEPTH)
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] in_word,
  input  logic         push,
  output logic         overflow,
  output logic [W-1:0] out_word,
  output logic         out_valid,
  input  logic         out_ready,
  output logic [AW:0]  level
);
  logic [W-1:0]  mem [DEPTH];
  logic [AW-1:0] wp, rp;
  logic          do_push, do_pop;

  assign out_valid = (level != '0);
  assign out_word  = mem[rp];
  assign do_pop    = out_valid && out_ready;
  assign do_push   = push && (level != (AW+1)'(DEPTH));

  always_ff @(posedge clk) begin
    if (do_push) mem[wp] <= in_word;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp       <= '0;
      rp       <= '0;
      level    <= '0;
      overflow <= 1'b0;
    end else begin
      overflow <= push && !do_push;
      if (do_push) wp <= (wp == AW'(DEPTH-1)) ? '0 : wp + 1'b1;
      if (do_pop)  rp <= (rp == AW'(DEPTH-1)) ? '0 : rp + 1'b1;
      level <= level + (AW+1)'(do_push) - (AW+1)'(do_pop);
    end
  end
endmodule
