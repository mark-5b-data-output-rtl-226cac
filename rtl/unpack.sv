// unpack: undoes the recorder's packing of narrow samples into 32-bit words.
// code = log2 of the number of active bit streams N (0..5 for 1..32). Each
// input word is loaded into a shift register and shifted right by N bits per
// clock; the low N bits of every output word are one time sample, so one input
// word yields 32/N output words, after which the register is reloaded. The
// vacated high bits are refilled with copies of the top N bits, which
// reproduces the worked example 0xAABBCCDD -> 0xAAAABBCC -> 0xAAAAAABB ->
// 0xAAAAAAAA for N = 8. The validity tag of the input word goes with every
// sample cut from it; the TOT tag only with the first, which is the first
// sample of the second. Handshake: in_rd pops the input FIFO (show-ahead)
// when the register is free; out_v/out_word is registered and advances when
// out_ready is high. The code encoding is this design's choice.
module unpack
  import dom_pkg::*;
(
  input  logic     clk,
  input  logic     rst,
  input  logic [2:0] code,
  input  logic     in_empty,
  input  fe_word_t in_word,
  output logic     in_rd,
  output logic     out_v,
  output fe_word_t out_word,
  input  logic     out_ready
);
  logic [5:0] nbits;
  logic [5:0] left;      // samples still to emit from the loaded word, 0 = free
  logic       adv;
  logic [31:0] shifted;

  assign nbits = 6'd1 << ((code > 3'd5) ? 3'd5 : code);
  assign adv   = !out_v || out_ready;
  assign in_rd = !rst && adv && (left <= 6'd1) && !in_empty;

  always_comb begin
    shifted = out_word.data;
    for (int i = 0; i < 32; i++) begin
      if (i + int'(nbits) < 32) shifted[i] = out_word.data[i + int'(nbits)];
      else                      shifted[i] = out_word.data[i];
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      left <= '0; out_v <= 1'b0; out_word <= '0;
    end else if (adv) begin
      if (in_rd) begin
        out_word <= in_word;
        out_v    <= 1'b1;
        left     <= 6'd32 >> ((code > 3'd5) ? 3'd5 : code);
      end else if (left > 6'd1) begin
        out_word.data <= shifted;
        out_word.tot  <= 1'b0;     // TOT stays on the first sample only
        out_v         <= 1'b1;
        left          <= left - 1'b1;
      end else begin
        out_v <= 1'b0;
        left  <= '0;
      end
    end
  end
endmodule
