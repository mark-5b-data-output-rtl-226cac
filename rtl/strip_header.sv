// strip_header: removes Mark 5B disk frame headers and checks them.
// The input stream (show-ahead FIFO port) is cut into frames of FRAME_LEN
// 32-bit words: 4 header words, then data. Header word 0 must be the SYNC word
// and header word 1 must carry, in bits 14:0, the disk frame count that an
// internal counter expects: 0 for the first header seen, then +1 per frame,
// rolling over at fps (the Disk Frames per Second register). Any mismatch sets
// header_err and stops the stream until the block is disabled. A word equal to
// either invalid code word (StreamStor or DIM) is marked invalid; inside a
// header such a word is taken as correct, and the internal counter keeps time.
// At each frame where the count is 0 the block pulses tot_int, increments the
// 16-bit tot_count, posts header words 2 and 3 (VLBA time code) and tags the
// next data word TOT. Data words go out as dom_pkg::fe_word_t, one per cycle,
// to the following FIFO (out_wr, out_full for back-pressure). Header layout
// beyond the words named above (count bit positions, SYNC value) follows the
// Mark 5B recording format; stopping on error is as described.
module strip_header
  import dom_pkg::*;
#(
  parameter int unsigned FRAME_LEN = dom_pkg::FRAME_WORDS
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        en,
  input  logic [15:0] fps,
  input  logic [31:0] inv_ss,
  input  logic [31:0] inv_dim,
  // input FIFO
  input  logic        in_empty,
  input  logic [31:0] in_data,
  output logic        in_rd,
  // output FIFO
  input  logic        out_full,
  output logic        out_wr,
  output fe_word_t    out_word,
  // status
  output logic        header_err,
  output logic        tot_int,
  output logic [15:0] tot_count,
  output logic [31:0] vlba_tc0,
  output logic [31:0] vlba_tc1
);
  localparam int unsigned IW = $clog2(FRAME_LEN);
  logic [IW-1:0] idx;
  logic [14:0]   exp_cnt;
  logic          tot_pend, in_second0;
  logic          inv;

  assign in_rd = en && !header_err && !in_empty && !out_full;
  assign inv   = (in_data == inv_ss) || (in_data == inv_dim);

  always_comb begin
    out_wr         = in_rd && (idx >= IW'(HDR_WORDS));
    out_word.pad   = '0;
    out_word.tot   = tot_pend;
    out_word.valid = !inv;
    out_word.data  = in_data;
  end

  always_ff @(posedge clk) begin
    if (rst || !en) begin
      idx <= '0; exp_cnt <= '0; tot_pend <= 1'b0; in_second0 <= 1'b0;
      header_err <= 1'b0; tot_int <= 1'b0;
      if (rst) begin
        tot_count <= '0; vlba_tc0 <= '0; vlba_tc1 <= '0;
      end
    end else begin
      tot_int <= 1'b0;
      if (in_rd) begin
        idx <= (idx == IW'(FRAME_LEN - 1)) ? '0 : idx + 1'b1;
        unique case (idx)
          IW'(0): if (!inv && in_data != SYNC_WORD) header_err <= 1'b1;
          IW'(1): begin
            if (!inv && in_data[14:0] != exp_cnt) header_err <= 1'b1;
            in_second0 <= (exp_cnt == '0);
            if (exp_cnt == '0) begin
              tot_int   <= 1'b1;
              tot_count <= tot_count + 1'b1;
              tot_pend  <= 1'b1;
            end
            exp_cnt <= (exp_cnt >= fps[14:0] - 1'b1) ? '0 : exp_cnt + 1'b1;
          end
          IW'(2): if (in_second0) vlba_tc0 <= in_data;
          IW'(3): if (in_second0) vlba_tc1 <= in_data;
          default: tot_pend <= 1'b0;
        endcase
      end
    end
  end
endmodule
