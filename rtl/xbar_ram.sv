// xbar_ram: the RAM at the end of the front end, written 36 bits wide on the
// FPDP clock and read 72 bits wide on the SDRAM clock (128 x 36 = 64 x 72).
// It is two 64 x 36 dual-port RAMs: even-numbered words go to the low half of
// the 72-bit read word, odd ones to the high half. Write and read pointers
// carry a wrap bit and cross domains in Gray code, so the write side sees
// 'full' and the read side sees how many complete 72-bit words are stored
// (avail72). The read port has one clock of latency: rd_data is valid the
// cycle after rd. Writing when full is refused (wr_full tells the feeder to
// wait). The split into two RAMs follows the wrapper drawing of the front end;
// the Gray-code pointer exchange is this design's own.
module xbar_ram
  import dom_pkg::*;
#(
  parameter int unsigned DEPTH72 = 64,
  localparam int unsigned RAW = $clog2(DEPTH72)
) (
  input  logic           wclk,
  input  logic           wrst,
  input  logic           wr,
  input  fe_word_t       wdata,
  output logic           wr_full,
  input  logic           rclk,
  input  logic           rrst,
  input  logic           rd,
  output logic [71:0]    rd_data,
  output logic [RAW:0]   avail72
);
  logic [35:0]  ram_lo [DEPTH72];
  logic [35:0]  ram_hi [DEPTH72];
  logic [RAW+1:0] wptr, wptr_r;   // 36-bit word count with wrap bit
  logic [RAW:0]   rptr, rptr_w;   // 72-bit word count with wrap bit
  logic [RAW+1:0] wdiff;

  // write side
  assign wdiff   = wptr - {rptr_w, 1'b0};
  assign wr_full = (wdiff == (RAW+2)'(2 * DEPTH72));

  always_ff @(posedge wclk) begin
    if (wr && !wr_full) begin
      if (wptr[0]) ram_hi[wptr[RAW:1]] <= wdata;
      else         ram_lo[wptr[RAW:1]] <= wdata;
    end
  end
  always_ff @(posedge wclk) begin
    if (wrst)                wptr <= '0;
    else if (wr && !wr_full) wptr <= wptr + 1'b1;
  end

  // read side
  assign avail72 = wptr_r[RAW+1:1] - rptr;
  always_ff @(posedge rclk) begin
    if (rrst) begin
      rptr <= '0;
    end else if (rd && avail72 != '0) begin
      rptr <= rptr + 1'b1;
    end
  end
  always_ff @(posedge rclk) begin
    rd_data <= {ram_hi[rptr[RAW-1:0]], ram_lo[rptr[RAW-1:0]]};
  end

  gray_sync #(.W(RAW+2)) u_w2r (
    .src_clk(wclk), .src_rst(wrst), .src_bin(wptr),
    .dst_clk(rclk), .dst_rst(rrst), .dst_bin(wptr_r)
  );
  gray_sync #(.W(RAW+1)) u_r2w (
    .src_clk(rclk), .src_rst(rrst), .src_bin(rptr),
    .dst_clk(wclk), .dst_rst(wrst), .dst_bin(rptr_w)
  );
endmodule
