// sdram_receiver: links SDRAM reads to the back end's CFDR on the 80 MHz clock.
// Read bursts (rd_dv marks the 16 data cycles of a block read) are registered
// and written into the current bank of an 'offsetable twin RAM': two banks of
// TWIN_DEPTH72 x 72 bits, each read back 34 bits at a time, low half of a
// 72-bit word first. On bank_switch (a new read pointer has been taken by the
// arbiter, always between SDRAM operations) the other bank becomes current,
// its write address restarts at 0 and its read address starts at the word
// offset of the pointer within its block, so the words of the first burst
// before the pointed-to word are skipped. Words move from the twin RAM into
// the CFDR whenever they have arrived and the CFDR has more than CFDR_SLACK
// free places, judged from the CFDR read address (which comes from the RCLK
// domain and may be a few clocks old). restart (an unsuppressed PPS or BOCF)
// clears the CFDR write address and halts the flow until the next bank
// switch. rx_room tells the arbiter a further 1 kb read fits. When the
// arbiter reports FINISHED and the twin RAM is drained, finished is raised.
// Banking, offset skipping and the 8-place slack follow the design; the twin
// RAM depth is this design's choice.
module sdram_receiver
  import dom_pkg::*;
#(
  parameter int unsigned TWIN_DEPTH72 = 32,
  parameter int unsigned CFDR_DEPTH   = 128,
  parameter int unsigned CFDR_SLACK   = 8,
  localparam int unsigned TAW         = $clog2(TWIN_DEPTH72),
  localparam int unsigned CAW         = $clog2(CFDR_DEPTH)
) (
  input  logic           clk,
  input  logic           rst,
  // from the SDRAM core / DIMM
  input  logic           rd_dv,
  input  logic [71:0]    dq_in,
  // from the arbiter
  input  logic           bank_switch,
  input  logic [4:0]     rd_offset,
  input  logic           arb_finished,
  output logic           rx_room,
  // restart event (already in this clock domain)
  input  logic           restart,
  // CFDR write port
  output logic           cfdr_we,
  output logic [CAW-1:0] cfdr_waddr,
  output be_word_t       cfdr_wdata,
  input  logic [CAW-1:0] cfdr_raddr,
  output logic           finished
);
  logic [71:0] bank0 [TWIN_DEPTH72];
  logic [71:0] bank1 [TWIN_DEPTH72];
  logic        cur;                 // current bank
  logic        dv_q;
  logic [71:0] dq_q;
  logic [TAW:0]   twr;              // 72-bit words written (with wrap)
  logic [TAW+1:0] trd;              // 34-bit words read (with wrap)
  logic [TAW+1:0] diff;             // written minus read, modulo the ring
  logic [TAW+1:0] fill;             // 34-bit words waiting (0 while the read
                                    // address is still ahead, after an offset)
  logic        halted;
  logic [CAW-1:0] cfdr_fill;
  logic [71:0] rword;
  fe_word_t    half;

  assign diff      = {twr, 1'b0} - trd;
  assign fill      = (diff <= (TAW+2)'(2 * TWIN_DEPTH72)) ? diff : '0;
  assign rx_room   = (diff <= (TAW+2)'(2 * TWIN_DEPTH72 - 32)) || (diff > (TAW+2)'(2 * TWIN_DEPTH72));
  assign cfdr_fill = cfdr_waddr - cfdr_raddr;
  assign rword     = cur ? bank1[trd[TAW:1]] : bank0[trd[TAW:1]];
  assign half      = trd[0] ? rword[71:36] : rword[35:0];
  assign cfdr_we   = !halted && fill != '0 && cfdr_fill < CAW'(CFDR_DEPTH - CFDR_SLACK);
  assign cfdr_wdata = '{tot: half.tot, valid: half.valid, data: half.data};

  always_ff @(posedge clk) begin
    dq_q <= dq_in;
    if (dv_q) begin
      if (cur) bank1[twr[TAW-1:0]] <= dq_q;
      else     bank0[twr[TAW-1:0]] <= dq_q;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      cur <= 1'b0; dv_q <= 1'b0; twr <= '0; trd <= '0; halted <= 1'b1;
      cfdr_waddr <= '0; finished <= 1'b0;
    end else begin
      dv_q <= rd_dv;
      if (dv_q) twr <= twr + 1'b1;
      if (cfdr_we) begin
        trd        <= trd + 1'b1;
        cfdr_waddr <= cfdr_waddr + 1'b1;
      end
      if (bank_switch) begin
        cur    <= !cur;
        twr    <= '0;
        trd    <= (TAW+2)'(rd_offset);
        halted <= 1'b0;
      end
      if (restart) begin
        halted     <= 1'b1;
        cfdr_waddr <= '0;
      end
      finished <= arb_finished && fill == '0 && !dv_q;
    end
  end

  // a bank switch never lands inside a burst
  assert property (@(posedge clk) disable iff (rst) bank_switch |-> !rd_dv && !dv_q);
endmodule
