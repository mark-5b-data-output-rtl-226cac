// dom_front_end: the playback front end, entirely on the 33 MHz FPDP clock.
// A chain of stages and FIFOs: FPDP receive port with its 127-word FIFO,
// Strip-header (header removal and checking), a 31-word FIFO of tagged 36-bit
// words, Unpack, the 32x32 Xbar, and the Xbar RAM whose 72-bit read port is on
// the SDRAM clock. Each stage keeps the FIFO before it drained and the one
// after it filled, and stalls rather than overflow. The words written into the
// Xbar RAM are also brought out (pcal_v/pcal_data) for a phase-calibration
// unit. en is the software enable of the FPDP interface and Strip-header.
module dom_front_end
  import dom_pkg::*;
#(
  parameter int unsigned FRAME_LEN = dom_pkg::FRAME_WORDS,
  parameter int unsigned XRAM_DEPTH72 = 64
) (
  input  logic        fclk,
  input  logic        frst,
  input  logic        en,
  input  logic [15:0] fps,
  input  logic [31:0] inv_ss,
  input  logic [31:0] inv_dim,
  input  logic [2:0]  unpack_code,
  input  logic [4:0]  xbar_sel [32],
  // FPDP
  input  logic        fpdp_dvalid_n,
  input  logic [31:0] fpdp_data,
  output logic        fpdp_suspend_n,
  output logic        fpdp_nrdy_n,
  // status
  output logic        header_err,
  output logic        tot_int,
  output logic [15:0] tot_count,
  output logic [31:0] vlba_tc0,
  output logic [31:0] vlba_tc1,
  output logic        fpdp_overflow,
  // phase-cal tap
  output logic        pcal_v,
  output fe_word_t    pcal_data,
  // Xbar RAM read port (SDRAM clock)
  input  logic        sclk,
  input  logic        srst,
  input  logic        xr_rd,
  output logic [71:0] xr_data,
  output logic [$clog2(XRAM_DEPTH72):0] xr_avail72
);
  logic        f1_rd, f1_empty;
  logic [31:0] f1_dout;
  logic        sh_wr, f2_full, f2_empty, f2_rd;
  fe_word_t    sh_word, f2_dout;
  logic        up_v, xr_full;
  fe_word_t    up_word, xb_word;
  logic [4:0]  f2_cnt;

  fpdp_if u_fpdp (
    .clk(fclk), .rst(frst), .en, .fpdp_dvalid_n, .fpdp_data, .fpdp_suspend_n,
    .fpdp_nrdy_n, .rd(f1_rd), .dout(f1_dout), .empty(f1_empty),
    .overflow(fpdp_overflow)
  );

  strip_header #(.FRAME_LEN(FRAME_LEN)) u_strip (
    .clk(fclk), .rst(frst), .en, .fps, .inv_ss, .inv_dim,
    .in_empty(f1_empty), .in_data(f1_dout), .in_rd(f1_rd),
    .out_full(f2_full), .out_wr(sh_wr), .out_word(sh_word),
    .header_err, .tot_int, .tot_count, .vlba_tc0, .vlba_tc1
  );

  sync_fifo #(.W(36), .DEPTH(31)) u_shfifo (
    .clk(fclk), .rst(frst || !en), .wr(sh_wr), .din(sh_word), .rd(f2_rd),
    .dout(f2_dout), .empty(f2_empty), .full(f2_full), .count(f2_cnt)
  );

  unpack u_unpack (
    .clk(fclk), .rst(frst || !en), .code(unpack_code), .in_empty(f2_empty),
    .in_word(f2_dout), .in_rd(f2_rd), .out_v(up_v), .out_word(up_word),
    .out_ready(!xr_full)
  );

  logic [31:0] xb_data;
  xbar #(.N(32)) u_xbar (.din(up_word.data), .sel(xbar_sel), .dout(xb_data));
  always_comb begin
    xb_word      = up_word;
    xb_word.data = xb_data;
  end

  xbar_ram #(.DEPTH72(XRAM_DEPTH72)) u_xram (
    .wclk(fclk), .wrst(frst), .wr(up_v), .wdata(xb_word), .wr_full(xr_full),
    .rclk(sclk), .rrst(srst), .rd(xr_rd), .rd_data(xr_data), .avail72(xr_avail72)
  );

  assign pcal_v    = up_v && !xr_full;
  assign pcal_data = xb_word;
endmodule
