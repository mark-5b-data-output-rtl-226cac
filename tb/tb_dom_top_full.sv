// tb_dom_top_full: one complete playback operation of the top level at its
// default size: a ring of 2^21 one-kilobit blocks (the whole 256 MB DIMM),
// the 8000-cycle power-up wait, 7 us refresh and 2504-word disk frames.
// The dense DIMM model holds all 2^25 72-bit words. To keep the run short
// the recording uses a single bit stream (unpack code 0, 32 samples per
// recorded word), so the FPDP source needs few words, and the FPDP clock runs
// at 100 MHz so that the SDRAM writes, not the link, set the startup time
// (about 0.7 s of simulated time, 58 million SDRAM clocks, for the 2 million
// block writes).
// Sequence: initialisation, the startup fill of 31/32 of the ring, then a
// DPS1PPS with a read pointer 1029 words into the ring. Checked: the fill
// ends after exactly 2^21 - 2^16 block writes with no DIMM protocol error,
// refreshes every 560 cycles during the fill (within 0.05%), and the first 4000 VSI output
// words, starting 93 RCLKs after the PPS, equal the reference samples.
module tb_dom_top_full;
  import dom_pkg::*;
  int checks = 0, failures = 0;
  task automatic chk(input bit c, input string m);
    checks++; if (!c) begin failures++; $display("FAIL: %s", m); end
  endtask
  localparam int FLEN = 2504, FDATA = 2500, FPS = 2;
  localparam int SEC = FPS * FDATA * 32;
  localparam logic [31:0] INV_SS = 32'h1111_2222, INV_DIM = 32'h3333_4444;
  localparam int START = 1029;
  logic fclk = 0, sclk = 0, bclk = 0, swclk = 0;
  always #5 fclk = ~fclk;
  always #6 sclk = ~sclk;
  always #15.5 bclk = ~bclk;
  always #20 swclk = ~swclk;
  logic external_reset = 1;
  logic fpdp_dvalid_n = 1, fpdp_suspend_n, fpdp_nrdy_n;
  logic [31:0] fpdp_data = 0;
  logic sdram_ras_n, sdram_cas_n, sdram_we_n, sdram_rege, sdram_s0_n, sdram_s2_n, sdram_cke;
  logic [7:0] sdram_dqmb;
  logic [1:0] sdram_ba;
  logic [12:0] sdram_a;
  logic [71:0] sdram_dq_out, sdram_dq_in;
  logic sdram_dq_oe, dps1pps = 0;
  logic [31:0] rbs;
  logic qvalid, rot1pps_bocf, rclk_out_board, r1pps, rotmon, interrupt, pcal_v;
  logic [1:0] spare;
  dom_cfg_t cfg;
  dom_stat_t stat;
  fe_word_t pcal_data;
  dom_top dut (
    .external_reset, .fpdp_clk_in(fclk), .fpdp_dvalid_n, .fpdp_data, .fpdp_suspend_n,
    .fpdp_nrdy_n, .sdram_clk_in(sclk), .sdram_ras_n, .sdram_cas_n, .sdram_we_n,
    .sdram_rege, .sdram_s0_n, .sdram_s2_n, .sdram_cke, .sdram_dqmb, .sdram_ba, .sdram_a,
    .sdram_dq_out, .sdram_dq_oe, .sdram_dq_in, .bclk_src(bclk), .dps1pps, .rbs, .qvalid,
    .rot1pps_bocf, .rclk_out_board, .r1pps, .rotmon, .spare, .cfg, .stat, .int_clr(6'd0),
    .interrupt, .sw_clk(swclk), .cfhr_we(1'b0), .cfhr_bank(1'b0), .cfhr_addr(8'd0),
    .cfhr_wdata(16'd0), .pcal_v, .pcal_data, .pc_int(1'b0));
  sdram_dimm_model #(.DENSE(1'b1)) dimm (.clk(sclk), .s0_n(sdram_s0_n), .ras_n(sdram_ras_n),
    .cas_n(sdram_cas_n), .we_n(sdram_we_n), .ba(sdram_ba), .a(sdram_a),
    .dq_out(sdram_dq_out), .dq_oe(sdram_dq_oe), .dq_in(sdram_dq_in));

  function automatic logic [31:0] rec(int i);
    logic [31:0] w;
    if (i % 1000 == 500) return INV_SS;
    w = 32'(i) * 32'h9E37_79B1 ^ 32'h0F0F_5A5A;
    if (w == INV_SS || w == INV_DIM) w = ~w;
    return w;
  endfunction
  function automatic int xsel(int b); return (b * 7 + 3) % 32; endfunction
  function automatic logic [31:0] smp(int k);
    logic [31:0] u, x;
    u = 32'($signed(rec(k / 32)) >>> (k % 32));   // top bit refills the register
    for (int b = 0; b < 32; b++) x[b] = u[xsel(b)];
    return x;
  endfunction
  function automatic bit smp_valid(int k); return (k / 32) % 1000 != 500; endfunction

  int widx = 0;
  logic susp_q = 1;
  always @(posedge fclk) begin
    susp_q <= fpdp_suspend_n;
    if (cfg.fe_en && susp_q && fpdp_suspend_n) begin
      int pos;
      pos = widx % FLEN;
      unique case (pos)
        0: fpdp_data <= SYNC_WORD;
        1: fpdp_data <= 32'((widx / FLEN) % FPS);
        2: fpdp_data <= 32'h2000_0000 + 32'(widx / FLEN);
        3: fpdp_data <= 32'h3000_0000 + 32'(widx / FLEN);
        default: fpdp_data <= rec((widx / FLEN) * FDATA + pos - 4);
      endcase
      fpdp_dvalid_n <= 1'b0; widx++;
    end else fpdp_dvalid_n <= 1'b1;
  end

  wire rclk_en = dut.u_be.rclk_en;
  int since = -1, k = 0, words = 0, bad = 0;
  bit first_ok = 0;
  always @(posedge bclk) if (!external_reset && rclk_en) begin
    if (dut.u_be.unsup_pps) since = 0; else if (since >= 0) since++;
    if (since >= 93 && words < 4000) begin
      if (since == 93) begin k = START; first_ok = qvalid && rbs == smp(START); end
      if (rbs != smp(k) || qvalid != smp_valid(k)) begin
        bad++; if (bad < 5) $display("word %0d: %h exp %h", k, rbs, smp(k));
      end
      k++; words++;
    end
  end
  int aref_fill = 0;
  longint fill_cycles = 0;
  always @(posedge sclk) if (!stat.startup_done && dut.u_sx.u_arb.state != 0) fill_cycles++;

  initial begin
    repeat (200_000_000) @(posedge sclk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    cfg = '0;
    cfg.disk_fps = 16'(FPS); cfg.inv_ss = INV_SS; cfg.inv_dim = INV_DIM; cfg.unpack_code = 3'd0;
    for (int b = 0; b < 32; b++) cfg.xbar_sel[b] = 5'(xsel(b));
    cfg.mode = MODE_VSI; cfg.pps_div = 32'(SEC - 1); cfg.sdram_addr = 26'(START);
    repeat (5) @(posedge sclk); external_reset = 0;
    cfg.fe_en = 1; cfg.sdram_en = 1; cfg.tim_en = 1; cfg.vsio_en = 1; cfg.vsio_run = 1;
    wait (stat.startup_done);
    aref_fill = dimm.n_aref;
    chk(dimm.n_lmr == 1 && dimm.mode_reg == 13'b0000000110011, "DIMM initialised");
    chk(dimm.n_write == 2 * ((1 << 21) - (1 << 16)), $sformatf("startup fill: %0d bursts", dimm.n_write));
    chk(aref_fill >= int'(fill_cycles / 560) - 50 && aref_fill <= int'(fill_cycles / 560) + 2,
        $sformatf("refresh during fill: %0d in %0d cycles", aref_fill, fill_cycles));
    @(posedge bclk); dps1pps <= 1; repeat (8) @(posedge bclk); dps1pps <= 0;
    wait (words >= 4000);
    chk(first_ok, "first word 93 RCLKs after the PPS");
    chk(bad == 0, $sformatf("VSI output words (%0d bad)", bad));
    chk(dimm.proto_err == 0, "DIMM protocol");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
