// tb_dom_top: end-to-end test of the Data Output Module with a disk-system
// FPDP source, the behavioural SDRAM DIMM and software register values.
// Size: a ring of 512 blocks (BLK_W = 9, 16384 words), a 200-cycle power-up
// wait, full-size 2504-word disk frames at 2 frames per "second", unpacking
// of 16 bit streams (two samples per recorded word) through a permuting
// crossbar, and a 10000-RCLK second. Clocks: FPDP 33 MHz, SDRAM 83 MHz,
// back end 32 MHz with RCLK = 16 MHz.
// Sequence: startup fill; VSI mode for three seconds with a new read pointer
// each second (every output word compared with a reference model of header
// removal, invalid-word marking, unpacking and crossbar, and the first word
// checked 93 RCLKs after the PPS); one second with the delay generator
// slipping; Station Unit mode with BOCF and CFHR headers; TVG mode; TVR mode;
// then the source sends a frame with a bad SYNC word and stops, and the ring
// drains to FINISHED. Each mechanism named by the design is counted and a
// mechanism that never happened counts as a failure.
module tb_dom_top;
  import dom_pkg::*;
  int checks = 0, failures = 0;
  task automatic chk(input bit c, input string m);
    checks++; if (!c) begin failures++; $display("FAIL: %s", m); end
  endtask
  localparam int BLK_W = 9, FLEN = 2504, FDATA = FLEN - 4, FPS = 2;
  localparam int SEC = 2 * FPS * FDATA;                  // samples per second
  localparam logic [31:0] INV_SS = 32'h1111_2222, INV_DIM = 32'h3333_4444;

  logic fclk = 0, sclk = 0, bclk = 0, swclk = 0;
  always #15 fclk = ~fclk;
  always #6  sclk = ~sclk;
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
  logic sdram_dq_oe;
  logic dps1pps = 0;
  logic [31:0] rbs;
  logic qvalid, rot1pps_bocf, rclk_out_board, r1pps, rotmon;
  logic [1:0] spare;
  dom_cfg_t cfg;
  dom_stat_t stat;
  logic [5:0] int_clr = 0;
  logic interrupt;
  logic cfhr_we = 0, cfhr_bank = 0;
  logic [7:0] cfhr_addr = 0;
  logic [15:0] cfhr_wdata = 0;
  logic pcal_v;
  fe_word_t pcal_data;

  dom_top #(.BLK_W(BLK_W), .INIT_WAIT(200), .REF_TICKS(70), .FRAME_LEN(FLEN)) dut (
    .external_reset, .fpdp_clk_in(fclk), .fpdp_dvalid_n, .fpdp_data, .fpdp_suspend_n,
    .fpdp_nrdy_n, .sdram_clk_in(sclk), .sdram_ras_n, .sdram_cas_n, .sdram_we_n,
    .sdram_rege, .sdram_s0_n, .sdram_s2_n, .sdram_cke, .sdram_dqmb, .sdram_ba, .sdram_a,
    .sdram_dq_out, .sdram_dq_oe, .sdram_dq_in, .bclk_src(bclk), .dps1pps, .rbs, .qvalid,
    .rot1pps_bocf, .rclk_out_board, .r1pps, .rotmon, .spare, .cfg, .stat, .int_clr,
    .interrupt, .sw_clk(swclk), .cfhr_we, .cfhr_bank, .cfhr_addr, .cfhr_wdata,
    .pcal_v, .pcal_data, .pc_int(1'b0));
  sdram_dimm_model dimm (.clk(sclk), .s0_n(sdram_s0_n), .ras_n(sdram_ras_n),
    .cas_n(sdram_cas_n), .we_n(sdram_we_n), .ba(sdram_ba), .a(sdram_a),
    .dq_out(sdram_dq_out), .dq_oe(sdram_dq_oe), .dq_in(sdram_dq_in));

  // ---------------- reference model of the recorded stream ----------------
  function automatic logic [31:0] rec(int i);        // recorded data word i
    logic [31:0] w;
    if (i % 1000 == 500) return INV_SS;
    if (i % 1000 == 700) return INV_DIM;
    w = 32'(i) * 32'h9E37_79B1 ^ 32'h0F0F_5A5A;
    if (w == INV_SS || w == INV_DIM) w = ~w;
    return w;
  endfunction
  function automatic int xsel(int b); return (b * 7 + 3) % 32; endfunction
  function automatic logic [31:0] smp(int k);        // output sample k
    logic [31:0] w, u, x;
    w = rec(k / 2);
    u = (k % 2 == 0) ? w : {w[31:16], w[31:16]};
    for (int b = 0; b < 32; b++) x[b] = u[xsel(b)];
    return x;
  endfunction
  function automatic bit smp_valid(int k);
    return !((k / 2) % 1000 == 500 || (k / 2) % 1000 == 700);
  endfunction

  // ---------------- FPDP source ----------------
  int fno = 0, widx = 0, nsent = 0;
  bit src_on = 0, bad_sync = 0;
  int susp_seen = 0;
  logic susp_q = 1;
  always @(posedge fclk) begin
    susp_q <= fpdp_suspend_n;
    if (!fpdp_suspend_n) susp_seen++;
    if (src_on && susp_q && fpdp_suspend_n) begin
      logic [31:0] w;
      int pos;
      pos = widx % FLEN;
      unique case (pos)
        0: w = (bad_sync && widx / FLEN == fno) ? 32'hDEAD_BEEF : SYNC_WORD;
        1: w = 32'((widx / FLEN) % FPS);
        2: w = 32'h2000_0000 + 32'(widx / FLEN);
        3: w = 32'h3000_0000 + 32'(widx / FLEN);
        default: w = rec((widx / FLEN) * FDATA + pos - 4);
      endcase
      fpdp_dvalid_n <= 1'b0; fpdp_data <= w; widx++;
    end else fpdp_dvalid_n <= 1'b1;
  end

  // ---------------- observation ----------------
  wire rclk_en = dut.u_be.rclk_en;
  wire unsup   = dut.u_be.unsup_pps;
  int n_rclk = 0, since = -1, exp_k = 0, vsi_words = 0, vsi_bad = 0, first_bad = 0;
  int first_ok = 0, r1pps_at = -1, n_jump = 0, n_slip = 0, n_bsw = 0, n_unpack2 = 0;
  int n_inv_out = 0, n_tot_out = 0, hdr_words = 0, su_data = 0, tvg_ok = 0, tvg_bad = 0;
  int n_cf = 0, n_tvr = 0, n_ovf = 0;
  bit vsi_check = 0;
  int unsigned next_addr = 0, cur_addr = 0;
  logic [31:0] tvg_e;
  always @(posedge bclk) if (!external_reset && rclk_en) begin
    n_rclk++;
    if (dut.u_be.vsi_jump) n_jump++;
    if (dut.u_be.del_slip) n_slip++;
    if (dut.u_be.bocf_rise) n_cf++;
    if (dut.u_be.tvr_int) n_tvr++;
    if (unsup) begin since = 0; cur_addr = next_addr; end else if (since >= 0) since++;
    if (cfg.mode == MODE_VSI && since >= 93 && vsi_check) begin
      if (since == 93) begin
        exp_k = cur_addr;
        if (qvalid || !smp_valid(exp_k)) first_ok++; else first_bad++;
      end
      if (rbs != smp(exp_k) || qvalid != smp_valid(exp_k)) begin
        vsi_bad++;
        if (vsi_bad < 6) $display("VSI word %0d: %h/%0b exp %h/%0b", exp_k, rbs, qvalid, smp(exp_k), smp_valid(exp_k));
      end
      if (!smp_valid(exp_k)) n_inv_out++;
      if (exp_k % SEC == 0) n_tot_out++;
      exp_k++; vsi_words++;
    end
    if (cfg.mode == MODE_VSI && r1pps && since > 0) r1pps_at = since;
    if (cfg.mode == MODE_SU && rot1pps_bocf && qvalid) begin
      if (rbs[31:16] == rbs[15:0] && rbs[15:8] == 8'h5A) hdr_words++;
    end
    if (cfg.mode == MODE_SU && !rot1pps_bocf && qvalid) su_data++;
    if (cfg.mode == MODE_TVG && qvalid) begin
      if (r1pps) tvg_e = TVG_SEED; else tvg_e = tvg_next(tvg_e);
      if (rbs == tvg_e) tvg_ok++; else tvg_bad++;
    end
  end
  always @(posedge sclk) begin
    if (dut.u_sx.u_rx.bank_switch) n_bsw++;
    if (stat.fpdp_overflow) n_ovf++;
  end
  always @(posedge fclk) if (dut.u_fe.pcal_v && pcal_data.data[15:0] == pcal_data.data[31:16]) n_unpack2++;

  int pend_seen [6];
  always @(posedge sclk) for (int i = 0; i < 6; i++) if (stat.int_pending[i]) pend_seen[i]++;
  int irq_seen = 0;
  always @(posedge sclk) if (interrupt) irq_seen++;

  initial begin
    repeat (5_000_000) @(posedge sclk); failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic rclks(int n); repeat (n) @(posedge bclk iff rclk_en); endtask
  task automatic wait_pps(); @(posedge bclk iff (rclk_en && unsup)); endtask

  initial begin
    cfg = '0;
    cfg.fe_en = 0; cfg.disk_fps = 16'(FPS); cfg.inv_ss = INV_SS; cfg.inv_dim = INV_DIM;
    cfg.unpack_code = 3'd4;
    for (int b = 0; b < 32; b++) cfg.xbar_sel[b] = 5'(xsel(b));
    cfg.sdram_en = 0; cfg.sdram_addr = 0; cfg.mode = MODE_VSI; cfg.rclk_rate_code = 0;
    cfg.pps_div = 32'(SEC - 1); cfg.bocf_len_code = 0; cfg.bocf_low = 2000; cfg.su_prescl = 1;
    cfg.int_mask = 6'b000000; cfg.tvr_bit = 5'd3; cfg.del_rate = 18'h3FFFF; cfg.del_mode = 1;
    cfg.spare = 2'b10;
    repeat (5) @(posedge sclk); external_reset = 0;
    // software writes the correlator frame headers into both banks
    for (int b = 0; b < 2; b++) for (int i = 0; i < 240; i++) begin
      @(posedge swclk); cfhr_we <= 1; cfhr_bank <= 1'(b); cfhr_addr <= 8'(i); cfhr_wdata <= 16'h5A00 | 16'(i);
    end
    @(posedge swclk); cfhr_we <= 0;
    cfg.fe_en = 1; cfg.sdram_en = 1; cfg.tim_en = 1; cfg.vsio_en = 1; cfg.vsio_run = 1;
    src_on = 1;
    wait (stat.startup_done);
    chk(dimm.n_lmr == 1 && dimm.mode_reg == 13'b0000000110011, "DIMM initialised, CL3 BL8");
    chk(dimm.n_write == 2 * ((1 << BLK_W) - (1 << (BLK_W - 5))), $sformatf("startup fill %0d bursts", dimm.n_write));
    chk(dimm.n_read == 0, "no read before the first pointer");
    // -------- VSI: three seconds with a new pointer each second --------
    vsi_check = 1; next_addr = 0; cfg.sdram_addr = 0;
    fork
      wait_pps();
      begin @(posedge bclk); dps1pps <= 1; rclks(4); dps1pps <= 0; end
    join
    rclks(5);
    next_addr = SEC + 37; cfg.sdram_addr = 26'(next_addr);
    wait_pps(); rclks(5);
    next_addr = 2 * SEC + 64 + 5; cfg.sdram_addr = 26'(next_addr);
    wait_pps(); rclks(5);
    next_addr = 3 * SEC; cfg.sdram_addr = 26'(next_addr);
    wait_pps(); rclks(2);
    vsi_check = 0;
    chk(vsi_bad == 0 && vsi_words > 3 * (SEC - 200), $sformatf("VSI data: %0d words, %0d bad", vsi_words, vsi_bad));
    chk(first_ok == 3 && first_bad == 0, "first word after each PPS at RCLK 93");
    chk(r1pps_at == 93, $sformatf("VSI PPS out with the first word (%0d)", r1pps_at));
    chk(n_jump >= 4, "discrete jumps");
    // -------- delay generator slip for one second --------
    cfg.del_err = 32'hFFFF_F000; next_addr = 4 * SEC; cfg.sdram_addr = 26'(next_addr);
    wait_pps(); rclks(SEC / 2);
    chk(n_slip >= 1, $sformatf("delay generator slips (%0d)", n_slip));
    cfg.del_err = 0;
    // -------- Station Unit mode --------
    cfg.vsio_en = 0; cfg.mode = MODE_SU; cfg.su_en = 1; cfg.suo_run = 1; cfg.bocf_en = 1;
    cfg.cfhr_en = 1; cfg.sdram_addr = 26'(5 * SEC);
    wait_pps();
    repeat (3) @(posedge bclk iff (rclk_en && dut.u_be.bocf_rise));
    rclks(600);
    chk(hdr_words >= 2 * 240, $sformatf("SU header words %0d", hdr_words));
    chk(su_data >= 2 * 2000, $sformatf("SU data words %0d", su_data));
    chk(stat.cf_count >= 3, "correlator frame count");
    cfg.su_en = 0; cfg.bocf_en = 0; cfg.suo_run = 0;
    // -------- TVG --------
    cfg.mode = MODE_TVG; cfg.tvg_en = 1;
    wait_pps(); rclks(3000);
    chk(tvg_ok > 2500 && tvg_bad == 0, $sformatf("TVG pattern %0d ok %0d bad", tvg_ok, tvg_bad));
    cfg.tvg_en = 0;
    // -------- TVR --------
    cfg.mode = MODE_TVR; cfg.tvr_en = 1; cfg.sdram_addr = 26'(7 * SEC);
    wait_pps(); rclks(SEC + SEC / 2);
    chk(n_tvr >= 1, $sformatf("TVR sums posted (%0d)", n_tvr));
    // -------- bad header, end of data, FINISHED --------
    bad_sync = 1; fno = widx / FLEN + 1;
    wait (stat.header_err);
    chk(1, "header error raised");
    wait (stat.finished);
    repeat (100) @(posedge sclk);
    // -------- mechanisms --------
    chk(susp_seen > 0, "FPDP suspend");
    chk(stat.tot_count >= 5 && n_tot_out >= 1, $sformatf("TOT: %0d seconds, %0d on output", stat.tot_count, n_tot_out));
    chk(stat.vlba_tc0[31:28] == 4'h2 && stat.vlba_tc1[31:28] == 4'h3, "VLBA time code posted");
    chk(n_inv_out > 0, "invalid words marked on output");
    chk(n_unpack2 > 0, "unpacked samples");
    chk(dimm.n_aref > 2, $sformatf("refresh (%0d)", dimm.n_aref));
    chk(dimm.n_read > 0 && dimm.n_write > 2 * ((1 << BLK_W) - (1 << (BLK_W - 5))), "main-loop reads and writes");
    chk(n_bsw >= 5, $sformatf("bank switches %0d", n_bsw));
    chk(n_cf >= 3, "BOCF");
    chk(dimm.proto_err == 0 && dimm.rd_unwritten == 0, "DIMM protocol");
    chk(n_ovf == 0, "no FPDP overflow");
    for (int i = 0; i < 6; i++) chk(pend_seen[i] > 0, $sformatf("interrupt source %0d", i));
    chk(irq_seen > 0 && interrupt, "interrupt pin");
    @(posedge sclk); int_clr <= '1; @(posedge sclk); int_clr <= '0; repeat (3) @(posedge sclk);
    chk(stat.int_pending == 0 || stat.int_pending == 6'(1 << INT_ROT1PPS) || stat.int_pending == 6'(1 << INT_DOM1PPS), "interrupts clear");
    chk(spare == 2'b10 && rclk_out_board !== 1'bx && rotmon !== 1'bx, "pins");
    $display("mechanisms: suspend=%0d tot=%0d inv=%0d unpack=%0d aref=%0d rd=%0d wr=%0d bsw=%0d jump=%0d slip=%0d cf=%0d hdr=%0d tvg=%0d tvr=%0d",
      susp_seen, stat.tot_count, n_inv_out, n_unpack2, dimm.n_aref, dimm.n_read, dimm.n_write, n_bsw, n_jump, n_slip, n_cf, hdr_words, tvg_ok, n_tvr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
