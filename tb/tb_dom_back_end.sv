// tb_dom_back_end: the back end with a model of the SDRAM side behind the
// CFDR write port: after each restart it writes the words base, base+1, ...
// from CFDR address 0, never more than 120 ahead of the read address it gets
// back. Back-end clock 32 MHz with RCLK = 8 MHz, SDRAM-side clock 80 MHz, a
// 3000-RCLK second. Checks: VSI mode gives the first word of each second 93
// RCLKs after the PPS with the VSI PPS pin, then one new word per RCLK; the
// PPS and DOM1PPS interrupt pulses; Station Unit mode gives BOCF on the pin,
// CFHR header words on both halves during BOCF, data after it, and one CF
// interrupt per frame; TVG mode puts out the pattern; TVR mode posts sums;
// a finished SDRAM side stops the VSI output.
module tb_dom_back_end;
  import dom_pkg::*;
  int checks = 0, failures = 0;
  task automatic chk(input bit c, input string m);
    checks++; if (!c) begin failures++; $display("FAIL: %s", m); end
  endtask
  logic clk = 0, wclk = 0, sw_clk = 0;
  always #15.5 clk = ~clk;
  always #6 wclk = ~wclk;
  always #20 sw_clk = ~sw_clk;
  logic rst = 1, wrst = 1, dps1pps = 0, sdram_finished = 0;
  dom_cfg_t cfg;
  logic cfdr_we = 0;
  logic [6:0] cfdr_waddr = 0, cfdr_raddr_w;
  be_word_t cfdr_wdata;
  logic cfhr_we = 0, cfhr_bank = 0;
  logic [7:0] cfhr_addr = 0;
  logic [15:0] cfhr_wdata = 0;
  logic [31:0] rbs, tvr_sum, tvr_bias;
  logic qvalid, rot1pps_bocf, r1pps, rclk_out, rotmon, restart_pulse;
  logic rot1pps_int, dom1pps_int, cf_int, tvr_int, vsi_jump, del_slip, su_fin, vsi_fin;
  logic [15:0] cf_count;
  dom_back_end dut (.*);
  // SDRAM-side model
  logic rtog = 0;
  logic [2:0] rs = 0;
  int unsigned base = 0, n = 0;
  always @(posedge clk) if (restart_pulse) rtog <= !rtog;
  always @(posedge wclk) begin
    rs <= {rs[1:0], rtog};
    cfdr_we <= 1'b0;
    if (rs[2] != rs[1]) begin base += 100000; n = 0; cfdr_waddr <= 0; end
    else if (7'(cfdr_waddr - cfdr_raddr_w) < 7'd120 && !cfdr_we) begin
      cfdr_we <= 1'b1; cfdr_wdata <= '{tot: n == 0, valid: 1'b1, data: base + n};
      n++;
    end
    if (cfdr_we) cfdr_waddr <= cfdr_waddr + 1'b1;
  end
  wire rclk_en = dut.rclk_en;
  int since = -1, words = 0, bad = 0, firsts = 0, pin_at = -1, n_rot = 0, n_dom = 0, n_cf = 0, n_tvr = 0;
  int hdr = 0, sud = 0, tvg_ok = 0, tvg_bad = 0;
  int unsigned expv;
  logic [31:0] te;
  always @(posedge clk) if (!rst) begin
    if (rot1pps_int) n_rot++;
    if (dom1pps_int) n_dom++;
    if (cf_int) n_cf++;
    if (tvr_int) n_tvr++;
  end
  always @(posedge clk) if (!rst && rclk_en) begin
    if (dut.unsup_pps) since = 0; else if (since >= 0) since++;
    if (cfg.mode == MODE_VSI && since >= 93 && !sdram_finished) begin
      if (since == 93) begin
        expv = base; if (qvalid && rbs == base) firsts++;
      end
      if (!(qvalid && rbs == expv)) bad++;
      expv++; words++;
    end
    if (cfg.mode == MODE_VSI && rot1pps_bocf && r1pps) pin_at = since;
    if (cfg.mode == MODE_SU && qvalid) begin
      if (rot1pps_bocf && rbs[31:16] == rbs[15:0] && rbs[15:8] == 8'hC3) hdr++;
      if (!rot1pps_bocf) sud++;
    end
    if (cfg.mode == MODE_TVG && qvalid) begin
      te = r1pps ? TVG_SEED : tvg_next(te);
      if (rbs == te) tvg_ok++; else tvg_bad++;
    end
  end
  initial begin
    repeat (3_000_000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  task automatic rclks(int k); repeat (k) @(posedge clk iff rclk_en); endtask
  initial begin
    cfg = '0;
    cfg.mode = MODE_VSI; cfg.tim_en = 1; cfg.rclk_rate_code = 1; cfg.pps_div = 2999;
    cfg.vsio_en = 1; cfg.vsio_run = 1; cfg.bocf_low = 500; cfg.su_prescl = 1; cfg.tvr_bit = 0;
    for (int b = 0; b < 2; b++) for (int i = 0; i < 240; i++) begin
      @(posedge sw_clk); cfhr_we <= 1; cfhr_bank <= 1'(b); cfhr_addr <= 8'(i); cfhr_wdata <= 16'hC300 | 16'(i);
    end
    @(posedge sw_clk); cfhr_we <= 0;
    repeat (3) @(posedge wclk); wrst = 0; rst = 0;
    rclks(100);
    chk(!qvalid && n_rot == 0, "no output before DPS1PPS");
    dps1pps <= 1; rclks(3); dps1pps <= 0;
    rclks(3 * 3000 + 200);
    chk(firsts == 4 && bad == 0 && words > 3 * 2800, $sformatf("VSI: %0d firsts, %0d words, %0d bad", firsts, words, bad));
    chk(pin_at == 93, $sformatf("VSI PPS pin with the first word (%0d)", pin_at));
    chk(n_rot >= 4 && n_dom == 1, $sformatf("PPS interrupts %0d, DOM1PPS %0d", n_rot, n_dom));
    // Station Unit
    cfg.vsio_en = 0; cfg.mode = MODE_SU; cfg.su_en = 1; cfg.suo_run = 1; cfg.bocf_en = 1; cfg.cfhr_en = 1;
    rclks(3000 + 3 * 741);
    chk(hdr >= 2 * 240 && sud >= 2 * 500, $sformatf("SU: %0d header, %0d data words", hdr, sud));
    chk(n_cf >= 2 && cf_count == 16'(n_cf), "CF interrupts and count");
    cfg.su_en = 0; cfg.bocf_en = 0;
    // TVG
    cfg.mode = MODE_TVG; cfg.tvg_en = 1;
    rclks(3500);
    chk(tvg_ok > 2000 && tvg_bad == 0, $sformatf("TVG %0d ok %0d bad", tvg_ok, tvg_bad));
    cfg.tvg_en = 0;
    // TVR: the model data has TOT at each restart
    cfg.mode = MODE_TVR; cfg.tvr_en = 1;
    rclks(7000);
    chk(n_tvr >= 2, $sformatf("TVR sums %0d", n_tvr));
    // finished
    cfg.tvr_en = 0; cfg.mode = MODE_VSI; cfg.vsio_en = 1;
    rclks(3100);
    sdram_finished = 1; rclks(10);
    chk(vsi_fin && !qvalid, "finished stops VSI output");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
