// tb_su_output: a BOCF model (240 RCLKs high, 100 low), a CFHR model with one
// clock read latency and a CFDR model returning consecutive words one RCLK
// after each fetch. Checks, for prescale 1, 2 and 4: the output starts at the
// first BOCF after an unsuppressed PPS; each RCLK r of a frame shows, two
// RCLKs later, header word r/prescl on both halves while BOCF is high and
// consecutive data words each held prescl RCLKs while BOCF is low; no data
// word is lost between frames; clearing run stops at the next BOCF; finished
// stops the output and raises fin.
module tb_su_output;
  import dom_pkg::*;
  int checks = 0, failures = 0;
  task automatic chk(input bit c, input string m);
    checks++; if (!c) begin failures++; $display("FAIL: %s", m); end
  endtask
  logic clk = 0; always #5 clk = ~clk;
  logic rst = 1, rclk_en = 0, en = 0, run = 0, unsup_pps = 0, bocf = 0, bocf_rise = 0, finished = 0;
  logic [3:0] prescl = 1;
  logic [7:0] cfhr_raddr;
  logic [15:0] cfhr_rdata;
  logic del_rd, qvalid, active, fin;
  be_word_t cfdr_rdata;
  logic [31:0] rbs;
  su_output dut (.*);
  // models
  int rc = 0;
  always @(posedge clk) rclk_en <= !rclk_en;
  always @(posedge clk) cfhr_rdata <= 16'h4000 + 16'(cfhr_raddr);
  int unsigned seq = 0;
  always @(posedge clk) if (rclk_en && del_rd) begin
    cfdr_rdata <= '{tot: 1'b0, valid: 1'b1, data: seq}; seq++;
  end
  logic bocf_gen_on = 0;
  int bc = 0;
  always @(posedge clk) if (rclk_en) begin
    bocf_rise <= 1'b0;
    if (!bocf_gen_on) begin bocf <= 1'b0; bc <= 0; end
    else begin
      bc <= (bc == 339) ? 0 : bc + 1;
      bocf <= (bc < 240);
      bocf_rise <= (bc == 0);
    end
  end
  // checker on the output, two RCLKs behind
  logic [1:0] bh, rh;
  int r = -1, nframes = 0, bad_hdr = 0, bad_dat = 0, ndata = 0;
  int unsigned dbase = 0;
  bit dstarted = 0;
  always @(posedge clk) if (rclk_en) begin
    bh <= {bh[0], bocf}; rh <= {rh[0], bocf_rise && (dut.go)};
    if (rh[1]) begin r = 0; nframes++; end else if (r >= 0) r++;
    if (r >= 0) begin
      if (bh[1] && r >= 0 && r < 240) begin
        if (!(qvalid && rbs == {2{16'h4000 + 16'(r / prescl)}})) bad_hdr++;
      end else if (r >= 240 && r < 340 && qvalid) begin
        if (!dstarted) begin dstarted = 1; dbase = rbs; end
        if (rbs != dbase + (ndata / prescl)) begin
          bad_dat++; if (bad_dat < 5) $display("data %0d exp %0d at r=%0d", rbs, dbase + ndata / prescl, r);
        end
        ndata++;
      end
    end
  end
  initial begin
    #20000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  task automatic pps();
    @(posedge clk iff rclk_en); unsup_pps <= 1; @(posedge clk iff rclk_en); unsup_pps <= 0;
  endtask
  initial begin
    repeat (4) @(posedge clk); rst <= 0;
    for (int p = 1; p <= 4; p *= 2) begin
      prescl <= 4'(p); en <= 1; run <= 1; seq = 0; dstarted = 0; ndata = 0; nframes = 0; r = -1;
      bad_hdr = 0; bad_dat = 0;
      bocf_gen_on <= 1;
      repeat (500) @(posedge clk iff rclk_en);
      chk(!active && qvalid == 0, "no output before PPS");
      pps();
      @(posedge clk iff (rclk_en && bocf_rise)); @(posedge clk iff rclk_en);
      chk(active, "running after first BOCF");
      repeat (3 * 340 - 5) @(posedge clk iff rclk_en);
      chk(nframes >= 3, $sformatf("p=%0d frames %0d", p, nframes));
      chk(bad_hdr == 0, $sformatf("p=%0d header words (%0d bad)", p, bad_hdr));
      chk(bad_dat == 0 && ndata >= 2 * 100, $sformatf("p=%0d data words (%0d bad, %0d seen)", p, bad_dat, ndata));
      chk(dbase == 0, "first data word is the first fetched");
      // run cleared: stop at next BOCF
      run <= 0;
      @(posedge clk iff (rclk_en && bocf_rise)); @(posedge clk iff rclk_en);
      chk(!active, "stops at BOCF after run cleared");
      repeat (4) @(posedge clk iff rclk_en);
      chk(!qvalid, "output idle");
      en <= 0; bocf_gen_on <= 0; repeat (4) @(posedge clk iff rclk_en);
    end
    // finished
    prescl <= 1; en <= 1; run <= 1; bocf_gen_on <= 1; seq = 0; dstarted = 0; ndata = 0; r = -1;
    pps();
    @(posedge clk iff (rclk_en && bocf_rise)); repeat (300) @(posedge clk iff rclk_en);
    finished <= 1; repeat (2) @(posedge clk iff rclk_en);
    chk(fin && !active && !del_rd, "finished state");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
