// tb_timing_subsys: RCLK enable every 2^(code+1) clocks; PPS started by the
// first DPS1PPS edge and then exactly pps_div+1 RCLKs apart regardless of
// later DPS1PPS edges; unsup_pps absent while suppress_pps is set; vsi_pps
// PPS_PIPE RCLKs after the PPS; dom1pps per input edge; internal start.
module tb_timing_subsys;
  int checks = 0, failures = 0;
  task automatic chk(input bit c, input string m);
    checks++; if (!c) begin failures++; $display("FAIL: %s", m); end
  endtask
  logic clk = 0; always #5 clk = ~clk;
  logic rst = 1, en = 0, use_int = 0, sup = 0, dps = 0;
  logic [2:0] code = 1;
  logic [31:0] pps_div = 199;
  logic rclk_en, rclk_out, pps, unsup_pps, vsi_pps, dom1pps;
  int cyc = 0, last_en = -1, en_gap_bad = 0, npps = 0, nunsup = 0, nvsi = 0, ndom = 0;
  int rcount = 0, last_pps_r = -1, pps_gap_bad = 0, last_vsi_gap = -1, pps_r_last = -1;
  timing_subsys #(.PPS_PIPE(93)) dut (.clk, .rst, .en, .rclk_rate_code(code),
    .use_internal_pps(use_int), .pps_div, .suppress_pps(sup), .dps1pps(dps),
    .rclk_en, .rclk_out, .pps, .unsup_pps, .vsi_pps, .dom1pps);
  always @(posedge clk) if (!rst) begin
    cyc++;
    if (dom1pps) ndom++;
    if (rclk_en) begin
      if (last_en >= 0 && cyc - last_en != 4) en_gap_bad++;
      last_en = cyc;
      rcount++;
      if (pps) begin
        npps++;
        if (last_pps_r >= 0 && rcount - last_pps_r != 200) pps_gap_bad++;
        last_pps_r = rcount;
      end
      if (unsup_pps) nunsup++;
      if (vsi_pps) begin nvsi++; last_vsi_gap = rcount - last_pps_r; end
    end
  end
  initial begin
    #5000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    repeat (3) @(posedge clk); rst <= 0; en <= 1;
    repeat (500) @(posedge clk);
    chk(npps == 0, "no PPS before DPS1PPS");
    dps <= 1; repeat (20) @(posedge clk); dps <= 0;
    repeat (4000) @(posedge clk);    // 1000 RCLKs: 5 seconds
    dps <= 1; repeat (20) @(posedge clk); dps <= 0;   // a late edge must not resync
    sup <= 1;
    repeat (1700) @(posedge clk);
    chk(en_gap_bad == 0, "RCLK every 4 clocks");
    chk(npps >= 7 && pps_gap_bad == 0, $sformatf("PPS every 200 RCLKs (%0d PPS, %0d bad)", npps, pps_gap_bad));
    chk(nunsup == 6 || nunsup == 5, $sformatf("suppressed PPS not passed (%0d)", nunsup));
    chk(nvsi >= 6, "VSI PPS copies");
    chk(ndom == 2, "DOM1PPS per input edge");
    chk(rclk_out == 1'b0 || rclk_out == 1'b1, "rclk_out");
    // internal start
    en <= 0; @(posedge clk); use_int <= 1; en <= 1; npps = 0;
    repeat (12) @(posedge clk);
    chk(npps == 1, "internal PPS starts on enable");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  // VSI copy delay, measured separately
  int d_pps = -1;
  always @(posedge clk) if (!rst && rclk_en) begin
    if (pps) d_pps = 0; else if (d_pps >= 0) d_pps++;
    if (vsi_pps && d_pps >= 0) begin chk(d_pps == 93, $sformatf("vsi_pps %0d RCLKs after PPS", d_pps)); end
  end
endmodule
