// tb_vsi_output: CFDR model returning consecutive words one RCLK after each
// fetch, with the sequence restarted at every unsuppressed PPS (as the SDRAM
// interface does from a new pointer). Checks: nothing before the first PPS;
// the first word after a PPS leaves the pins exactly 93 RCLKs after it (90
// wait + fetch + pin stage), then one new word per RCLK; each later PPS gives
// a jump pulse and the same 93-RCLK gap; run cleared at a PPS goes idle;
// finished stops output and raises fin.
module tb_vsi_output;
  import dom_pkg::*;
  int checks = 0, failures = 0;
  task automatic chk(input bit c, input string m);
    checks++; if (!c) begin failures++; $display("FAIL: %s", m); end
  endtask
  logic clk = 0; always #5 clk = ~clk;
  logic rst = 1, rclk_en = 0, en = 0, run = 0, unsup_pps = 0, finished = 0;
  logic del_rd, qvalid, active, fin, jump;
  be_word_t cfdr_rdata;
  logic [31:0] rbs;
  vsi_output #(.RESTART_WAIT(90)) dut (.*);
  always @(posedge clk) rclk_en <= !rclk_en;
  int unsigned seq = 0, base = 0;
  always @(posedge clk) if (rclk_en) begin
    if (unsup_pps) begin base += 1000; seq = base; end
    else if (del_rd) begin cfdr_rdata <= '{tot: 1'b0, valid: 1'b1, data: seq}; seq++; end
  end
  int since = -1, first_gap = -1, njump = 0, bad_seq = 0, nwords = 0;
  int unsigned expv;
  always @(posedge clk) if (rclk_en && !rst) begin
    if (jump) njump++;
    if (unsup_pps) begin since = 0; first_gap = -1; end else if (since >= 0) since++;
    if (qvalid && !(since >= 0 && since < 3)) begin   // words in flight at the PPS still leave
      if (first_gap < 0) begin first_gap = since; expv = rbs; chk(rbs % 1000 == 0, "first word after PPS is the pointer word"); end
      else if (rbs != expv) bad_seq++;
      expv = rbs + 1; nwords++;
    end
  end
  initial begin
    #20000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  task automatic pps();
    @(posedge clk iff rclk_en); unsup_pps <= 1; @(posedge clk iff rclk_en); unsup_pps <= 0;
  endtask
  initial begin
    repeat (4) @(posedge clk); rst <= 0; en <= 1; run <= 1;
    repeat (200) @(posedge clk iff rclk_en);
    chk(nwords == 0 && !active, "idle before PPS");
    for (int k = 0; k < 3; k++) begin
      pps();
      repeat (300) @(posedge clk iff rclk_en);
      chk(first_gap == 93, $sformatf("first word %0d RCLKs after PPS", first_gap));
      chk(bad_seq == 0, "one new word per RCLK");
      chk(njump == k + 1, "jump pulse");
    end
    run <= 0; pps(); repeat (5) @(posedge clk iff rclk_en);
    chk(!active && !qvalid, "run cleared at PPS: idle");
    run <= 1; pps(); repeat (150) @(posedge clk iff rclk_en);
    finished <= 1; repeat (3) @(posedge clk iff rclk_en);
    chk(fin && !qvalid && !del_rd, "finished");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
