// tb_tvg: the generator starts at the first unsuppressed PPS with the seed,
// continues with the LFSR sequence one word per RCLK with qvalid high, and
// restarts from the seed with an r1pps mark at every PPS.
module tb_tvg;
  import dom_pkg::*;
  int checks = 0, failures = 0;
  task automatic chk(input bit c, input string m);
    checks++; if (!c) begin failures++; $display("FAIL: %s", m); end
  endtask
  logic clk = 0; always #5 clk = ~clk;
  logic rst = 1, rclk_en = 0, en = 0, pps = 0, unsup_pps = 0;
  logic [31:0] rbs;
  logic qvalid, r1pps;
  tvg dut (.*);
  int phase = 0;
  always @(posedge clk) rclk_en <= !rclk_en;
  initial begin
    #2000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    logic [31:0] e;
    int bad;
    repeat (4) @(posedge clk); rst <= 0; en <= 1;
    repeat (20) @(posedge clk iff rclk_en);
    chk(!qvalid, "idle before PPS");
    pps <= 1; @(posedge clk iff rclk_en); pps <= 0;    // suppressed PPS: no start
    repeat (5) @(posedge clk iff rclk_en);
    chk(!qvalid, "suppressed PPS ignored");
    for (int s = 0; s < 3; s++) begin
      pps <= 1; unsup_pps <= (s == 0); @(posedge clk iff rclk_en); pps <= 0; unsup_pps <= 0;
      @(posedge clk iff rclk_en);
      chk(r1pps && qvalid && rbs == TVG_SEED, "seed with r1pps after PPS");
      e = TVG_SEED; bad = 0;
      for (int i = 0; i < 500; i++) begin
        @(posedge clk iff rclk_en); e = tvg_next(e);
        if (!(qvalid && !r1pps && rbs == e)) bad++;
      end
      chk(bad == 0, "LFSR sequence one word per RCLK");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
