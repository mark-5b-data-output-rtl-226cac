// tb_bocf_gen: BOCF waits for an unsuppressed PPS, then is high for
// 240 << len_code RCLKs and low for low_cnt + 1, repeating; cf_count and
// bocf_rise count frames; bocf_out is bocf two RCLKs later. All four lengths.
module tb_bocf_gen;
  int checks = 0, failures = 0;
  task automatic chk(input bit c, input string m);
    checks++; if (!c) begin failures++; $display("FAIL: %s", m); end
  endtask
  logic clk = 0; always #5 clk = ~clk;
  logic rst = 1, rclk_en = 0, en = 0, unsup_pps = 0;
  logic [1:0] len_code;
  logic [31:0] low_cnt = 99;
  logic bocf, bocf_rise, bocf_out;
  logic [15:0] cf_count;
  logic [2:0] hist;
  bocf_gen dut (.*);
  always @(posedge clk) rclk_en <= !rclk_en;
  always @(posedge clk) if (!en) hist <= 0; else if (rclk_en) hist <= {hist[1:0], bocf};
  always @(posedge clk) if (!rst && rclk_en) chk(bocf_out == hist[1], "bocf_out is bocf two RCLKs later");
  initial begin
    #50000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    repeat (4) @(posedge clk); rst <= 0;
    for (int c = 0; c < 4; c++) begin
      int hi, lo, nrise;
      len_code = 2'(c);
      en <= 1;
      repeat (40) @(posedge clk iff rclk_en);
      chk(!bocf, "waits for PPS");
      unsup_pps <= 1; @(posedge clk iff rclk_en); unsup_pps <= 0;
      // measure two frames
      nrise = 0;
      for (int f = 0; f < 2; f++) begin
        hi = 0; lo = 0;
        while (!bocf) @(posedge clk iff rclk_en);
        if (bocf_rise) nrise++;
        while (bocf) begin hi++; @(posedge clk iff rclk_en); end
        while (!bocf) begin lo++; @(posedge clk iff rclk_en); end
        chk(hi == (240 << c), $sformatf("code %0d high %0d", c, hi));
        chk(lo == 100, $sformatf("low %0d", lo));
      end
      chk(cf_count == 3 && nrise == 2, $sformatf("frame count %0d", cf_count));
      en <= 0; repeat (3) @(posedge clk iff rclk_en);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
