// tb_cfhr: software fills bank A and bank B with different words; the
// readout bank is B after reset, A after the first BOCF (already in its first
// RCLK), B after the second, and so on; reads have one clock latency.
module tb_cfhr;
  int checks = 0, failures = 0;
  task automatic chk(input bit c, input string m);
    checks++; if (!c) begin failures++; $display("FAIL: %s", m); end
  endtask
  logic clk = 0; always #5 clk = ~clk;
  logic sw_clk = 0; always #7 sw_clk = ~sw_clk;
  logic rst = 1, sw_we = 0, sw_bank = 0, rclk_en = 1, en = 1, bocf_rise = 0, rd_bank;
  logic [7:0] sw_addr, raddr;
  logic [15:0] sw_wdata, rdata;
  cfhr dut (.*);
  initial begin
    #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    for (int b = 0; b < 2; b++)
      for (int i = 0; i < 240; i++) begin
        @(posedge sw_clk); sw_we <= 1; sw_bank <= 1'(b); sw_addr <= 8'(i); sw_wdata <= 16'(b * 16'h8000 + i * 3);
      end
    @(posedge sw_clk); sw_we <= 0;
    @(posedge clk); rst <= 0; @(posedge clk);
    chk(rd_bank == 1'b1, "bank B after reset");
    for (int f = 0; f < 4; f++) begin
      logic exp_b;
      exp_b = f[0];   // frame 0 reads A
      // first RCLK of the BOCF
      bocf_rise <= 1; raddr <= 0; @(posedge clk); bocf_rise <= 0; #1;
      chk(rdata == 16'(exp_b * 16'h8000), $sformatf("frame %0d word 0", f));
      for (int i = 1; i < 240; i += 17) begin
        raddr <= 8'(i); @(posedge clk); #1;
        chk(rdata == 16'(exp_b * 16'h8000 + i * 3), $sformatf("frame %0d word %0d", f, i));
      end
      chk(rd_bank == exp_b, "readout bank");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
