// tb_sdram_core: the strobe/ready handshake. Each command code is issued in
// turn; ready must drop the clock after the strobe and return when the
// mini-block finishes (26 cycles for read and write, 9 for refresh), the
// right command must appear on the pins, and a strobe while busy is ignored.
module tb_sdram_core;
  import dom_pkg::*;
  int checks = 0, failures = 0;
  task automatic chk(input bit c, input string m);
    checks++; if (!c) begin failures++; $display("FAIL: %s", m); end
  endtask
  logic clk = 0; always #6 clk = ~clk;
  logic rst = 1, cmd_strobe = 0, ready, op_done, sd_dq_oe, rd_dv, xr_rd;
  sdram_cmd_e cmd_code;
  logic [20:0] blk = 21'h12345;
  sdram_bus_cmd_e sd_cmd;
  logic [12:0] sd_a; logic [1:0] sd_ba;
  sdram_core #(.INIT_WAIT(20)) dut (.*);
  initial begin
    #200000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  task automatic run(input sdram_cmd_e c, input int exp_len, input sdram_bus_cmd_e first);
    int len; bit seen;
    @(negedge clk); chk(ready, "ready before command");
    cmd_code = c; cmd_strobe = 1;
    @(negedge clk); cmd_strobe = 0;
    chk(!ready, "ready drops");
    len = 0; seen = 0;
    while (!ready && len < 10000) begin
      if (sd_cmd == first) seen = 1;
      if (len == 3) begin cmd_strobe = 1; cmd_code = CMD_REFRESH; end  // ignored while busy
      if (len == 4) cmd_strobe = 0;
      @(negedge clk); len++;
    end
    chk(seen, $sformatf("%s on the pins", first.name()));
    if (exp_len > 0) chk(len == exp_len, $sformatf("%s takes %0d cycles (got %0d)", c.name(), exp_len, len));
  endtask
  initial begin
    repeat (3) @(posedge clk); rst <= 0;
    run(CMD_INIT, 0, SD_LMR);
    run(CMD_WRITE, 26, SD_WRITE);
    run(CMD_READ, 26, SD_READ);
    run(CMD_REFRESH, 9, SD_AREF);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
