// tb_cfdr: writes 128 words on an 80 MHz clock and reads them back on a
// 32 MHz clock (one clock read latency); checks data and that the read
// address arrives in the write domain.
module tb_cfdr;
  import dom_pkg::*;
  int checks = 0, failures = 0;
  task automatic chk(input bit c, input string m);
    checks++; if (!c) begin failures++; $display("FAIL: %s", m); end
  endtask
  logic wclk = 0, rclk = 0;
  always #6.25 wclk = ~wclk;
  always #15.6 rclk = ~rclk;
  logic wrst = 1, rrst = 1, we = 0, re = 0;
  logic [6:0] waddr = 0, raddr = 0, raddr_w;
  be_word_t wdata, rdata;
  cfdr dut (.*);
  initial begin
    #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    #100; wrst = 0; rrst = 0;
    for (int i = 0; i < 128; i++) begin
      @(posedge wclk); we <= 1; waddr <= 7'(i);
      wdata <= '{tot: i[2], valid: i[0], data: 32'hCF00_0000 ^ (32'(i) * 32'h0101_0101)};
    end
    @(posedge wclk); we <= 0;
    for (int i = 0; i < 128; i++) begin
      @(posedge rclk); re <= 1; raddr <= 7'(127 - i);
      @(posedge rclk); re <= 0; #1;
      chk(rdata.data == (32'hCF00_0000 ^ (32'(127 - i) * 32'h0101_0101)) && rdata.valid == i[0] ^ 1'b1
          && rdata.tot == 1'(((127 - i) >> 2) & 1), $sformatf("read %0d", 127 - i));
    end
    @(posedge rclk); raddr <= 7'd77;
    repeat (10) @(posedge rclk);
    chk(raddr_w == 7'd77, "read address seen in write domain");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
