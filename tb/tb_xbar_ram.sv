// tb_xbar_ram: writes 300 tagged 36-bit words on a 33 MHz clock (stalling when
// full) while a 80 MHz reader takes 72-bit words when avail72 says they are
// complete; checks every word's order and pairing, and that the RAM reports
// full with a stopped reader (128 x 36 capacity).
module tb_xbar_ram;
  import dom_pkg::*;
  int checks = 0, failures = 0;
  task automatic chk(input bit c, input string m);
    checks++; if (!c) begin failures++; $display("FAIL: %s", m); end
  endtask
  logic wclk = 0, rclk = 0;
  always #15 wclk = ~wclk;
  always #6.25 rclk = ~rclk;
  logic wrst = 1, rrst = 1, wr, rd, full, rd_q = 0, rd_en = 0;
  fe_word_t wdata;
  logic [71:0] rd_data;
  logic [6:0] avail72;
  int nw = 0, nr = 0, maxfill = 0;
  xbar_ram dut (.wclk, .wrst, .wr, .wdata, .wr_full(full), .rclk, .rrst, .rd, .rd_data, .avail72);
  function automatic fe_word_t mk(int i);
    return '{pad: 2'b0, tot: i[0], valid: i[1], data: 32'h5A00_0000 + i};
  endfunction
  initial begin
    #2000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  // writer
  always @(posedge wclk) begin
    if (!wrst && wr && !full) nw <= nw + 1;
  end
  always_comb begin wr = !wrst && nw < 300; wdata = mk(nw); end
  // reader
  assign rd = rd_en && avail72 != 0;
  always @(posedge rclk) begin
    rd_q <= rd;
    if (rd_q) begin
      chk(rd_data[35:0] == mk(nr) && rd_data[71:36] == mk(nr + 1), $sformatf("pair %0d", nr / 2));
      nr <= nr + 2;
    end
  end
  initial begin
    #100; wrst = 0; rrst = 0;
    // reader stopped: RAM must fill to 128 words and report full
    wait (full); #200;
    chk(nw == 128, $sformatf("full after 128 words (%0d)", nw));
    chk(avail72 == 64, "64 pairs available");
    @(posedge rclk); rd_en <= 1;
    wait (nr >= 300); #500;
    chk(nr == 300 && nw == 300, "all words through");
    chk(avail72 == 0, "drained");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
