// tb_sdram_arbiter: runs the arbiter against a stand-in core (ready/op_done
// after 26 cycles for reads and writes, 9 for refresh) on a 128-block ring.
// Checks: INIT first; the startup fill stops with the write pointer at the
// last 1/32 of the ring and sets startup_done; refreshes keep coming at the
// programmed interval; a new read pointer gives a bank switch with the word
// offset; reads follow; a write never enters the sector ahead of the read
// pointer; once writing stops the reads drain the ring and FINISH is entered.
module tb_sdram_arbiter;
  import dom_pkg::*;
  int checks = 0, failures = 0;
  task automatic chk(input bit c, input string m);
    checks++; if (!c) begin failures++; $display("FAIL: %s", m); end
  endtask
  localparam int BW = 7;
  logic clk = 0; always #6 clk = ~clk;
  logic rst = 1, en = 0, rx_room = 1, bank_switch, finished, load = 0;
  logic [6:0] xr_avail72 = 16;
  logic [4:0] rd_offset;
  logic [BW+4:0] new_addr = '0;
  sdram_cmd_e cmd_code;
  logic cmd_strobe, ready, op_done, startup_done;
  logic [BW-1:0] cmd_blk, wr_blk, rd_blk;
  int busy = 0, nref = 0, nrd = 0, nwr = 0, ninit = 0, last_ref = 0, max_gap = 0, cyc = 0, nbs = 0;
  bit sector_bad = 0;
  sdram_arbiter #(.BLK_W(BW), .REF_TICKS(10)) dut (.*, .load_new_addr(load));
  assign ready = busy == 0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    op_done <= 0;
    if (busy > 1) busy <= busy - 1;
    if (busy == 1) begin busy <= 0; end
    if (busy == 2) op_done <= 1;
    if (cmd_strobe && ready) begin
      case (cmd_code)
        CMD_INIT:    begin ninit++; busy <= 30; end
        CMD_READ:    begin nrd++; busy <= 26; end
        CMD_WRITE:   begin nwr++; busy <= 26;
                     if (startup_done && ((rd_blk - cmd_blk - 1) & 7'h7F) <= 4) sector_bad = 1; end
        CMD_REFRESH: begin nref++; busy <= 9;
                     if (cyc - last_ref > max_gap && last_ref > 0) max_gap = cyc - last_ref;
                     last_ref = cyc; end
      endcase
    end
    if (!rst && bank_switch) nbs++;
  end
  initial begin
    #5000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    repeat (3) @(posedge clk); rst <= 0; en <= 1;
    wait (startup_done);
    chk(ninit == 1, "one INIT");
    chk(wr_blk == 7'd124 && nwr == 124, $sformatf("startup fill to 124 of 128 blocks (%0d)", wr_blk));
    chk(nrd == 0, "no reads before a read pointer");
    chk(nref > 10, "refreshes during startup");
    repeat (200) @(posedge clk);
    chk(wr_blk == 7'd124, "no writes while no room");
    // read pointer at word 64*32+5: block 64, offset 5
    @(posedge clk); new_addr <= 12'(64 * 32 + 5); load <= 1; @(posedge clk); load <= 0;
    wait (nbs == 1);
    chk(rd_offset == 5, $sformatf("offset passed to receiver (%0d, nbs %0d)", rd_offset, nbs));
    repeat (3) @(posedge clk);
    chk(rd_blk == 7'd64, "read pointer loaded");
    repeat (3000) @(posedge clk);
    chk(nrd > 20, $sformatf("reads done (%0d)", nrd));
    chk(nwr > 124, "writes resumed behind reads");
    chk(!sector_bad, "no write into the read pointer's sector");
    xr_avail72 <= 0;   // no more data from the front end
    wait (finished);
    chk(rd_blk == wr_blk, "FINISH when read pointer meets write pointer");
    chk(max_gap <= 80 + 40, $sformatf("refresh interval (max gap %0d cycles)", max_gap));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
