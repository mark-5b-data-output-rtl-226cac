// tb_sdram_receiver: sends 72-bit read bursts (16 beats per block) into the
// receiver. After a bank switch with word offset 5 the CFDR must receive words
// 5, 6, 7 ... of the stream in order (the first five skipped). With the CFDR
// reader stopped, writing must stop with 8 places free; moving the read
// address lets it continue. rx_room must fall when a bank holds two blocks.
// A restart halts the flow and clears the CFDR write address. finished
// follows the arbiter's FINISHED once the twin RAM is drained.
module tb_sdram_receiver;
  import dom_pkg::*;
  int checks = 0, failures = 0;
  task automatic chk(input bit c, input string m);
    checks++; if (!c) begin failures++; $display("FAIL: %s", m); end
  endtask
  logic clk = 0; always #6 clk = ~clk;
  logic rst = 1, rd_dv = 0, bank_switch = 0, arb_finished = 0, restart = 0;
  logic [71:0] dq_in = '0;
  logic [4:0] rd_offset = 0;
  logic rx_room, cfdr_we, finished;
  logic [6:0] cfdr_waddr, cfdr_raddr = 0;
  be_word_t cfdr_wdata;
  int sent = 0, nwr = 0, next_exp = 0;
  sdram_receiver dut (.*);
  function automatic logic [35:0] w36(int i);
    return {2'b00, i[3], 1'b1, 32'h7700_0000 + 32'(i)};
  endfunction
  task automatic burst();   // one 1 kb block = 32 words, when the receiver has room
    while (!rx_room) @(posedge clk);
    for (int b = 0; b < 16; b++) begin
      rd_dv <= 1; dq_in <= {w36(sent + 1), w36(sent)}; sent += 2;
      @(posedge clk);
    end
    rd_dv <= 0; dq_in <= '0; @(posedge clk);
  endtask
  always @(posedge clk) begin
    if (!rst && cfdr_we) begin
      chk(cfdr_wdata.data == 32'h7700_0000 + 32'(next_exp) && cfdr_wdata.tot == next_exp[3]
          && cfdr_wdata.valid, $sformatf("CFDR word %0d", next_exp));
      chk(cfdr_waddr == 7'(nwr), "CFDR write address sequential");
      next_exp++; nwr++;
    end
  end
  initial begin
    #2000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    repeat (3) @(posedge clk); rst <= 0; @(posedge clk);
    rd_offset <= 5; bank_switch <= 1; next_exp = 5; @(posedge clk); bank_switch <= 0;
    @(posedge clk);
    chk(rx_room, "room for a block");
    burst();
    burst();
    repeat (3) @(posedge clk);
    burst();
    repeat (2) @(posedge clk);
    burst();
    repeat (80) @(posedge clk);
    chk(nwr == 120, $sformatf("CFDR filled to 120 of 128 (%0d)", nwr));
    chk(rx_room, "room with 3 words waiting");
    burst();
    repeat (3) @(posedge clk);
    chk(!rx_room, "no room with 35 words waiting");
    cfdr_raddr <= 7'd10;
    repeat (20) @(posedge clk);
    chk(nwr == 130, $sformatf("continues after reader moved (%0d)", nwr));
    // restart: flow stops, CFDR address clears
    restart <= 1; @(posedge clk); restart <= 0;
    cfdr_raddr <= 0;
    repeat (5) @(posedge clk);
    chk(cfdr_waddr == 0 && nwr == 130, "restart clears and halts");
    // new pointer at offset 0 in the other bank
    sent = 1000; next_exp = 1000; nwr = 0;
    rd_offset <= 0; bank_switch <= 1; @(posedge clk); bank_switch <= 0;
    burst();
    repeat (40) @(posedge clk);
    chk(nwr == 32, $sformatf("new bank delivers from its first word (%0d)", nwr));
    cfdr_raddr <= 7'd32;
    arb_finished <= 1;
    repeat (10) @(posedge clk);
    chk(finished, "finished after drain");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
