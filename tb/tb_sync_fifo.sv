// tb_sync_fifo: fills the 31-word FIFO to full, checks that a further push is
// refused, then drains it and compares every word and the count.
module tb_sync_fifo;
  int checks = 0, failures = 0;
  task automatic chk(input bit c, input string m);
    checks++; if (!c) begin failures++; $display("FAIL: %s", m); end
  endtask
  logic clk = 0; always #5 clk = ~clk;
  logic rst = 1, wr = 0, rd = 0;
  logic [35:0] din, dout;
  logic empty, full;
  logic [4:0] count;
  sync_fifo #(.W(36), .DEPTH(31)) dut (.*);
  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    repeat (3) @(posedge clk); rst <= 0;
    @(posedge clk);
    chk(empty && !full && count == 0, "empty after reset");
    for (int i = 0; i < 32; i++) begin
      wr <= 1; din <= 36'h9_0000_0000 + 36'(i * 7);
      @(posedge clk);
    end
    wr <= 0; @(posedge clk);
    chk(full && count == 31, "full at 31 words");
    for (int i = 0; i < 31; i++) begin
      chk(dout == 36'h9_0000_0000 + 36'(i * 7), $sformatf("word %0d", i));
      rd <= 1; @(posedge clk); rd <= 0; @(negedge clk);
      chk(count == 5'(30 - i), "count after pop");
    end
    chk(empty, "empty after drain");
    // simultaneous push and pop keeps the count
    wr <= 1; din <= 36'h1; @(posedge clk);
    wr <= 1; rd <= 1; din <= 36'h2; @(posedge clk);
    wr <= 0; rd <= 0; @(negedge clk);
    chk(count == 1 && dout == 36'h2, "push+pop");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
