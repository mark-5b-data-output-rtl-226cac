// tb_fpdp_if: streams words with no reader until SUSP# asserts, checks it
// asserts once more than 75% of 127 words are held, sends the 16 extra words
// FPDP allows after SUSP#, checks no overflow, then drains and checks order
// and that SUSP# releases below 50%. Also checks hold-off while disabled.
module tb_fpdp_if;
  int checks = 0, failures = 0;
  task automatic chk(input bit c, input string m);
    checks++; if (!c) begin failures++; $display("FAIL: %s", m); end
  endtask
  logic clk = 0; always #15 clk = ~clk;
  logic rst = 1, en = 0, dvalid_n = 1, rd = 0;
  logic [31:0] data = 0, dout;
  logic susp_n, nrdy_n, empty, ovf;
  int sent = 0, got = 0, susp_at = -1;
  fpdp_if dut (.clk, .rst, .en, .fpdp_dvalid_n(dvalid_n), .fpdp_data(data),
               .fpdp_suspend_n(susp_n), .fpdp_nrdy_n(nrdy_n), .rd, .dout, .empty,
               .overflow(ovf));
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    repeat (3) @(posedge clk); rst <= 0;
    @(posedge clk);
    chk(!susp_n && !nrdy_n, "held off while disabled");
    en <= 1; repeat (3) @(posedge clk);
    chk(susp_n && nrdy_n, "released when enabled");
    // send until SUSP#, then 16 more
    while (susp_n) begin
      dvalid_n <= 0; data <= 32'hC000_0000 + sent; sent++;
      @(posedge clk);
    end
    susp_at = sent;
    for (int i = 0; i < 16; i++) begin
      dvalid_n <= 0; data <= 32'hC000_0000 + sent; sent++; @(posedge clk);
    end
    dvalid_n <= 1; repeat (3) @(posedge clk);
    // count when SUSP# was seen: registered input + one clock of flag latency
    chk(susp_at >= 96 && susp_at <= 99, $sformatf("SUSP# after %0d words", susp_at));
    chk(!ovf, "no overflow with 16 words after SUSP#");
    // drain
    while (!empty) begin
      chk(dout == 32'hC000_0000 + got, $sformatf("word %0d", got));
      rd <= 1; @(posedge clk); rd <= 0; got++;
      @(negedge clk);
      if (sent - got == 64) chk(!susp_n, "still held at 64 words");
      if (sent - got == 61) chk(susp_n, "released below 50%");
    end
    chk(got == sent, "all words received");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
