// tb_delay_gen: compares the address sequence with a reference model of the
// linear delay model (33-bit sum of delay error and rate, +1 normally, +0 or
// +2 on carry) for random rates in both modes, with RCLK = clk/2, and checks
// that a restart clears the address and reloads the model.
module tb_delay_gen;
  int checks = 0, failures = 0;
  task automatic chk(input bit c, input string m);
    checks++; if (!c) begin failures++; $display("FAIL: %s", m); end
  endtask
  logic clk = 0; always #5 clk = ~clk;
  logic rst = 1, rclk_en = 0, restart = 0, del_mode = 0, rd_in = 0, rd_out, slip;
  logic [31:0] del_err;
  logic [17:0] del_rate;
  logic [6:0] raddr;
  longint racc; int raddr_m, nslip;
  delay_gen dut (.*);
  always @(posedge clk) rclk_en <= !rclk_en;
  initial begin
    #2000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    repeat (4) @(posedge clk); rst <= 0;
    for (int t = 0; t < 4; t++) begin
      del_mode = t[0];
      del_err  = 32'hFFFF_FFFF - 32'($urandom_range(0, 300000));
      del_rate = 18'($urandom_range(1000, 200000));
      // restart in one RCLK
      @(posedge clk iff rclk_en); restart <= 1;
      @(posedge clk iff rclk_en); restart <= 0;
      racc = del_err; raddr_m = 0; nslip = 0;
      for (int s = 0; s < 200; s++) begin
        rd_in <= 1;
        @(posedge clk iff rclk_en);
        #1;
        chk(rd_out && raddr == 7'(raddr_m), $sformatf("mode %0d strobe %0d addr %0d exp %0d", del_mode, s, raddr, raddr_m));
        racc = racc + del_rate;
        if (racc >= 64'h1_0000_0000) begin
          racc -= 64'h1_0000_0000; raddr_m += del_mode ? 2 : 0; nslip++;
        end else raddr_m += 1;
      end
      rd_in <= 0;
      chk(nslip > 0, "carry happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
