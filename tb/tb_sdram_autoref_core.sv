// tb_sdram_autoref_core: one refresh: AUTO REFRESH in the first cycle, NOPs
// after, done in the ninth cycle; a second refresh right after.
module tb_sdram_autoref_core;
  import dom_pkg::*;
  int checks = 0, failures = 0;
  task automatic chk(input bit c, input string m);
    checks++; if (!c) begin failures++; $display("FAIL: %s", m); end
  endtask
  logic clk = 0; always #6 clk = ~clk;
  logic rst = 1, start = 0, busy, done;
  sdram_bus_cmd_e cmd;
  sdram_autoref_core dut (.*);
  initial begin
    #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    repeat (3) @(posedge clk); rst <= 0;
    for (int r = 0; r < 2; r++) begin
      int done_at, nref;
      @(posedge clk); start <= 1; @(posedge clk); start <= 0;
      done_at = -1; nref = 0;
      for (int cyc = 0; cyc < 12; cyc++) begin
        @(negedge clk);
        if (cmd == SD_AREF) begin nref++; chk(cyc == 0, "AREF first"); end
        if (done) done_at = cyc;
        @(posedge clk);
        if (done) break;
      end
      chk(nref == 1, "one AREF");
      chk(done_at == 8, $sformatf("9 cycles (done at %0d)", done_at));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
