// tb_sdram_init_core: with a short wait, checks the order PRECHARGE ALL,
// AUTO REFRESH, AUTO REFRESH, LOAD MODE REGISTER = 0000000110011, that only
// NOPs precede them for WAIT_CYCLES, and that done follows.
module tb_sdram_init_core;
  import dom_pkg::*;
  int checks = 0, failures = 0;
  task automatic chk(input bit c, input string m);
    checks++; if (!c) begin failures++; $display("FAIL: %s", m); end
  endtask
  logic clk = 0; always #6 clk = ~clk;
  logic rst = 1, start = 0, busy, done;
  sdram_bus_cmd_e cmd;
  logic [12:0] a; logic [1:0] ba;
  sdram_bus_cmd_e seen [$];
  int t_first = -1, cyc = 0;
  logic [12:0] mode_a;
  sdram_init_core #(.WAIT_CYCLES(50)) dut (.*);
  initial begin
    #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    repeat (3) @(posedge clk); rst <= 0; @(posedge clk);
    start <= 1; @(posedge clk); start <= 0;
    while (!done && cyc < 200) begin
      @(negedge clk);
      if (cmd != SD_NOP) begin
        seen.push_back(cmd);
        if (t_first < 0) t_first = cyc;
        if (cmd == SD_LMR) mode_a = a;
      end
      cyc++;
      @(posedge clk);
    end
    chk(t_first == 50, $sformatf("first command after the wait (%0d)", t_first));
    chk(seen.size() == 4, "four commands");
    if (seen.size() == 4) begin
      chk(seen[0] == SD_PRE && seen[1] == SD_AREF && seen[2] == SD_AREF && seen[3] == SD_LMR, "order");
      chk(mode_a == 13'b0000000110011, "mode register value");
    end
    chk(done, "done");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
