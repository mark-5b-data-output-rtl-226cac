// tb_sdram_rd_core: one block read; checks the command at every cycle
// (ACTIVE, READ, READ, PRECHARGE ALL), row/bank/column split of the address,
// the 16 rd_dv cycles CL+1 after each READ, and the 26-cycle length.
module tb_sdram_rd_core;
  import dom_pkg::*;
  int checks = 0, failures = 0;
  task automatic chk(input bit c, input string m);
    checks++; if (!c) begin failures++; $display("FAIL: %s", m); end
  endtask
  logic clk = 0; always #6 clk = ~clk;
  logic rst = 1, start = 0, busy, done, rd_dv;
  logic [20:0] blk;
  sdram_bus_cmd_e cmd;
  logic [12:0] a; logic [1:0] ba;
  int cyc, ndv, dv_first, done_at;
  sdram_rd_core dut (.*);
  initial begin
    #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    blk = 21'h1A_BCD5;   // word address = blk*16
    repeat (3) @(posedge clk); rst <= 0; @(posedge clk);
    start <= 1; @(posedge clk); start <= 0;
    ndv = 0; dv_first = -1; done_at = -1;
    for (cyc = 0; cyc < 30; cyc++) begin
      @(negedge clk);
      case (cyc)
        0:  chk(cmd == SD_ACT && a == 13'(({blk, 4'b0}) >> 12) && ba == 2'(({blk, 4'b0}) >> 10), "ACT row/bank");
        2:  chk(cmd == SD_READ && a[9:0] == 10'({blk, 4'b0}) && !a[10], "READ col+0");
        10: chk(cmd == SD_READ && a[9:0] == 10'({blk, 4'b0}) + 10'd8, "READ col+8");
        22: chk(cmd == SD_PRE && a[10], "PRECHARGE ALL");
        default: chk(cmd == SD_NOP, $sformatf("NOP at %0d", cyc));
      endcase
      if (rd_dv) begin ndv++; if (dv_first < 0) dv_first = cyc; end
      if (done) done_at = cyc;
    end
    chk(ndv == 16 && dv_first == 6, $sformatf("16 data cycles from 6 (%0d from %0d)", ndv, dv_first));
    chk(done_at == 25, "26-cycle operation");
    chk(!busy, "idle after");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
