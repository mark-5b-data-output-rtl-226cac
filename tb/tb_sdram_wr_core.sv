// tb_sdram_wr_core: one block write; checks ACTIVE, WRITE, WRITE, PRECHARGE
// ALL slots, 16 Xbar RAM fetches one cycle ahead of 16 driven data cycles,
// and the 26-cycle length.
module tb_sdram_wr_core;
  import dom_pkg::*;
  int checks = 0, failures = 0;
  task automatic chk(input bit c, input string m);
    checks++; if (!c) begin failures++; $display("FAIL: %s", m); end
  endtask
  logic clk = 0; always #6 clk = ~clk;
  logic rst = 1, start = 0, busy, done, xr_rd, dq_oe;
  logic [20:0] blk;
  sdram_bus_cmd_e cmd;
  logic [12:0] a; logic [1:0] ba;
  int nrd, noe, rd_first, oe_first, done_at;
  sdram_wr_core dut (.*);
  initial begin
    #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    blk = 21'h0F_0F01;
    repeat (3) @(posedge clk); rst <= 0; @(posedge clk);
    start <= 1; @(posedge clk); start <= 0;
    nrd = 0; noe = 0; rd_first = -1; oe_first = -1; done_at = -1;
    for (int cyc = 0; cyc < 30; cyc++) begin
      @(negedge clk);
      case (cyc)
        0:  chk(cmd == SD_ACT && a == 13'(({blk, 4'b0}) >> 12), "ACT");
        2:  chk(cmd == SD_WRITE && a[9:0] == 10'({blk, 4'b0}), "WRITE col+0");
        10: chk(cmd == SD_WRITE && a[9:0] == 10'({blk, 4'b0}) + 10'd8, "WRITE col+8");
        21: chk(cmd == SD_PRE && a[10], "PRECHARGE ALL");
        default: chk(cmd == SD_NOP, $sformatf("NOP at %0d", cyc));
      endcase
      if (xr_rd) begin nrd++; if (rd_first < 0) rd_first = cyc; end
      if (dq_oe) begin noe++; if (oe_first < 0) oe_first = cyc; end
      if (done) done_at = cyc;
    end
    chk(nrd == 16 && rd_first == 2, "16 fetches from cycle 2");
    chk(noe == 16 && oe_first == 3, "16 data cycles from cycle 3");
    chk(done_at == 25, "26-cycle operation");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
