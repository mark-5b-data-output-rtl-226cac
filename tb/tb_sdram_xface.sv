// tb_sdram_xface: the SDRAM interface (arbiter, core, receiver) with the
// behavioural DIMM, a small ring (BLK_W = 7: 128 blocks of 32 words), a short
// power-up wait and a 10-tick refresh interval. An Xbar RAM model supplies a
// numbered word stream; a CFDR model consumes one word every other clock.
// Checks: initialisation with one LMR of CL3/BL8 and no DIMM protocol error;
// startup_done after exactly the startup fill of 124 blocks; after a restart
// to word address A the CFDR receives the stream from word A on, in order,
// with its write address restarted at 0 and without overrunning the reader;
// a second restart to a later address jumps there (offset inside a block);
// refreshes keep their interval; nothing unwritten is read; when the supply
// stops the ring drains and finished rises after the last written word.
module tb_sdram_xface;
  import dom_pkg::*;
  int checks = 0, failures = 0;
  task automatic chk(input bit c, input string m);
    checks++; if (!c) begin failures++; $display("FAIL: %s", m); end
  endtask
  localparam int BLK_W = 7;
  logic clk = 0; always #6 clk = ~clk;
  logic rst = 1, en = 0, restart = 0;
  logic [6:0] xr_avail72;
  logic xr_rd;
  logic [71:0] xr_data;
  logic [BLK_W+4:0] new_addr = 0;
  logic cfdr_we;
  logic [6:0] cfdr_waddr, cfdr_raddr = 0;
  be_word_t cfdr_wdata;
  logic sdram_ras_n, sdram_cas_n, sdram_we_n, sdram_s0_n, sdram_s2_n, sdram_cke, sdram_rege;
  logic [7:0] sdram_dqmb;
  logic [1:0] sdram_ba;
  logic [12:0] sdram_a;
  logic [71:0] sdram_dq_out, sdram_dq_in;
  logic sdram_dq_oe, startup_done, finished;
  sdram_xface #(.BLK_W(BLK_W), .INIT_WAIT(20), .REF_TICKS(10)) dut (.*);
  sdram_dimm_model dimm (.clk, .s0_n(sdram_s0_n), .ras_n(sdram_ras_n), .cas_n(sdram_cas_n),
    .we_n(sdram_we_n), .ba(sdram_ba), .a(sdram_a), .dq_out(sdram_dq_out), .dq_oe(sdram_dq_oe),
    .dq_in(sdram_dq_in));
  // Xbar RAM model: 72-bit word j holds stream words 2j and 2j+1
  int supply = 1 << 30;   // 72-bit words available in total
  int xr_j = 0;
  assign xr_avail72 = (supply - xr_j >= 64) ? 7'd64 : 7'(supply - xr_j);
  function automatic fe_word_t sw(int k);
    return '{pad: 2'b00, tot: (k % 1000) == 0, valid: 1'b1, data: 32'(k)};
  endfunction
  always @(posedge clk) if (xr_rd && !rst) begin
    xr_data <= {sw(2 * xr_j + 1), sw(2 * xr_j)}; xr_j++;
  end
  // CFDR model
  be_word_t cm [128];
  int wcount = 0, rcount = 0, overrun = 0, bad = 0, got = 0;
  int unsigned expk;
  bit phase = 0;
  int wb;
  always @(posedge clk) begin
    wb = wcount;
    if (restart) begin
      wcount = 0; rcount = 0; cfdr_raddr <= 0; expk = new_addr;
    end else if (cfdr_we) begin
      if (cfdr_waddr != 7'(wcount)) overrun++;
      if (wcount - rcount >= 128) overrun++;
      cm[cfdr_waddr] <= cfdr_wdata; wcount++;
    end
    phase <= !phase;
    if (!restart && phase && rcount < wb) begin   // words written before this edge
      be_word_t w;
      w = cm[cfdr_raddr];
      if (!(w.valid && w.data == expk && w.tot == ((expk % 1000) == 0))) begin
        bad++; if (bad < 5) $display("CFDR word %0d exp %0d", w.data, expk);
      end
      expk++; got++;
      cfdr_raddr <= cfdr_raddr + 1'b1; rcount++;
    end
  end
  task automatic do_restart(input int a);
    @(posedge clk); restart <= 1; new_addr <= (BLK_W+5)'(a);
    @(posedge clk); restart <= 0;
  endtask
  initial begin
    #20000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  int t0, r0;
  initial begin
    repeat (4) @(posedge clk); rst <= 0; en <= 1;
    wait (startup_done); @(posedge clk);
    chk(dimm.n_lmr == 1 && dimm.mode_reg == 13'b0000000110011, "one LMR, CL3 BL8");
    chk(dimm.n_write == 2 * 124, $sformatf("startup fill %0d bursts", dimm.n_write));
    chk(dimm.n_read == 0, "no reads before a read pointer");
    repeat (200) @(posedge clk);
    do_restart(37);
    t0 = $time; r0 = dimm.n_aref;
    repeat (3000) @(posedge clk);
    chk(got > 1000 && bad == 0, $sformatf("stream from word 37 (%0d words, %0d bad)", got, bad));
    chk(overrun == 0, "CFDR addressing and no overrun");
    do_restart(expk + 300 + 13);
    got = 0;
    repeat (3000) @(posedge clk);
    chk(got > 1000 && bad == 0, $sformatf("stream after jump (%0d words, %0d bad)", got, bad));
    chk(overrun == 0, "CFDR after jump");
    begin
      int n = dimm.n_aref - r0, cyc = ($time - t0) / 12;
      chk(n >= cyc / 80 - 1 && n <= cyc / 80 + 1, $sformatf("refresh interval: %0d in %0d cycles", n, cyc));
    end
    // stop the supply at a block boundary and drain
    supply = ((xr_j + 15) / 16) * 16;
    wait (finished); repeat (400) @(posedge clk);
    chk(expk == 32'(2 * supply), $sformatf("drained to the last word (%0d of %0d)", expk, 2 * supply));
    chk(bad == 0 && overrun == 0, "no errors while draining");
    chk(dimm.proto_err == 0 && dimm.rd_unwritten == 0, "DIMM protocol");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
