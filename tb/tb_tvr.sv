// tb_tvr: feeds the receiver pattern seconds (TOT on the first word) with
// known injected bit errors on the selected bit and some invalid words;
// checks sum_err and bias posted at the next TOT with a new_sums pulse, that
// the bit index changes only at a TOT, and one fetch per RCLK.
module tb_tvr;
  import dom_pkg::*;
  int checks = 0, failures = 0;
  task automatic chk(input bit c, input string m);
    checks++; if (!c) begin failures++; $display("FAIL: %s", m); end
  endtask
  logic clk = 0; always #5 clk = ~clk;
  logic rst = 1, rclk_en = 0, en = 0, finished = 0;
  logic [4:0] bit_sel = 0, cur_bit;
  logic del_rd, new_sums;
  be_word_t cfdr_rdata;
  logic [31:0] sum_err, bias;
  tvr dut (.*);
  always @(posedge clk) rclk_en <= !rclk_en;
  // source: seconds of LEN words; word i of second s
  localparam int LEN = 400;
  int sec = 0, idx = 0, nfetch = 0, nrclk = 0;
  logic [31:0] pat;
  int exp_err[8], exp_bias[8];
  int bitof[8];
  function automatic bit inject(int s, int i); return (i % (7 + s)) == 3; endfunction
  function automatic bit invalid(int s, int i); return (i % 50) == 17; endfunction
  always @(posedge clk) if (rclk_en && en) begin
    nrclk++;
    if (del_rd) begin
      logic [31:0] w;
      nfetch++;
      pat = (idx == 0) ? TVG_SEED : tvg_next(pat);
      w = pat;
      if (inject(sec, idx)) w[bitof[sec]] = ~w[bitof[sec]];
      cfdr_rdata <= '{tot: idx == 0, valid: !invalid(sec, idx), data: w};
      if (!invalid(sec, idx)) begin
        exp_err[sec] += inject(sec, idx);
        exp_bias[sec] += w[bitof[sec]] ? 1 : -1;
      end
      if (idx == LEN - 1) begin idx = 0; sec++; end else idx++;
    end
  end
  int nsums = 0;
  always @(posedge clk) if (rclk_en && new_sums) begin
    nsums++;
    if (nsums >= 2) begin
      chk(sum_err == 32'(exp_err[nsums - 2]), $sformatf("second %0d errors %0d exp %0d", nsums - 2, sum_err, exp_err[nsums - 2]));
      chk(bias == 32'(exp_bias[nsums - 2]), $sformatf("second %0d bias %0d exp %0d", nsums - 2, $signed(bias), exp_bias[nsums - 2]));
    end
  end
  initial begin
    #5000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    foreach (bitof[i]) begin bitof[i] = (i * 5 + 3) % 32; exp_err[i] = 0; exp_bias[i] = 0; end
    bit_sel = 5'(bitof[0]);
    repeat (4) @(posedge clk); rst <= 0; @(posedge clk); en <= 1;
    for (int s = 1; s < 5; s++) begin
      // change the selection mid-second: used from the next TOT on
      repeat (LEN / 2) @(posedge clk iff rclk_en);
      bit_sel <= 5'(bitof[s]);
      repeat (LEN / 2 - 5) @(posedge clk iff rclk_en);
      chk(cur_bit == 5'(bitof[s - 1]), "bit index changes only at TOT");
      repeat (5) @(posedge clk iff rclk_en);
    end
    repeat (LEN) @(posedge clk iff rclk_en);
    chk(nsums >= 5, $sformatf("new_sums per second (%0d)", nsums));
    chk(nfetch >= nrclk - 1, "one fetch per RCLK");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
