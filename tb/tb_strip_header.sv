// tb_strip_header: feeds three disk frames (2 frames per second, counts 0,1,0)
// and checks that exactly the data words come out, in order, with invalid code
// words marked invalid, TOT on the first data word of each second, the TOT
// interrupt and counter, the VLBA time code words, and an invalid word in a
// header accepted. Then a frame with a wrong SYNC word must raise header_err
// and stop the stream.
module tb_strip_header;
  import dom_pkg::*;
  int checks = 0, failures = 0;
  task automatic chk(input bit c, input string m);
    checks++; if (!c) begin failures++; $display("FAIL: %s", m); end
  endtask
  logic clk = 0; always #5 clk = ~clk;
  logic rst = 1, en = 0;
  localparam logic [31:0] INV_SS = 32'h1111_2222, INV_DIM = 32'h3333_4444;
  logic [31:0] stream [$];
  logic in_empty, in_rd, out_wr, hdr_err, tot_int;
  logic [31:0] in_data, tc0, tc1;
  logic [15:0] tot_count;
  fe_word_t ow;
  int nout = 0, ntot_int = 0, ntot_tag = 0, ninv = 0, idx = 0;
  logic [31:0] expect_q [$];
  logic        expv_q [$];
  logic        expt_q [$];

  strip_header dut (.clk, .rst, .en, .fps(16'd2), .inv_ss(INV_SS), .inv_dim(INV_DIM),
    .in_empty, .in_data, .in_rd, .out_full(1'b0), .out_wr, .out_word(ow),
    .header_err(hdr_err), .tot_int, .tot_count, .vlba_tc0(tc0), .vlba_tc1(tc1));

  assign in_empty = idx >= stream.size();
  assign in_data  = in_empty ? 32'h0 : stream[idx];
  always @(posedge clk) if (in_rd) idx <= idx + 1;

  task automatic frame(input int cnt, input logic [31:0] sync, input int fno);
    stream.push_back(sync);
    stream.push_back((fno == 1) ? INV_DIM : 32'(cnt));   // frame 1: invalid word in header
    stream.push_back(32'hA000_0000 + fno);
    stream.push_back(32'hB000_0000 + fno);
    for (int i = 0; i < 2500; i++) begin
      logic [31:0] w;
      w = {fno[7:0], 24'(i)};
      if (i % 397 == 5) w = INV_SS;
      if (i % 541 == 9) w = INV_DIM;
      stream.push_back(w);
      expect_q.push_back(w);
      expv_q.push_back(!(w == INV_SS || w == INV_DIM));
      expt_q.push_back(i == 0 && cnt == 0);
    end
  endtask

  always @(posedge clk) begin
    if (tot_int) ntot_int++;
    if (out_wr) begin
      if (nout < expect_q.size()) begin
        chk(ow.data == expect_q[nout] && ow.valid == expv_q[nout] && ow.tot == expt_q[nout],
            $sformatf("out word %0d", nout));
      end else chk(0, "extra output word");
      if (ow.tot) ntot_tag++;
      if (!ow.valid) ninv++;
      nout++;
    end
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    frame(0, SYNC_WORD, 0);
    frame(1, SYNC_WORD, 1);
    frame(0, SYNC_WORD, 2);
    repeat (3) @(posedge clk); rst <= 0; en <= 1;
    wait (idx == stream.size());
    repeat (5) @(posedge clk);
    chk(nout == 7500, $sformatf("7500 data words out (got %0d)", nout));
    chk(!hdr_err, "no header error");
    chk(ntot_int == 2 && tot_count == 16'd2, "two TOT interrupts / TOTCount = 2");
    chk(ntot_tag == 2, "two TOT-tagged words");
    chk(tc0 == 32'hA000_0002 && tc1 == 32'hB000_0002, "VLBA time code of last second");
    chk(ninv > 0, "invalid words seen");
    // bad SYNC in the next frame
    frame(1, 32'hDEAD_BEEF, 3);
    repeat (20) @(posedge clk);
    chk(hdr_err, "header error on bad SYNC");
    chk(idx < stream.size() - 100, "stream halted");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
