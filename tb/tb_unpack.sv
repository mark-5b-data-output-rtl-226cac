// tb_unpack: checks the worked unpack example (0xAABBCCDD with 8 streams gives
// 0xAABBCCDD, 0xAAAABBCC, 0xAAAAAABB, 0xAAAAAAAA), 32/N words per input word
// for every code, that the low N bits carry the samples in order, and that the
// TOT tag stays on the first sample only. Throughput is one output word per
// clock.
module tb_unpack;
  import dom_pkg::*;
  int checks = 0, failures = 0;
  task automatic chk(input bit c, input string m);
    checks++; if (!c) begin failures++; $display("FAIL: %s", m); end
  endtask
  logic clk = 0; always #5 clk = ~clk;
  logic rst = 1;
  logic [2:0] code;
  logic in_empty, in_rd, out_v, out_ready;
  fe_word_t in_word, out_word;
  fe_word_t q [$];
  logic [31:0] outs [$];
  logic        tags [$];
  unpack dut (.*);
  int qi = 0;
  assign in_empty = qi >= q.size();
  assign in_word  = in_empty ? '0 : q[qi];
  always @(posedge clk) begin
    if (in_rd) qi <= qi + 1;
    if (!rst && out_v && out_ready) begin outs.push_back(out_word.data); tags.push_back(out_word.tot); end
  end
  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    out_ready = 1; code = 3;
    repeat (3) @(posedge clk); rst <= 0;
    q.push_back('{pad: 2'b0, tot: 1'b1, valid: 1'b1, data: 32'hAABBCCDD});
    repeat (8) @(posedge clk);
    chk(outs.size() == 4, $sformatf("4 words for 8 streams, got %0d", outs.size()));
    if (outs.size() == 4) begin
      chk(outs[0] == 32'hAABBCCDD, "t1"); chk(outs[1] == 32'hAAAABBCC, "t2");
      chk(outs[2] == 32'hAAAAAABB, "t3"); chk(outs[3] == 32'hAAAAAAAA, "t4");
      chk(tags[0] && !tags[1] && !tags[3], "TOT tag on the first sample only");
    end
    for (int c = 0; c <= 5; c++) begin
      int n, per;
      logic [31:0] w0, w1;
      n = 1 << c; per = 32 / n;
      w0 = $urandom; w1 = $urandom;
      outs.delete(); tags.delete(); code = 3'(c);
      @(posedge clk);
      q.push_back('{pad: 2'b0, tot: 1'b0, valid: 1'b1, data: w0});
      q.push_back('{pad: 2'b0, tot: 1'b0, valid: 1'b1, data: w1});
      repeat (2 * per + 4) @(posedge clk);
      chk(outs.size() == 2 * per, $sformatf("code %0d: %0d words", c, 2 * per));
      for (int k = 0; k < 2 * per && k < outs.size(); k++) begin
        logic [31:0] src, m;
        src = (k < per) ? w0 : w1;
        m = (n == 32) ? 32'hFFFF_FFFF : ((32'd1 << n) - 1);
        chk((outs[k] & m) == ((src >> ((k % per) * n)) & m), $sformatf("code %0d sample %0d", c, k));
      end
    end
    // back-pressure: nothing lost
    outs.delete(); code = 3'd2; out_ready = 0;
    q.push_back('{pad: 2'b0, tot: 1'b0, valid: 1'b1, data: 32'h7654_3210});
    repeat (5) @(posedge clk);
    out_ready = 1; repeat (12) @(posedge clk);
    chk(outs.size() == 8 && (outs[7] & 32'hF) == 32'h7, "hold under back-pressure");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
