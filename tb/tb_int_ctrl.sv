// tb_int_ctrl: random source pulses, masks and clears against a reference
// model of sticky pending bits and the masked interrupt output (one clock).
module tb_int_ctrl;
  int checks = 0, failures = 0;
  task automatic chk(input bit c, input string m);
    checks++; if (!c) begin failures++; $display("FAIL: %s", m); end
  endtask
  logic clk = 0; always #5 clk = ~clk;
  logic rst = 1;
  logic [5:0] src = 0, mask = 0, clr = 0, pending;
  logic irq;
  int_ctrl #(.N(6)) dut (.*);
  initial begin
    #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    logic [5:0] p = 0;
    repeat (3) @(posedge clk); rst <= 0; @(posedge clk);
    chk(pending == 0 && !irq, "reset");
    for (int i = 0; i < 2000; i++) begin
      src  <= ($urandom % 4 == 0) ? 6'($urandom) : '0;
      clr  <= ($urandom % 3 == 0) ? 6'($urandom) : '0;
      if (i % 100 == 0) mask <= 6'($urandom);
      @(posedge clk); #1;
      p = (p & ~clr) | src;
      chk(pending == p && irq == |(p & ~mask), "pending and interrupt");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
