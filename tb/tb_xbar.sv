// tb_xbar: straight-through, swapped and fan-out selections and random
// routings; each output bit is compared with the selected input bit.
module tb_xbar;
  int checks = 0, failures = 0;
  task automatic chk(input bit c, input string m);
    checks++; if (!c) begin failures++; $display("FAIL: %s", m); end
  endtask
  logic [31:0] din, dout;
  logic [4:0] sel [32];
  xbar dut (.*);
  initial begin
    #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    for (int i = 0; i < 32; i++) sel[i] = 5'(i);
    din = 32'hDEAD_BEEF; #1;
    chk(dout == din, "straight through");
    for (int i = 0; i < 32; i++) sel[i] = 5'(31 - i);
    #1; chk(dout == {<<{din}}, "bit reversal");
    for (int i = 0; i < 32; i++) sel[i] = 5'd3;
    din = 32'h8; #1; chk(dout == 32'hFFFF_FFFF, "fan-out of stream 3");
    for (int t = 0; t < 50; t++) begin
      din = $urandom;
      for (int i = 0; i < 32; i++) sel[i] = 5'($urandom);
      #1;
      for (int i = 0; i < 32; i++) chk(dout[i] == din[sel[i]], "random route");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
