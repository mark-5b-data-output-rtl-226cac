// int_ctrl: interrupt flags of the register block. Each of N sources sets a
// sticky pending bit with a one-clock pulse; a bit is cleared by writing 1 to
// its clr input (a set in the same clock wins). The interrupt output to the
// PCI bridge is high while any pending bit is not masked (mask bit = 1 hides
// it; masked events are still recorded). Bit assignment: dom_pkg::INT_*.
module int_ctrl #(
  parameter int unsigned N = 6
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [N-1:0] src,
  input  logic [N-1:0] mask,
  input  logic [N-1:0] clr,
  output logic [N-1:0] pending,
  output logic         irq
);
  always_ff @(posedge clk) begin
    if (rst) begin
      pending <= '0; irq <= 1'b0;
    end else begin
      pending <= (pending & ~clr) | src;
      irq     <= |(((pending & ~clr) | src) & ~mask);
    end
  end
endmodule
