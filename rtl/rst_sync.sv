// rst_sync: reset synchroniser. The reset input asserts the output at once
// (asynchronously) and releases it two clocks after it is removed, in step
// with clk, so each clock domain leaves reset cleanly.
module rst_sync (
  input  logic clk,
  input  logic arst,
  output logic rst
);
  logic [1:0] q;
  always_ff @(posedge clk or posedge arst) begin
    if (arst) q <= 2'b11;
    else      q <= {q[0], 1'b0};
  end
  assign rst = q[1];
endmodule
