// gray_sync: carries a counter value that changes by at most one step per
// source clock into another clock domain. The value is converted to Gray code
// in the source domain, passed through two destination flip-flops and
// converted back to binary, so the destination sees either the old or the new
// value, never a mix. Latency: one source and two to three destination clocks.
module gray_sync #(
  parameter int unsigned W = 8
) (
  input  logic         src_clk,
  input  logic         src_rst,
  input  logic [W-1:0] src_bin,
  input  logic         dst_clk,
  input  logic         dst_rst,
  output logic [W-1:0] dst_bin
);
  logic [W-1:0] g_src, g_m, g_d;
  always_ff @(posedge src_clk) begin
    if (src_rst) g_src <= '0;
    else         g_src <= src_bin ^ (src_bin >> 1);
  end
  always_ff @(posedge dst_clk) begin
    if (dst_rst) begin g_m <= '0; g_d <= '0; end
    else begin g_m <= g_src; g_d <= g_m; end
  end
  always_comb begin
    dst_bin[W-1] = g_d[W-1];
    for (int i = W - 2; i >= 0; i--) dst_bin[i] = dst_bin[i+1] ^ g_d[i];
  end
endmodule
