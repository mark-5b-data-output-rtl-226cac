// pulse_sync: moves single-cycle pulses between clock domains. Each source
// pulse flips a toggle flip-flop; the destination synchronises the toggle
// through two flip-flops and emits one pulse per observed change. Pulses must
// be at least three destination clocks apart to be counted separately.
module pulse_sync (
  input  logic src_clk,
  input  logic src_rst,
  input  logic src_pulse,
  input  logic dst_clk,
  input  logic dst_rst,
  output logic dst_pulse
);
  logic t_src, t_m, t_d, t_q;
  always_ff @(posedge src_clk) begin
    if (src_rst)        t_src <= 1'b0;
    else if (src_pulse) t_src <= !t_src;
  end
  always_ff @(posedge dst_clk) begin
    if (dst_rst) begin t_m <= 1'b0; t_d <= 1'b0; t_q <= 1'b0; end
    else begin t_m <= t_src; t_d <= t_m; t_q <= t_d; end
  end
  assign dst_pulse = t_d ^ t_q;
endmodule
