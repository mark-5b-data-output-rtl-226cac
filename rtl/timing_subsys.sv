// timing_subsys: RCLK and PPS generation for the back end.
// The selected source clock (clk) is divided by 2^(rclk_rate_code+1): rclk_en
// is a one-clock enable at the RCLK rate and rclk_out a square wave for the
// output connector. A free-running counter of pps_div+1 RCLKs makes the system
// PPS; it is started by the first rising edge of DPS1PPS after en, or by en
// itself when use_internal_pps is set, and is never re-synchronised, so the
// PPS is perfectly periodic. Each PPS-type output lasts one RCLK:
//   pps      - raw system PPS (ROT1PPS interrupt, ROTMON pin)
//   unsup_pps- the PPS unless suppress_pps is set (the trigger for mode
//              events such as a new SDRAM read pointer)
//   vsi_pps  - the PPS delayed PPS_PIPE RCLKs to line up with the VSI output
//              data, one word time long
//   dom1pps  - a rising edge of the DPS1PPS input (DOM1PPS interrupt)
// The three PPS copies and the counter start follow the design; the RCLK
// divide code and the use of a full count in place of a PPS divide code are
// this design's choices.
module timing_subsys #(
  parameter int unsigned PPS_PIPE = 93
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        en,
  input  logic [2:0]  rclk_rate_code,
  input  logic        use_internal_pps,
  input  logic [31:0] pps_div,
  input  logic        suppress_pps,
  input  logic        dps1pps,
  output logic        rclk_en,
  output logic        rclk_out,
  output logic        pps,
  output logic        unsup_pps,
  output logic        vsi_pps,
  output logic        dom1pps
);
  logic [7:0]  div;
  logic [2:0]  p_sync;
  logic        started;
  logic [31:0] pcnt;
  logic [PPS_PIPE-1:0] pipe;
  logic        ext_edge;

  // RCLK divider
  always_ff @(posedge clk) begin
    if (rst) begin
      div <= '0; rclk_out <= 1'b0;
    end else begin
      div <= div + 1'b1;
      if (div == (8'd2 << rclk_rate_code) - 1'b1) div <= '0;
      rclk_out <= div < (8'd1 << rclk_rate_code);
    end
  end
  assign rclk_en = (div == (8'd2 << rclk_rate_code) - 1'b1);

  // DPS1PPS edge detect (input is asynchronous)
  always_ff @(posedge clk) begin
    if (rst) p_sync <= '0;
    else     p_sync <= {p_sync[1:0], dps1pps};
  end
  assign ext_edge = p_sync[1] && !p_sync[2];
  assign dom1pps  = ext_edge;

  // PPS counter, in RCLKs
  logic ext_seen;
  always_ff @(posedge clk) begin
    if (rst || !en) begin
      started <= 1'b0; pcnt <= '0; pps <= 1'b0; ext_seen <= 1'b0;
      unsup_pps <= 1'b0; pipe <= '0; vsi_pps <= 1'b0;
    end else begin
      if (ext_edge) ext_seen <= 1'b1;
      if (rclk_en) begin
        pps <= 1'b0;
        if (!started) begin
          if (use_internal_pps || ext_seen || ext_edge) begin
            started <= 1'b1; pcnt <= '0; pps <= 1'b1;
          end
        end else if (pcnt == pps_div) begin
          pcnt <= '0; pps <= 1'b1;
        end else begin
          pcnt <= pcnt + 1'b1;
        end
        unsup_pps <= 1'b0;
        if (!started) begin
          if (use_internal_pps || ext_seen || ext_edge) unsup_pps <= !suppress_pps;
        end else if (pcnt == pps_div) unsup_pps <= !suppress_pps;
        pipe    <= {pipe[PPS_PIPE-2:0], pps};
        vsi_pps <= pipe[PPS_PIPE-2];
      end
    end
  end
endmodule
