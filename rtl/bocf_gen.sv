// bocf_gen: Beginning Of Correlator Frame generator (Station Unit mode).
// After en it waits for an unsuppressed PPS and starts with it: BOCF is high
// for 240 << len_code RCLKs (240, 480, 960 or 1920), then low for
// low_cnt + 1 RCLKs, and repeats, so a frame is 240<<len_code + low_cnt + 1
// RCLKs (for 2 frames/s at 32 MHz with 480-RCLK BOCF, low_cnt = 15 999 519).
// bocf is the internal level, bocf_rise a one-RCLK pulse at each frame start
// (the CF interrupt source), cf_count counts frames since enable, and bocf_out
// is bocf delayed PIPE RCLKs so that it reaches the pin together with the
// first header word of the Station Unit output. Updates happen on rclk_en.
module bocf_gen #(
  parameter int unsigned PIPE = 2
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        rclk_en,
  input  logic        en,
  input  logic        unsup_pps,
  input  logic [1:0]  len_code,
  input  logic [31:0] low_cnt,
  output logic        bocf,
  output logic        bocf_rise,
  output logic        bocf_out,
  output logic [15:0] cf_count
);
  logic        running;
  logic [31:0] cnt;
  logic [11:0] hi_len;
  logic [PIPE-1:0] pipe;

  assign hi_len = 12'd240 << len_code;

  always_ff @(posedge clk) begin
    if (rst || !en) begin
      running <= 1'b0; cnt <= '0; bocf <= 1'b0; bocf_rise <= 1'b0;
      cf_count <= '0; pipe <= '0;
    end else if (rclk_en) begin
      bocf_rise <= 1'b0;
      pipe <= {pipe[PIPE-2:0], bocf};
      if (!running) begin
        if (unsup_pps) begin
          running <= 1'b1; bocf <= 1'b1; bocf_rise <= 1'b1; cnt <= '0;
          cf_count <= cf_count + 1'b1;
        end
      end else if (bocf) begin
        if (cnt == 32'(hi_len) - 1) begin bocf <= 1'b0; cnt <= '0; end
        else cnt <= cnt + 1'b1;
      end else begin
        if (cnt == low_cnt) begin
          bocf <= 1'b1; bocf_rise <= 1'b1; cnt <= '0;
          cf_count <= cf_count + 1'b1;
        end else cnt <= cnt + 1'b1;
      end
    end
  end
  assign bocf_out = pipe[PIPE-1];
endmodule
