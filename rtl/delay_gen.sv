// delay_gen: read address generator for the CFDR, on the back-end clock with
// the RCLK enable. For each input read strobe it presents the current address
// (raddr, with rd_out one clock later than rd_in) and computes the next one:
// normally +1. The 18-bit delay rate is added to a 32-bit delay error
// accumulator on every strobe; when the sum carries out of bit 31 the step is
// +2 (del_mode = 1, skip a word) or +0 (del_mode = 0, repeat a word) instead.
// restart (an unsuppressed PPS, or BOCF in Station Unit mode) clears the
// address and reloads the model from the delay error and rate registers.
// The linear model follows the design; which mode value skips is this
// design's choice.
module delay_gen #(
  parameter int unsigned AW = 7
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          rclk_en,
  input  logic          restart,
  input  logic [31:0]   del_err,
  input  logic [17:0]   del_rate,
  input  logic          del_mode,
  input  logic          rd_in,
  output logic          rd_out,
  output logic [AW-1:0] raddr,
  output logic          slip         // a +0 or +2 step was taken
);
  logic [AW-1:0] addr;
  logic [31:0]   acc;
  logic [17:0]   rate_q;
  logic          mode_q;
  logic [32:0]   sum;

  assign sum = {1'b0, acc} + {15'b0, rate_q};

  always_ff @(posedge clk) begin
    if (rst) begin
      addr <= '0; acc <= '0; rate_q <= '0; mode_q <= 1'b0;
      rd_out <= 1'b0; raddr <= '0; slip <= 1'b0;
    end else if (rclk_en) begin
      rd_out <= 1'b0;
      slip   <= 1'b0;
      if (restart) begin
        addr <= '0; acc <= del_err; rate_q <= del_rate; mode_q <= del_mode;
      end else if (rd_in) begin
        rd_out <= 1'b1;
        raddr  <= addr;
        acc    <= sum[31:0];
        if (sum[32]) begin
          addr <= addr + (mode_q ? AW'(2) : AW'(0));
          slip <= 1'b1;
        end else begin
          addr <= addr + 1'b1;
        end
      end
    end
  end
endmodule
