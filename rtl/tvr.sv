// tvr: test vector receiver, a data sink that checks a recorded test pattern
// (RCLK enable domain). While enabled it reads one CFDR word per RCLK through
// the delay generator (word back one RCLK later). Every word tagged TOT starts
// a new second: the expected pattern restarts from dom_pkg::TVG_SEED, the
// statistics of the second just ended are posted to sum_err and bias, a
// new_sums pulse (the New_TVRSums interrupt) is given, and the bit index in
// bit_sel is taken for the second that starts. For each valid word, sum_err
// counts disagreements of the selected bit with the expected pattern and bias
// adds +1 for a one and -1 for a zero (two's complement). 32-bit results hold
// a full second at 32 Ms/s. The expected pattern is the stand-in of tvg.
module tvr
  import dom_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic        rclk_en,
  input  logic        en,
  input  logic        finished,
  input  logic [4:0]  bit_sel,
  output logic        del_rd,
  input  be_word_t    cfdr_rdata,
  output logic        new_sums,
  output logic [31:0] sum_err,
  output logic [31:0] bias,
  output logic [4:0]  cur_bit
);
  logic        k1;
  logic [31:0] exp_w, acc_err, acc_bias;
  logic [31:0] e;
  logic        b;
  logic [4:0]  bsel;

  assign del_rd = en && !finished;
  assign e    = cfdr_rdata.tot ? TVG_SEED : exp_w;
  assign bsel = cfdr_rdata.tot ? bit_sel : cur_bit;
  assign b    = cfdr_rdata.data[bsel];

  always_ff @(posedge clk) begin
    if (rst || !en) begin
      k1 <= 1'b0; exp_w <= TVG_SEED; acc_err <= '0; acc_bias <= '0;
      new_sums <= 1'b0; cur_bit <= bit_sel;
      if (rst) begin sum_err <= '0; bias <= '0; end
    end else if (rclk_en) begin
      k1 <= del_rd;
      new_sums <= 1'b0;
      if (k1) begin
        if (cfdr_rdata.tot) begin
          sum_err  <= acc_err;
          bias     <= acc_bias;
          new_sums <= 1'b1;
          cur_bit  <= bit_sel;
        end
        if (cfdr_rdata.valid) begin
          acc_err  <= (cfdr_rdata.tot ? 32'd0 : acc_err) + 32'(b != e[bsel]);
          acc_bias <= (cfdr_rdata.tot ? 32'd0 : acc_bias) + (b ? 32'd1 : 32'hFFFF_FFFF);
        end else if (cfdr_rdata.tot) begin
          acc_err <= '0; acc_bias <= '0;
        end
        exp_w <= tvg_next(e);
      end
    end
  end
endmodule
