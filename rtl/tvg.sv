// tvg: test vector generator, an alternative output source (RCLK enable
// domain). Once enabled it starts at the next unsuppressed PPS and then emits
// one 32-bit pattern word per RCLK with qvalid high. The pattern restarts from
// dom_pkg::TVG_SEED at every PPS, and r1pps marks the first word of each
// second. The pattern here is a 32-bit LFSR (dom_pkg::tvg_next) standing in
// for the VSI-H standard test vector, whose definition is not reproduced; the
// start on an unsuppressed PPS and the one-word-per-RCLK rate are the design's.
module tvg
  import dom_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic        rclk_en,
  input  logic        en,
  input  logic        pps,
  input  logic        unsup_pps,
  output logic [31:0] rbs,
  output logic        qvalid,
  output logic        r1pps
);
  logic        running;
  logic [31:0] lfsr;

  always_ff @(posedge clk) begin
    if (rst || !en) begin
      running <= 1'b0; lfsr <= TVG_SEED; rbs <= '0; qvalid <= 1'b0; r1pps <= 1'b0;
    end else if (rclk_en) begin
      r1pps <= 1'b0;
      if ((!running && unsup_pps) || (running && pps)) begin
        running <= 1'b1;
        rbs     <= TVG_SEED;
        lfsr    <= tvg_next(TVG_SEED);
        qvalid  <= 1'b1;
        r1pps   <= 1'b1;
      end else if (running) begin
        rbs  <= lfsr;
        lfsr <= tvg_next(lfsr);
      end
    end
  end
endmodule
