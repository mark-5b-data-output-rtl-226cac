// fpdp_if: FPDP receive port of the playback datapath.
// Words presented by the disk system with FPDP_dvalid_n low are registered and
// pushed into a DEPTH-entry FIFO (127 words). Flow control follows the FPDP
// rule that the source may send up to 16 more words after SUSP# goes low:
// SUSP# is asserted once the FIFO holds more than 75% of DEPTH and released
// once it falls below 50%, leaving the top quarter as landing room. While the
// block is not enabled by software SUSP# and NRDY# are held asserted and the
// FIFO is kept empty. The read side (rd/dout/empty) is the FIFO's show-ahead
// port, used by the Strip-header stage. Everything runs on the FPDP clock.
// The NRDY# use is this design's choice; the pin is only named.
module fpdp_if #(
  parameter int unsigned DEPTH    = 127,
  parameter int unsigned SUSP_ON  = (DEPTH * 3) / 4,  // assert when count > this
  parameter int unsigned SUSP_OFF = (DEPTH + 1) / 2   // release when count < this
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        en,
  input  logic        fpdp_dvalid_n,
  input  logic [31:0] fpdp_data,
  output logic        fpdp_suspend_n,
  output logic        fpdp_nrdy_n,
  input  logic        rd,
  output logic [31:0] dout,
  output logic        empty,
  output logic        overflow     // a word arrived while the FIFO was full
);
  localparam int unsigned CW = $clog2(DEPTH + 1);
  logic        in_v;
  logic [31:0] in_d;
  logic        full;
  logic [CW-1:0] count;
  logic        susp;

  always_ff @(posedge clk) begin
    if (rst || !en) begin
      in_v <= 1'b0; in_d <= '0; susp <= 1'b1; overflow <= 1'b0;
    end else begin
      in_v <= !fpdp_dvalid_n;
      in_d <= fpdp_data;
      if (count > CW'(SUSP_ON))       susp <= 1'b1;
      else if (count < CW'(SUSP_OFF)) susp <= 1'b0;
      if (in_v && full) overflow <= 1'b1;
    end
  end

  assign fpdp_suspend_n = !susp;
  assign fpdp_nrdy_n    = en;

  sync_fifo #(.W(32), .DEPTH(DEPTH)) u_fifo (
    .clk, .rst(rst || !en), .wr(in_v), .din(in_d), .rd, .dout, .empty,
    .full, .count
  );
endmodule
