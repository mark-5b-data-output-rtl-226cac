// cfdr: Correlator Frame Data RAM, the entry point of the back end.
// DEPTH (128) words of 34 bits (data, validity, TOT). The write port runs on
// the 80 MHz SDRAM clock and is addressed by the SDRAM receiver; the read port
// runs on the back-end clock, is addressed by the delay generator and returns
// the word one clock after the address (block-RAM style). The read address is
// also handed back to the write domain through a request/acknowledge
// synchroniser (raddr_w) so the receiver can judge free space. Used as a ring
// buffer; both addresses are cleared by their owners on a restart event.
module cfdr
  import dom_pkg::*;
#(
  parameter int unsigned DEPTH = 128,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic          wclk,
  input  logic          wrst,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  be_word_t      wdata,
  output logic [AW-1:0] raddr_w,
  input  logic          rclk,
  input  logic          rrst,
  input  logic          re,
  input  logic [AW-1:0] raddr,
  output be_word_t      rdata
);
  be_word_t mem [DEPTH];

  always_ff @(posedge wclk) begin
    if (we) mem[waddr] <= wdata;
  end
  always_ff @(posedge rclk) begin
    if (re) rdata <= mem[raddr];
  end

  bus_sync #(.W(AW)) u_rsync (
    .src_clk(rclk), .src_rst(rrst), .src_val(raddr),
    .dst_clk(wclk), .dst_rst(wrst), .dst_val(raddr_w)
  );
endmodule
