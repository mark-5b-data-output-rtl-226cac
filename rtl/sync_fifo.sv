// sync_fifo: single-clock FIFO of DEPTH words of W bits with an occupancy
// count. The first word is visible at dout while the FIFO is not empty
// (show-ahead); rd pops it, wr pushes din. A push to a full FIFO or a pop of
// an empty one is ignored. Any DEPTH is allowed, not only powers of two, so the
// 127x32 FPDP FIFO and the 31x36 Strip-header FIFO of the front end are
// instances of this module with their own sizes. Synchronous active-high reset.
module sync_fifo #(
  parameter int unsigned W     = 36,
  parameter int unsigned DEPTH = 31,
  localparam int unsigned AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1,
  localparam int unsigned CW   = $clog2(DEPTH + 1)
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          wr,
  input  logic [W-1:0]  din,
  input  logic          rd,
  output logic [W-1:0]  dout,
  output logic          empty,
  output logic          full,
  output logic [CW-1:0] count
);
  logic [W-1:0]  mem [DEPTH];
  logic [AW-1:0] wp, rp;
  logic          do_wr, do_rd;

  assign empty = (count == '0);
  assign full  = (count == CW'(DEPTH));
  assign do_wr = wr && !full;
  assign do_rd = rd && !empty;
  assign dout  = mem[rp];

  function automatic logic [AW-1:0] inc(input logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (do_wr) mem[wp] <= din;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      wp <= '0; rp <= '0; count <= '0;
    end else begin
      if (do_wr) wp <= inc(wp);
      if (do_rd) rp <= inc(rp);
      count <= count + CW'(do_wr) - CW'(do_rd);
    end
  end
endmodule
