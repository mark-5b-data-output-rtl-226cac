// sdram_core: the command parser between the SDRAM Arbiter and the DIMM.
// When the arbiter raises cmd_strobe while ready is high, the 2-bit command
// code selects one of four mini-blocks (init, read, write, auto refresh) and
// starts it with the block address. ready drops on the next clock and rises
// again once the mini-block reports done, so no command can be lost or
// overlap another. Whichever mini-block is running drives the SDRAM command
// pins ({cs_n, ras_n, cas_n, we_n}), address and bank; otherwise NOP is
// driven. Read data strobes (rd_dv) and Xbar RAM fetches (xr_rd) of the
// running mini-block are passed through. All on the 80 MHz SDRAM clock.
module sdram_core
  import dom_pkg::*;
#(
  parameter int unsigned BLK_W       = 21,
  parameter int unsigned INIT_WAIT   = 8000
) (
  input  logic             clk,
  input  logic             rst,
  input  sdram_cmd_e       cmd_code,
  input  logic             cmd_strobe,
  input  logic [BLK_W-1:0] blk,
  output logic             ready,
  output logic             op_done,
  // SDRAM pins
  output sdram_bus_cmd_e   sd_cmd,
  output logic [12:0]      sd_a,
  output logic [1:0]       sd_ba,
  output logic             sd_dq_oe,
  // data movement strobes
  output logic             rd_dv,
  output logic             xr_rd
);
  logic go;
  logic s_init, s_rd, s_wr, s_ref;
  logic b_init, b_rd, b_wr, b_ref;
  logic d_init, d_rd, d_wr, d_ref;
  sdram_bus_cmd_e c_init, c_rd, c_wr, c_ref;
  logic [12:0] a_init, a_rd, a_wr;
  logic [1:0]  ba_init, ba_rd, ba_wr;
  logic        wr_oe;

  assign go     = cmd_strobe && ready;
  assign s_init = go && cmd_code == CMD_INIT;
  assign s_rd   = go && cmd_code == CMD_READ;
  assign s_wr   = go && cmd_code == CMD_WRITE;
  assign s_ref  = go && cmd_code == CMD_REFRESH;
  assign ready  = !(b_init || b_rd || b_wr || b_ref);
  assign op_done = d_init || d_rd || d_wr || d_ref;

  sdram_init_core #(.WAIT_CYCLES(INIT_WAIT)) u_init (
    .clk, .rst, .start(s_init), .busy(b_init), .done(d_init), .cmd(c_init),
    .a(a_init), .ba(ba_init)
  );
  sdram_rd_core #(.BLK_W(BLK_W)) u_rd (
    .clk, .rst, .start(s_rd), .blk, .busy(b_rd), .done(d_rd), .cmd(c_rd),
    .a(a_rd), .ba(ba_rd), .rd_dv
  );
  sdram_wr_core #(.BLK_W(BLK_W)) u_wr (
    .clk, .rst, .start(s_wr), .blk, .busy(b_wr), .done(d_wr), .cmd(c_wr),
    .a(a_wr), .ba(ba_wr), .xr_rd, .dq_oe(wr_oe)
  );
  sdram_autoref_core u_ref (
    .clk, .rst, .start(s_ref), .busy(b_ref), .done(d_ref), .cmd(c_ref)
  );

  always_comb begin
    sd_cmd = SD_NOP; sd_a = '0; sd_ba = '0; sd_dq_oe = 1'b0;
    if (b_init)     begin sd_cmd = c_init; sd_a = a_init; sd_ba = ba_init; end
    else if (b_rd)  begin sd_cmd = c_rd;   sd_a = a_rd;   sd_ba = ba_rd;   end
    else if (b_wr)  begin sd_cmd = c_wr;   sd_a = a_wr;   sd_ba = ba_wr; sd_dq_oe = wr_oe; end
    else if (b_ref) begin sd_cmd = c_ref; end
  end

  // only one mini-block may run at a time
  assert property (@(posedge clk) disable iff (rst)
    $onehot0({b_init, b_rd, b_wr, b_ref}));
endmodule
