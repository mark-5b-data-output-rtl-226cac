// sdram_xface: the SDRAM Interface on the 80 MHz clock: arbiter, core (with
// its four mini-blocks) and receiver. Data from the Xbar RAM is written to
// the external registered ECC DIMM in 1 kb blocks and read back in 1 kb
// blocks for the back end's CFDR, keeping the DIMM a large playback buffer.
// restart (an unsuppressed PPS or BOCF, already brought into this clock
// domain) both loads new_addr as the next read pointer and makes the receiver
// restart the CFDR. The DIMM pins are plain command/address outputs and a data
// bus split into dq_out, dq_oe and dq_in; the ECC byte is carried as data.
module sdram_xface
  import dom_pkg::*;
#(
  parameter int unsigned BLK_W     = 21,
  parameter int unsigned INIT_WAIT = 8000,
  parameter int unsigned REF_TICKS = 70
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          en,
  // Xbar RAM
  input  logic [6:0]    xr_avail72,
  output logic          xr_rd,
  input  logic [71:0]   xr_data,
  // read pointer / restart
  input  logic          restart,
  input  logic [BLK_W+4:0] new_addr,
  // CFDR write side
  output logic          cfdr_we,
  output logic [6:0]    cfdr_waddr,
  output be_word_t      cfdr_wdata,
  input  logic [6:0]    cfdr_raddr,
  // DIMM
  output logic          sdram_ras_n,
  output logic          sdram_cas_n,
  output logic          sdram_we_n,
  output logic          sdram_s0_n,
  output logic          sdram_s2_n,
  output logic          sdram_cke,
  output logic          sdram_rege,
  output logic [7:0]    sdram_dqmb,
  output logic [1:0]    sdram_ba,
  output logic [12:0]   sdram_a,
  output logic [71:0]   sdram_dq_out,
  output logic          sdram_dq_oe,
  input  logic [71:0]   sdram_dq_in,
  // status
  output logic          startup_done,
  output logic          finished
);
  sdram_cmd_e       cmd_code;
  logic             cmd_strobe, ready, op_done, rd_dv;
  logic [BLK_W-1:0] cmd_blk, wr_blk, rd_blk;
  logic             rx_room, bank_switch, arb_finished;
  logic [4:0]       rd_offset;
  sdram_bus_cmd_e   sd_cmd;

  sdram_arbiter #(.BLK_W(BLK_W), .REF_TICKS(REF_TICKS)) u_arb (
    .clk, .rst, .en, .xr_avail72, .rx_room, .bank_switch, .rd_offset,
    .finished(arb_finished), .load_new_addr(restart), .new_addr,
    .cmd_code, .cmd_strobe, .cmd_blk, .ready, .op_done, .startup_done,
    .wr_blk, .rd_blk
  );

  sdram_core #(.BLK_W(BLK_W), .INIT_WAIT(INIT_WAIT)) u_core (
    .clk, .rst, .cmd_code, .cmd_strobe, .blk(cmd_blk), .ready, .op_done,
    .sd_cmd, .sd_a(sdram_a), .sd_ba(sdram_ba), .sd_dq_oe(sdram_dq_oe),
    .rd_dv, .xr_rd
  );

  sdram_receiver u_rx (
    .clk, .rst, .rd_dv, .dq_in(sdram_dq_in), .bank_switch, .rd_offset,
    .arb_finished, .rx_room, .restart, .cfdr_we, .cfdr_waddr, .cfdr_wdata,
    .cfdr_raddr, .finished
  );

  assign sdram_s0_n   = sd_cmd[3];
  assign sdram_s2_n   = sd_cmd[3];
  assign sdram_ras_n  = sd_cmd[2];
  assign sdram_cas_n  = sd_cmd[1];
  assign sdram_we_n   = sd_cmd[0];
  assign sdram_cke    = !rst;
  assign sdram_rege   = 1'b1;
  assign sdram_dqmb   = '0;
  assign sdram_dq_out = xr_data;
endmodule
