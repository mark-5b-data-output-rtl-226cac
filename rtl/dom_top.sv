// dom_top: Mark 5B Data Output Module, the playback configuration of the
// Mark 5B I/O board FPGA. Recorded VLBI data arrives from the disk system over
// FPDP (33 MHz), has its disk frame headers checked and removed, is unpacked
// and routed through a 32x32 bit-stream crossbar, buffered in an external
// SDRAM DIMM (80 MHz), and played out at RCLK through the VSI-H connector in
// one of four modes: Station Unit (correlator frames with headers and BOCF),
// VSI output, test vector generator or test vector receiver.
// Three clock domains: fpdp_clk_in (front end), sdram_clk_in (SDRAM interface
// and interrupt flags) and bclk_src (back end; the already-selected DPSCLK or
// internal clock, from which RCLK is divided). external_reset resets all.
// Software registers come in as the cfg struct and status goes out as stat,
// because the local-bus register map is not part of this design; the Correlator
// Frame Header RAM has its own write port on sw_clk. The SDRAM data bus is
// split into sdram_dq_out/oe/in. Data written into the Xbar RAM is brought out
// for a phase-calibration unit, whose interrupt enters as pc_int.
module dom_top
  import dom_pkg::*;
#(
  parameter int unsigned BLK_W     = 21,
  parameter int unsigned INIT_WAIT = 8000,
  parameter int unsigned REF_TICKS = 70,
  parameter int unsigned FRAME_LEN = dom_pkg::FRAME_WORDS
) (
  input  logic        external_reset,
  // FPDP
  input  logic        fpdp_clk_in,
  input  logic        fpdp_dvalid_n,
  input  logic [31:0] fpdp_data,
  output logic        fpdp_suspend_n,
  output logic        fpdp_nrdy_n,
  // SDRAM
  input  logic        sdram_clk_in,
  output logic        sdram_ras_n,
  output logic        sdram_cas_n,
  output logic        sdram_we_n,
  output logic        sdram_rege,
  output logic        sdram_s0_n,
  output logic        sdram_s2_n,
  output logic        sdram_cke,
  output logic [7:0]  sdram_dqmb,
  output logic [1:0]  sdram_ba,
  output logic [12:0] sdram_a,
  output logic [71:0] sdram_dq_out,
  output logic        sdram_dq_oe,
  input  logic [71:0] sdram_dq_in,
  // back end
  input  logic        bclk_src,
  input  logic        dps1pps,
  output logic [31:0] rbs,
  output logic        qvalid,
  output logic        rot1pps_bocf,
  output logic        rclk_out_board,
  output logic        r1pps,
  output logic        rotmon,
  output logic [1:0]  spare,
  // software side
  input  dom_cfg_t    cfg,
  output dom_stat_t   stat,
  input  logic [5:0]  int_clr,
  output logic        interrupt,
  input  logic        sw_clk,
  input  logic        cfhr_we,
  input  logic        cfhr_bank,
  input  logic [7:0]  cfhr_addr,
  input  logic [15:0] cfhr_wdata,
  // phase-cal connection
  output logic        pcal_v,
  output fe_word_t    pcal_data,
  input  logic        pc_int
);
  logic frst, srst, brst;
  logic [4:0] xsel [32];
  logic [71:0] xr_data;
  logic [6:0]  xr_avail72;
  logic xr_rd;
  logic header_err, tot_int, fpdp_ovf;
  logic cfdr_we;
  logic [6:0] cfdr_waddr, cfdr_raddr_w;
  be_word_t cfdr_wdata;
  logic restart_b, restart_s;
  logic startup_done, finished;
  logic rot_i, dom_i, cf_i, tvr_i;
  logic [5:0] src_s;
  logic hdr_q;
  logic vsi_jump, del_slip, su_fin, vsi_fin;

  rst_sync u_rf (.clk(fpdp_clk_in),  .arst(external_reset), .rst(frst));
  rst_sync u_rs (.clk(sdram_clk_in), .arst(external_reset), .rst(srst));
  rst_sync u_rb (.clk(bclk_src),     .arst(external_reset), .rst(brst));

  always_comb for (int i = 0; i < 32; i++) xsel[i] = cfg.xbar_sel[i];

  dom_front_end #(.FRAME_LEN(FRAME_LEN), .XRAM_DEPTH72(64)) u_fe (
    .fclk(fpdp_clk_in), .frst, .en(cfg.fe_en), .fps(cfg.disk_fps),
    .inv_ss(cfg.inv_ss), .inv_dim(cfg.inv_dim), .unpack_code(cfg.unpack_code),
    .xbar_sel(xsel), .fpdp_dvalid_n, .fpdp_data, .fpdp_suspend_n, .fpdp_nrdy_n,
    .header_err, .tot_int, .tot_count(stat.tot_count), .vlba_tc0(stat.vlba_tc0),
    .vlba_tc1(stat.vlba_tc1), .fpdp_overflow(fpdp_ovf), .pcal_v, .pcal_data,
    .sclk(sdram_clk_in), .srst, .xr_rd, .xr_data, .xr_avail72
  );

  sdram_xface #(.BLK_W(BLK_W), .INIT_WAIT(INIT_WAIT), .REF_TICKS(REF_TICKS)) u_sx (
    .clk(sdram_clk_in), .rst(srst), .en(cfg.sdram_en), .xr_avail72, .xr_rd,
    .xr_data, .restart(restart_s), .new_addr(cfg.sdram_addr[BLK_W+4:0]),
    .cfdr_we, .cfdr_waddr, .cfdr_wdata, .cfdr_raddr(cfdr_raddr_w),
    .sdram_ras_n, .sdram_cas_n, .sdram_we_n, .sdram_s0_n, .sdram_s2_n,
    .sdram_cke, .sdram_rege, .sdram_dqmb, .sdram_ba, .sdram_a, .sdram_dq_out,
    .sdram_dq_oe, .sdram_dq_in, .startup_done, .finished
  );

  dom_back_end u_be (
    .clk(bclk_src), .rst(brst), .cfg, .dps1pps, .wclk(sdram_clk_in), .wrst(srst),
    .cfdr_we, .cfdr_waddr, .cfdr_wdata, .cfdr_raddr_w, .sdram_finished(finished),
    .sw_clk, .cfhr_we, .cfhr_bank, .cfhr_addr, .cfhr_wdata, .rbs, .qvalid,
    .rot1pps_bocf, .r1pps, .rclk_out(rclk_out_board), .rotmon,
    .restart_pulse(restart_b), .rot1pps_int(rot_i), .dom1pps_int(dom_i),
    .cf_int(cf_i), .tvr_int(tvr_i), .cf_count(stat.cf_count),
    .tvr_sum(stat.tvr_sum), .tvr_bias(stat.tvr_bias), .vsi_jump, .del_slip,
    .su_fin, .vsi_fin
  );

  // restart event into the SDRAM clock domain
  pulse_sync u_ps_rst (.src_clk(bclk_src), .src_rst(brst), .src_pulse(restart_b),
                       .dst_clk(sdram_clk_in), .dst_rst(srst), .dst_pulse(restart_s));

  // interrupt sources into the SDRAM clock domain
  always_ff @(posedge fpdp_clk_in) begin
    if (frst) hdr_q <= 1'b0;
    else      hdr_q <= header_err;
  end
  pulse_sync u_ps_tot (.src_clk(fpdp_clk_in), .src_rst(frst), .src_pulse(tot_int),
                       .dst_clk(sdram_clk_in), .dst_rst(srst), .dst_pulse(src_s[INT_TOT]));
  pulse_sync u_ps_hdr (.src_clk(fpdp_clk_in), .src_rst(frst), .src_pulse(header_err && !hdr_q),
                       .dst_clk(sdram_clk_in), .dst_rst(srst), .dst_pulse(src_s[INT_HDR_ERR]));
  pulse_sync u_ps_rot (.src_clk(bclk_src), .src_rst(brst), .src_pulse(rot_i),
                       .dst_clk(sdram_clk_in), .dst_rst(srst), .dst_pulse(src_s[INT_ROT1PPS]));
  pulse_sync u_ps_dom (.src_clk(bclk_src), .src_rst(brst), .src_pulse(dom_i),
                       .dst_clk(sdram_clk_in), .dst_rst(srst), .dst_pulse(src_s[INT_DOM1PPS]));
  pulse_sync u_ps_cf  (.src_clk(bclk_src), .src_rst(brst), .src_pulse(cf_i),
                       .dst_clk(sdram_clk_in), .dst_rst(srst), .dst_pulse(src_s[INT_CF]));
  pulse_sync u_ps_tvr (.src_clk(bclk_src), .src_rst(brst), .src_pulse(tvr_i),
                       .dst_clk(sdram_clk_in), .dst_rst(srst), .dst_pulse(src_s[INT_TVR]));

  logic irq_dom;
  int_ctrl #(.N(6)) u_int (
    .clk(sdram_clk_in), .rst(srst), .src(src_s), .mask(cfg.int_mask), .clr(int_clr),
    .pending(stat.int_pending), .irq(irq_dom)
  );
  // the phase-cal unit's interrupt shares the pin
  assign interrupt = irq_dom || pc_int;

  assign stat.header_err    = header_err;
  assign stat.fpdp_overflow = fpdp_ovf;
  assign stat.startup_done  = startup_done;
  assign stat.finished      = finished;
  assign spare              = cfg.spare;
endmodule
