// dom_back_end: the playback back end, on the selected back-end source clock
// with the RCLK clock enable. Data enters through the CFDR (written from the
// SDRAM clock domain) and is read, through the delay generator's skip/repeat
// addressing, by the sink of the current mode:
//   MODE_SU  - Station Unit output: CFHR headers during BOCF, then data
//   MODE_VSI - VSI output with discrete jumps at unsuppressed PPSes
//   MODE_TVG - test vector generator (no CFDR data)
//   MODE_TVR - test vector receiver (statistics, no output)
// The timing subsystem makes RCLK and the PPS copies; bocf_gen makes BOCF.
// The restart event (unsuppressed PPS, or BOCF in SU mode) clears the delay
// generator and is sent out (restart_pulse) to the SDRAM interface, which
// loads the new read pointer and refills the CFDR. Pin rules: rot1pps_bocf is
// the VSI PPS in VSI mode and BOCF in SU mode; r1pps is the VSI PPS in VSI
// mode and the TVG second mark in TVG mode; both are 0 otherwise.
module dom_back_end
  import dom_pkg::*;
#(
  parameter int unsigned VSI_PPS_PIPE = 93
) (
  input  logic        clk,
  input  logic        rst,
  input  dom_cfg_t    cfg,
  input  logic        dps1pps,
  // CFDR write port (SDRAM clock)
  input  logic        wclk,
  input  logic        wrst,
  input  logic        cfdr_we,
  input  logic [6:0]  cfdr_waddr,
  input  be_word_t    cfdr_wdata,
  output logic [6:0]  cfdr_raddr_w,
  input  logic        sdram_finished,    // SDRAM clock domain level
  // CFHR software port
  input  logic        sw_clk,
  input  logic        cfhr_we,
  input  logic        cfhr_bank,
  input  logic [7:0]  cfhr_addr,
  input  logic [15:0] cfhr_wdata,
  // outputs
  output logic [31:0] rbs,
  output logic        qvalid,
  output logic        rot1pps_bocf,
  output logic        r1pps,
  output logic        rclk_out,
  output logic        rotmon,
  output logic        restart_pulse,
  // interrupt pulses (this clock) and status
  output logic        rot1pps_int,
  output logic        dom1pps_int,
  output logic        cf_int,
  output logic        tvr_int,
  output logic [15:0] cf_count,
  output logic [31:0] tvr_sum,
  output logic [31:0] tvr_bias,
  // activity, for observation
  output logic        vsi_jump,
  output logic        del_slip,
  output logic        su_fin,
  output logic        vsi_fin
);
  logic rclk_en, pps, unsup_pps, vsi_pps, dom1pps;
  logic bocf, bocf_rise, bocf_out;
  logic [1:0] fin_s;
  logic finished;
  logic restart;
  logic del_in, del_out;
  logic [6:0] raddr;
  be_word_t cdata;
  logic [7:0] hraddr;
  logic [15:0] hrdata;
  logic su_rd, vsi_rd, tvr_rd;
  logic [31:0] su_rbs, vsi_rbs, tvg_rbs;
  logic su_q, vsi_q, tvg_q, tvg_pps;
  logic su_act, vsi_act, rd_bank, dom1pps_q;
  logic [4:0] tvr_cur;
  logic is_su, is_vsi, is_tvg, is_tvr;

  assign is_su  = cfg.mode == MODE_SU;
  assign is_vsi = cfg.mode == MODE_VSI;
  assign is_tvg = cfg.mode == MODE_TVG;
  assign is_tvr = cfg.mode == MODE_TVR;

  always_ff @(posedge clk) begin
    if (rst) fin_s <= '0;
    else     fin_s <= {fin_s[0], sdram_finished};
  end
  assign finished = fin_s[1];

  timing_subsys #(.PPS_PIPE(VSI_PPS_PIPE)) u_tim (
    .clk, .rst, .en(cfg.tim_en), .rclk_rate_code(cfg.rclk_rate_code),
    .use_internal_pps(cfg.use_internal_pps), .pps_div(cfg.pps_div),
    .suppress_pps(cfg.suppress_pps), .dps1pps, .rclk_en, .rclk_out, .pps,
    .unsup_pps, .vsi_pps, .dom1pps
  );

  bocf_gen u_bocf (
    .clk, .rst, .rclk_en, .en(cfg.bocf_en && is_su), .unsup_pps,
    .len_code(cfg.bocf_len_code), .low_cnt(cfg.bocf_low), .bocf, .bocf_rise,
    .bocf_out, .cf_count
  );

  assign restart       = is_su ? bocf_rise : unsup_pps;
  assign restart_pulse = restart && rclk_en;

  assign del_in = is_su ? su_rd : is_vsi ? vsi_rd : is_tvr ? tvr_rd : 1'b0;

  delay_gen #(.AW(7)) u_del (
    .clk, .rst, .rclk_en, .restart, .del_err(cfg.del_err),
    .del_rate(cfg.del_rate), .del_mode(cfg.del_mode), .rd_in(del_in),
    .rd_out(del_out), .raddr, .slip(del_slip)
  );

  cfdr #(.DEPTH(128)) u_cfdr (
    .wclk, .wrst, .we(cfdr_we), .waddr(cfdr_waddr), .wdata(cfdr_wdata),
    .raddr_w(cfdr_raddr_w), .rclk(clk), .rrst(rst), .re(del_out), .raddr,
    .rdata(cdata)
  );

  cfhr #(.DEPTH(240), .W(16)) u_cfhr (
    .sw_clk, .sw_we(cfhr_we), .sw_bank(cfhr_bank), .sw_addr(cfhr_addr),
    .sw_wdata(cfhr_wdata), .clk, .rst, .rclk_en, .en(cfg.cfhr_en), .bocf_rise,
    .raddr(hraddr), .rdata(hrdata), .rd_bank
  );

  su_output u_su (
    .clk, .rst, .rclk_en, .en(cfg.su_en && is_su), .run(cfg.suo_run), .unsup_pps,
    .bocf, .bocf_rise, .prescl(cfg.su_prescl), .finished, .cfhr_raddr(hraddr),
    .cfhr_rdata(hrdata), .del_rd(su_rd), .cfdr_rdata(cdata), .rbs(su_rbs),
    .qvalid(su_q), .active(su_act), .fin(su_fin)
  );

  vsi_output u_vsi (
    .clk, .rst, .rclk_en, .en(cfg.vsio_en && is_vsi), .run(cfg.vsio_run),
    .unsup_pps, .finished, .del_rd(vsi_rd), .cfdr_rdata(cdata), .rbs(vsi_rbs),
    .qvalid(vsi_q), .active(vsi_act), .fin(vsi_fin), .jump(vsi_jump)
  );

  tvg u_tvg (
    .clk, .rst, .rclk_en, .en(cfg.tvg_en && is_tvg), .pps, .unsup_pps,
    .rbs(tvg_rbs), .qvalid(tvg_q), .r1pps(tvg_pps)
  );

  tvr u_tvr (
    .clk, .rst, .rclk_en, .en(cfg.tvr_en && is_tvr), .finished,
    .bit_sel(cfg.tvr_bit), .del_rd(tvr_rd), .cfdr_rdata(cdata),
    .new_sums(tvr_int), .sum_err(tvr_sum), .bias(tvr_bias), .cur_bit(tvr_cur)
  );

  always_comb begin
    rbs = '0; qvalid = 1'b0; rot1pps_bocf = 1'b0; r1pps = 1'b0;
    unique case (cfg.mode)
      MODE_SU:  begin rbs = su_rbs;  qvalid = su_q;  rot1pps_bocf = bocf_out; end
      MODE_VSI: begin rbs = vsi_rbs; qvalid = vsi_q; rot1pps_bocf = vsi_pps; r1pps = vsi_pps; end
      MODE_TVG: begin rbs = tvg_rbs; qvalid = tvg_q; r1pps = tvg_pps; end
      default: ;
    endcase
  end

  assign rotmon = pps;
  // interrupt pulses, one clock each
  always_ff @(posedge clk) begin
    if (rst) dom1pps_q <= 1'b0;
    else     dom1pps_q <= dom1pps;
  end
  assign rot1pps_int = pps && rclk_en;
  assign dom1pps_int = dom1pps && !dom1pps_q;
  assign cf_int      = bocf_rise && rclk_en;
endmodule
