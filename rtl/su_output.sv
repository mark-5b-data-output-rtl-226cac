// su_output: Station Unit output sink of the back end (RCLK enable domain).
// With en and run set it arms at the next unsuppressed PPS and starts at the
// following BOCF. In every correlator frame it sends header words from the
// CFHR while BOCF is high (word i = RCLK i / prescl of the frame, at most 239)
// and CFDR data words while BOCF is low, fetching one word from the delay
// generator every prescl RCLKs and holding it on the pins for prescl RCLKs.
// A 16-bit header word appears on both halves of rbs; header words are valid,
// data words carry their own validity into qvalid. If run is cleared the
// output stops at the end of the current frame (next BOCF). If the SDRAM has
// been emptied (finished) it enters FINISHED and stops. Output latency: a
// word chosen in RCLK t is on rbs in RCLK t+2, matched by bocf_gen's
// two-RCLK BOCF pipeline. Mapping of the header word onto the 32 output bits
// is this design's choice.
module su_output
  import dom_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic        rclk_en,
  input  logic        en,
  input  logic        run,
  input  logic        unsup_pps,
  input  logic        bocf,
  input  logic        bocf_rise,
  input  logic [3:0]  prescl,
  input  logic        finished,
  output logic [7:0]  cfhr_raddr,
  input  logic [15:0] cfhr_rdata,
  output logic        del_rd,
  input  be_word_t    cfdr_rdata,
  output logic [31:0] rbs,
  output logic        qvalid,
  output logic        active,
  output logic        fin
);
  typedef enum logic [1:0] {S_IDLE, S_ARMED, S_RUN, S_FIN} state_e;
  typedef enum logic [1:0] {K_NONE, K_HDR, K_DATA} kind_e;
  state_e      state;
  kind_e       k0, k1;
  logic [3:0]  pc, pmax;
  logic [7:0]  hidx;
  logic [15:0] h1;
  logic        go, hdr_phase;
  logic [3:0]  pc0;
  logic [7:0]  hidx0;

  assign pmax      = (prescl == '0) ? 4'd0 : prescl - 1'b1;
  // state for this RCLK: counters restart at a BOCF
  assign pc0       = bocf_rise ? '0 : pc;
  assign hidx0     = bocf_rise ? '0 : hidx;
  assign go        = (state == S_RUN) || (state == S_ARMED && bocf_rise);
  assign hdr_phase = bocf;
  assign cfhr_raddr = (hidx0 > 8'd239) ? 8'd239 : hidx0;
  assign del_rd    = go && !finished && !hdr_phase && pc0 == '0 && !(state == S_RUN && bocf_rise && !run);
  assign active    = state == S_RUN;
  assign fin       = state == S_FIN;

  always_comb begin
    k0 = K_NONE;
    if (go && !finished && !(state == S_RUN && bocf_rise && !run) && pc0 == '0)
      k0 = hdr_phase ? K_HDR : K_DATA;
  end

  always_ff @(posedge clk) begin
    if (rst || !en) begin
      state <= S_IDLE; pc <= '0; hidx <= '0; k1 <= K_NONE; h1 <= '0;
      rbs <= '0; qvalid <= 1'b0;
    end else if (rclk_en) begin
      // state
      unique case (state)
        S_IDLE:  if (run && unsup_pps) state <= S_ARMED;
        S_ARMED: if (finished) state <= S_FIN; else if (bocf_rise) state <= S_RUN;
        S_RUN:   if (finished) state <= S_FIN; else if (bocf_rise && !run) state <= S_IDLE;
        S_FIN:   ;
        default: state <= S_IDLE;
      endcase
      // counters
      if (go) begin
        if (pc0 == pmax) begin
          pc <= '0;
          if (hdr_phase) hidx <= hidx0 + 1'b1;
        end else begin
          pc   <= pc0 + 1'b1;
          hidx <= hidx0;
        end
      end
      // pipeline: stage 1 holds the header word, stage 2 drives the pins
      k1 <= k0;
      h1 <= cfhr_rdata;
      unique case (k1)
        K_HDR:  begin rbs <= {h1, h1}; qvalid <= 1'b1; end
        K_DATA: begin rbs <= cfdr_rdata.data; qvalid <= cfdr_rdata.valid; end
        default: if (!go) begin rbs <= '0; qvalid <= 1'b0; end
      endcase
    end
  end
endmodule
