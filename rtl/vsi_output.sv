// vsi_output: VSI output sink of the back end (RCLK enable domain).
// With en and run set it starts at the first unsuppressed PPS: it waits
// RESTART_WAIT (90) RCLKs while the SDRAM interface refills the CFDR from the
// new read pointer, then fetches one CFDR word per RCLK through the delay
// generator and puts it on rbs two RCLKs later with qvalid = the word's
// validity. Each further unsuppressed PPS makes a discrete jump: qvalid drops,
// the 90-RCLK wait repeats and data resumes from the new pointer. If run is
// clear at an unsuppressed PPS the output goes idle; if the SDRAM has been
// emptied (finished) it enters FINISHED and stops. A first word after a jump
// leaves the pins 93 RCLKs after the PPS, which the timing subsystem's VSI
// PPS pipeline matches.
module vsi_output
  import dom_pkg::*;
#(
  parameter int unsigned RESTART_WAIT = 90
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        rclk_en,
  input  logic        en,
  input  logic        run,
  input  logic        unsup_pps,
  input  logic        finished,
  output logic        del_rd,
  input  be_word_t    cfdr_rdata,
  output logic [31:0] rbs,
  output logic        qvalid,
  output logic        active,
  output logic        fin,
  output logic        jump         // one RCLK pulse when a restart wait begins
);
  typedef enum logic [1:0] {S_IDLE, S_WAIT, S_RUN, S_FIN} state_e;
  state_e state;
  logic [$clog2(RESTART_WAIT+1)-1:0] cnt;
  logic k1;

  assign del_rd = state == S_RUN && !unsup_pps && !finished;
  assign active = state == S_RUN;
  assign fin    = state == S_FIN;

  always_ff @(posedge clk) begin
    if (rst || !en) begin
      state <= S_IDLE; cnt <= '0; k1 <= 1'b0; rbs <= '0; qvalid <= 1'b0;
      jump <= 1'b0;
    end else if (rclk_en) begin
      jump <= 1'b0;
      if (finished && state != S_IDLE) state <= S_FIN;
      else begin
        unique case (state)
          S_IDLE: if (unsup_pps && run) begin state <= S_WAIT; cnt <= '0; jump <= 1'b1; end
          S_WAIT, S_RUN: begin
            if (unsup_pps) begin
              if (run) begin state <= S_WAIT; cnt <= '0; jump <= 1'b1; end
              else state <= S_IDLE;
            end else if (state == S_WAIT) begin
              if (cnt == ($bits(cnt))'(RESTART_WAIT - 1)) state <= S_RUN;
              else cnt <= cnt + 1'b1;
            end
          end
          S_FIN: ;
          default: state <= S_IDLE;
        endcase
      end
      k1 <= del_rd;
      if (k1) begin rbs <= cfdr_rdata.data; qvalid <= cfdr_rdata.valid; end
      else    begin qvalid <= 1'b0; end
    end
  end
endmodule
