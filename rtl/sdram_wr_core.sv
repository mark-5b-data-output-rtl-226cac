// sdram_wr_core: writes one 1 kb block (16 words of 72 bits) to the DIMM.
// On start it runs a fixed 26-cycle program on the 80 MHz clock: ACTIVE at
// cycle 0, WRITE of columns +0 and +8 (bursts of eight) at cycles 2 and 10,
// PRECHARGE ALL at cycle 21, done at cycle 25. The registered DIMM delays
// command and address by one clock but not the data, so write data is driven
// in cycles 3..18. The data comes from the Xbar RAM: xr_rd is raised in cycles
// 2..17 and the RAM's one-cycle read latency places each word on dq_out in
// the following cycle, with dq_oe high. Address split as in sdram_rd_core.
// The 26-cycle length and burst pair follow the design; the command slots
// are this design's own.
module sdram_wr_core
  import dom_pkg::*;
#(
  parameter int unsigned BLK_W = 21
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             start,
  input  logic [BLK_W-1:0] blk,
  output logic             busy,
  output logic             done,
  output sdram_bus_cmd_e   cmd,
  output logic [12:0]      a,
  output logic [1:0]       ba,
  output logic             xr_rd,
  output logic             dq_oe
);
  localparam int unsigned OP_CYCLES = 26;
  logic [4:0]  cnt;
  logic [24:0] waddr;
  logic [BLK_W-1:0] blk_q;

  assign waddr = {blk_q, 4'b0};

  always_ff @(posedge clk) begin
    if (rst) begin
      busy <= 1'b0; cnt <= '0; blk_q <= '0;
    end else if (!busy) begin
      if (start) begin busy <= 1'b1; cnt <= '0; blk_q <= blk; end
    end else begin
      cnt <= cnt + 1'b1;
      if (cnt == 5'(OP_CYCLES - 1)) busy <= 1'b0;
    end
  end

  assign done  = busy && (cnt == 5'(OP_CYCLES - 1));
  assign xr_rd = busy && (cnt >= 5'd2) && (cnt <= 5'd17);
  assign dq_oe = busy && (cnt >= 5'd3) && (cnt <= 5'd18);

  always_comb begin
    cmd = SD_NOP; a = '0; ba = waddr[11:10];
    if (busy) begin
      unique case (cnt)
        5'd0:  begin cmd = SD_ACT;   a = waddr[24:12]; end
        5'd2:  begin cmd = SD_WRITE; a = {3'b000, waddr[9:0]}; end
        5'd10: begin cmd = SD_WRITE; a = {3'b000, waddr[9:4], 4'd8}; end
        5'd21: begin cmd = SD_PRE;   a = 13'h0400; end
        default: ;
      endcase
    end
  end
endmodule
