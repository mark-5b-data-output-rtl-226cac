// sdram_rd_core: reads one 1 kb block (16 words of 72 bits) from the DIMM.
// On start it runs a fixed 26-cycle program on the 80 MHz clock: ACTIVE of
// the block's row and bank at cycle 0, READ of columns +0 and +8 (two bursts
// of eight) at cycles 2 and 10, PRECHARGE ALL at cycle 22, done at cycle 25.
// With CAS latency CL and the one-cycle address/command register of the
// registered DIMM, read data is on the pins CL+1 cycles after each READ
// (cycles 6..21 for CL = 3); rd_dv marks those cycles so the receiver can
// register the bus. The word address of the block is {blk, 4'b0} and splits as
// row = [24:12], bank = [11:10], column = [9:0]. Cycle count, burst pair and
// precharge follow the design; the slot of each command is this design's own.
module sdram_rd_core
  import dom_pkg::*;
#(
  parameter int unsigned BLK_W = 21,
  parameter int unsigned CL    = 3
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
  output logic             rd_dv
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
  assign rd_dv = busy && (cnt >= 5'(2 + CL + 1)) && (cnt < 5'(2 + CL + 1 + 16));

  always_comb begin
    cmd = SD_NOP; a = '0; ba = waddr[11:10];
    if (busy) begin
      unique case (cnt)
        5'd0:  begin cmd = SD_ACT;  a = waddr[24:12]; end
        5'd2:  begin cmd = SD_READ; a = {3'b000, waddr[9:0]}; end
        5'd10: begin cmd = SD_READ; a = {3'b000, waddr[9:4], 4'd8}; end
        5'd22: begin cmd = SD_PRE;  a = 13'h0400; end   // A10 = all banks
        default: ;
      endcase
    end
  end
endmodule
