// sdram_arbiter: decides which SDRAM operation runs next and owns the buffer
// pointers. The DIMM is used as a ring of 2^BLK_W blocks of 1 kb (32 data
// words); wr_blk is the next block to fill from the Xbar RAM, rd_blk the next
// one to read for the receiver. After en it initialises the DIMM, then fills
// the ring from block 0 until only the last 1/32 is left (startup_done), then
// runs the main loop. Its states and their transitions are those of the
// arbiter state diagram:
//   INIT -> MODULE_INIT -> INIT_IDLE <-> {INIT_WRITE, INIT_REFRESH} -> IDLE
//   IDLE: FINISH > REFRESH > READ > WRITE     (decreasing priority)
//   READ -> READ_IDLE: FINISH > READ_REFRESH > WRITE > READ
//   WRITE -> IDLE, REFRESH -> IDLE, READ_REFRESH -> READ_IDLE
// WR COND: a whole block (16 x 72 bits) waits in the Xbar RAM. RD COND: the
// receiver has room for a block. A write is only made if at least one 1/32
// sector of the ring stays free ahead of the write pointer, so unread data is
// never overwritten ("sector conflict" otherwise). When the read pointer
// catches up with the write pointer the SDRAM is empty: FINISH, which is held
// until en drops. Refresh is requested every REF_TICKS ticks of a 10 MHz
// clock enable (7 us). A new read pointer (load_new_addr, a 32-bit word
// address) is taken in IDLE or READ_IDLE only, between operations, and
// announced to the receiver by bank_switch with the word offset in its block.
// Commands go to the SDRAM core with cmd_strobe and complete on op_done.
// The choice of 31/32 as the startup fill level and the exact free-space rule
// are this design's reading of the state diagram.
module sdram_arbiter
  import dom_pkg::*;
#(
  parameter int unsigned BLK_W     = 21,
  parameter int unsigned REF_TICKS = 70,
  localparam int unsigned AW       = BLK_W + 5   // 32-bit word address width
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             en,
  // Xbar RAM status (72-bit words stored)
  input  logic [6:0]       xr_avail72,
  // receiver
  input  logic             rx_room,
  output logic             bank_switch,
  output logic [4:0]       rd_offset,
  output logic             finished,
  // new read pointer
  input  logic             load_new_addr,
  input  logic [AW-1:0]    new_addr,
  // SDRAM core
  output sdram_cmd_e       cmd_code,
  output logic             cmd_strobe,
  output logic [BLK_W-1:0] cmd_blk,
  input  logic             ready,
  input  logic             op_done,
  // status
  output logic             startup_done,
  output logic [BLK_W-1:0] wr_blk,
  output logic [BLK_W-1:0] rd_blk
);
  typedef enum logic [3:0] {
    S_INIT, S_MODINIT, S_INIT_IDLE, S_INIT_WRITE, S_INIT_REFRESH,
    S_IDLE, S_REFRESH, S_READ, S_READ_IDLE, S_READ_REFRESH, S_WRITE, S_FINISH
  } state_e;
  state_e state;

  localparam logic [BLK_W-1:0] SECTOR    = BLK_W'(1) << (BLK_W - 5);
  localparam logic [BLK_W-1:0] INIT_FILL = '1 - SECTOR + 1'b1;

  logic [2:0]  div8;
  logic [$clog2(REF_TICKS+1)-1:0] ref_cnt;
  logic        ref_pend, ref_clr;
  logic        issued;
  logic        addr_pend, rd_started;
  logic [AW-1:0] addr_q;
  logic [BLK_W-1:0] unread, free_blk;
  logic        wr_cond, rd_cond, wr_ok, empty;

  assign unread   = wr_blk - rd_blk;
  assign free_blk = rd_started ? (rd_blk - wr_blk - 1'b1) : (INIT_FILL - wr_blk);
  assign empty    = rd_started && unread == '0;
  assign wr_cond  = xr_avail72 >= 7'd16;
  assign wr_ok    = wr_cond && (rd_started ? (free_blk > SECTOR) : (free_blk != '0));
  assign rd_cond  = rd_started && rx_room && !empty;
  assign finished = state == S_FINISH;

  // 10 MHz tick and 7 us refresh request
  always_ff @(posedge clk) begin
    if (rst || !en) begin
      div8 <= '0; ref_cnt <= '0; ref_pend <= 1'b0;
    end else begin
      div8 <= div8 + 1'b1;
      if (div8 == 3'd7) begin
        if (ref_cnt == ($bits(ref_cnt))'(REF_TICKS - 1)) begin
          ref_cnt <= '0; ref_pend <= 1'b1;
        end else ref_cnt <= ref_cnt + 1'b1;
      end
      if (ref_clr) ref_pend <= 1'b0;
    end
  end

  always_comb begin
    cmd_code = CMD_INIT;
    cmd_blk  = wr_blk;
    unique case (state)
      S_MODINIT:                                cmd_code = CMD_INIT;
      S_INIT_WRITE, S_WRITE:                    cmd_code = CMD_WRITE;
      S_READ:        begin cmd_code = CMD_READ; cmd_blk = rd_blk; end
      S_INIT_REFRESH, S_REFRESH, S_READ_REFRESH: cmd_code = CMD_REFRESH;
      default: ;
    endcase
  end

  logic op_state;
  assign op_state   = state inside {S_MODINIT, S_INIT_WRITE, S_INIT_REFRESH,
                                    S_REFRESH, S_READ, S_READ_REFRESH, S_WRITE};
  assign cmd_strobe = op_state && !issued && ready;
  assign ref_clr    = op_done && state inside {S_INIT_REFRESH, S_REFRESH, S_READ_REFRESH};

  always_ff @(posedge clk) begin
    if (rst || !en) begin
      state <= S_INIT; issued <= 1'b0; wr_blk <= '0; rd_blk <= '0;
      addr_pend <= 1'b0; addr_q <= '0; rd_started <= 1'b0;
      startup_done <= 1'b0; bank_switch <= 1'b0; rd_offset <= '0;
    end else begin
      bank_switch <= 1'b0;
      if (load_new_addr) begin addr_pend <= 1'b1; addr_q <= new_addr; end
      if (cmd_strobe) issued <= 1'b1;
      if (op_done)    issued <= 1'b0;

      unique case (state)
        S_INIT:         state <= S_MODINIT;
        S_MODINIT:      if (op_done) state <= S_INIT_IDLE;
        S_INIT_IDLE: begin
          if (wr_blk == INIT_FILL) begin
            state <= S_IDLE; startup_done <= 1'b1;
          end else if (ref_pend) state <= S_INIT_REFRESH;
          else if (wr_ok)        state <= S_INIT_WRITE;
        end
        S_INIT_WRITE:   if (op_done) begin wr_blk <= wr_blk + 1'b1; state <= S_INIT_IDLE; end
        S_INIT_REFRESH: if (op_done) state <= S_INIT_IDLE;
        S_IDLE, S_READ_IDLE: begin
          if (addr_pend && !load_new_addr) begin
            // take the new read pointer between operations
            rd_blk      <= addr_q[AW-1:5];
            rd_offset   <= addr_q[4:0];
            rd_started  <= 1'b1;
            bank_switch <= 1'b1;
            addr_pend   <= 1'b0;
          end else if (empty)                    state <= S_FINISH;
          else if (ref_pend)                     state <= (state == S_IDLE) ? S_REFRESH : S_READ_REFRESH;
          else if (state == S_IDLE && rd_cond)   state <= S_READ;
          else if (wr_ok)                        state <= S_WRITE;
          else if (rd_cond)                      state <= S_READ;
        end
        S_REFRESH:      if (op_done) state <= S_IDLE;
        S_READ_REFRESH: if (op_done) state <= S_READ_IDLE;
        S_READ:         if (op_done) begin rd_blk <= rd_blk + 1'b1; state <= S_READ_IDLE; end
        S_WRITE:        if (op_done) begin wr_blk <= wr_blk + 1'b1; state <= S_IDLE; end
        S_FINISH:       ;
        default:        state <= S_INIT;
      endcase
    end
  end
endmodule
