// dom_pkg: types and constants shared by the Mark 5B playback (DOM) datapath.
// The 36-bit front-end word (32 data bits, a validity tag, a taken-on-tick
// tag and two pad bits) and the 34-bit back-end word follow the datapath
// description. The disk-frame SYNC word, the SDRAM command encodings and the
// test-vector pattern polynomial are this design's own choices (marked below).
package dom_pkg;

  // Disk frame: 4 header words followed by 2500 data words.
  localparam int unsigned FRAME_WORDS = 2504;
  localparam int unsigned HDR_WORDS   = 4;
  // Disk frame header SYNC word (Mark 5B recording format value).
  localparam logic [31:0] SYNC_WORD   = 32'hABAD_DEED;

  // Front-end word: 36 bits, as carried through the FIFOs and the Xbar RAM.
  typedef struct packed {
    logic [1:0]  pad;
    logic        tot;    // taken-on-tick: first data word of a recorded second
    logic        valid;  // cleared when the word matched an invalid code word
    logic [31:0] data;
  } fe_word_t;

  // Back-end word: 34 bits, as stored in the CFDR.
  typedef struct packed {
    logic        tot;
    logic        valid;
    logic [31:0] data;
  } be_word_t;

  // Command code passed from the SDRAM Arbiter to the SDRAM Core.
  typedef enum logic [1:0] {
    CMD_INIT    = 2'd0,
    CMD_READ    = 2'd1,
    CMD_WRITE   = 2'd2,
    CMD_REFRESH = 2'd3
  } sdram_cmd_e;

  // SDRAM bus command, {cs_n, ras_n, cas_n, we_n} (JEDEC SDR encoding).
  typedef enum logic [3:0] {
    SD_NOP   = 4'b0111,
    SD_ACT   = 4'b0011,
    SD_READ  = 4'b0101,
    SD_WRITE = 4'b0100,
    SD_PRE   = 4'b0010,
    SD_AREF  = 4'b0001,
    SD_LMR   = 4'b0000,
    SD_DESEL = 4'b1111
  } sdram_bus_cmd_e;

  // Output mode of the back end.
  typedef enum logic [1:0] {
    MODE_SU  = 2'd0,
    MODE_VSI = 2'd1,
    MODE_TVG = 2'd2,
    MODE_TVR = 2'd3
  } dom_mode_e;

  // Test-vector pattern: a 32-bit Galois LFSR (x^32+x^22+x^2+x+1), one step
  // per output word, restarted from TVG_SEED at each second. Shared by the
  // generator and the receiver so that both agree on the sequence.
  localparam logic [31:0] TVG_SEED = 32'hFFFF_FFFF;
  function automatic logic [31:0] tvg_next(input logic [31:0] s);
    logic [31:0] n;
    n = {1'b0, s[31:1]};
    if (s[0]) n = n ^ 32'h8020_0003;
    return n;
  endfunction

  // Software register values, as the top level receives them. Field names
  // follow the register and bit-field names of the design.
  typedef struct packed {
    // front end
    logic             fe_en;          // FPDP interface and Strip-header enable
    logic [15:0]      disk_fps;       // Disk Frames per Second
    logic [31:0]      inv_ss;         // StreamStor Invalid Reg0/1
    logic [31:0]      inv_dim;        // DIM Invalid Reg0/1
    logic [2:0]       unpack_code;    // log2(active bit streams)
    logic [31:0][4:0] xbar_sel;       // Xbar Slice Setting Regs
    // SDRAM interface
    logic             sdram_en;
    logic [25:0]      sdram_addr;     // SDRAM Address0/1: 32-bit word pointer
    // back end
    dom_mode_e        mode;
    logic             tim_en;         // timing subsystem enable
    logic [2:0]       rclk_rate_code;
    logic             use_internal_pps;
    logic [31:0]      pps_div;        // RCLKs per second - 1
    logic             suppress_pps;   // System PPS Suppress Register
    logic             bocf_en;
    logic [1:0]       bocf_len_code;  // 240/480/960/1920 RCLKs
    logic [31:0]      bocf_low;       // BOCF deassertion time
    logic             su_en;
    logic             suo_run;
    logic [3:0]       su_prescl;
    logic             cfhr_en;
    logic             vsio_en;
    logic             vsio_run;
    logic             tvg_en;
    logic             tvr_en;
    logic [4:0]       tvr_bit;        // TVR Bit to Sum Reg
    logic [31:0]      del_err;        // Delay Error Reg0/1
    logic [17:0]      del_rate;       // Delay Rate Reg0/1
    logic             del_mode;       // <del_gen_mode>
    logic [5:0]       int_mask;       // 1 = masked
    logic [1:0]       spare;
  } dom_cfg_t;

  // Interrupt sources, bit positions in int_mask / int_pending.
  localparam int unsigned INT_TOT = 0, INT_ROT1PPS = 1, INT_DOM1PPS = 2,
                          INT_CF  = 3, INT_TVR = 4, INT_HDR_ERR = 5;

  typedef struct packed {
    logic        header_err;
    logic        fpdp_overflow;
    logic        startup_done;
    logic        finished;
    logic [15:0] tot_count;
    logic [31:0] vlba_tc0;
    logic [31:0] vlba_tc1;
    logic [15:0] cf_count;
    logic [31:0] tvr_sum;
    logic [31:0] tvr_bias;
    logic [5:0]  int_pending;
  } dom_stat_t;

endpackage
