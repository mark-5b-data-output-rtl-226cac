// sdram_init_core: SDRAM power-up sequence and mode register load.
// On start: WAIT_CYCLES of NOP (100 us at 80 MHz), PRECHARGE ALL, two AUTO
// REFRESH commands nine cycles apart, then LOAD MODE REGISTER with
// 0000000110011 (sequential bursts of eight, CAS latency 3), and done three
// cycles later. The mode value and the 100 us wait are the design's; the
// order of the standard steps follows common SDRAM data sheets.
module sdram_init_core
  import dom_pkg::*;
#(
  parameter int unsigned WAIT_CYCLES = 8000,
  parameter logic [12:0] MODE_REG    = 13'b0000000110011
) (
  input  logic           clk,
  input  logic           rst,
  input  logic           start,
  output logic           busy,
  output logic           done,
  output sdram_bus_cmd_e cmd,
  output logic [12:0]    a,
  output logic [1:0]     ba
);
  localparam int unsigned T_PRE  = WAIT_CYCLES;
  localparam int unsigned T_REF1 = T_PRE + 3;
  localparam int unsigned T_REF2 = T_REF1 + 9;
  localparam int unsigned T_LMR  = T_REF2 + 9;
  localparam int unsigned T_END  = T_LMR + 3;
  localparam int unsigned CW     = $clog2(T_END + 1);
  logic [CW-1:0] cnt;

  always_ff @(posedge clk) begin
    if (rst) begin
      busy <= 1'b0; cnt <= '0;
    end else if (!busy) begin
      if (start) begin busy <= 1'b1; cnt <= '0; end
    end else begin
      cnt <= cnt + 1'b1;
      if (cnt == CW'(T_END)) busy <= 1'b0;
    end
  end
  assign done = busy && (cnt == CW'(T_END));

  always_comb begin
    cmd = SD_NOP; a = '0; ba = '0;
    if (busy) begin
      if (cnt == CW'(T_PRE))       begin cmd = SD_PRE; a = 13'h0400; end
      else if (cnt == CW'(T_REF1)) cmd = SD_AREF;
      else if (cnt == CW'(T_REF2)) cmd = SD_AREF;
      else if (cnt == CW'(T_LMR))  begin cmd = SD_LMR; a = MODE_REG; end
    end
  end
endmodule
