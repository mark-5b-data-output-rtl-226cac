// sdram_autoref_core: one SDRAM auto refresh. On start it issues AUTO REFRESH
// in its first cycle and NOPs after, and reports done in the ninth cycle, so
// the operation takes nine 80 MHz clocks as the design specifies.
module sdram_autoref_core
  import dom_pkg::*;
(
  input  logic           clk,
  input  logic           rst,
  input  logic           start,
  output logic           busy,
  output logic           done,
  output sdram_bus_cmd_e cmd
);
  localparam int unsigned OP_CYCLES = 9;
  logic [3:0] cnt;
  always_ff @(posedge clk) begin
    if (rst) begin
      busy <= 1'b0; cnt <= '0;
    end else if (!busy) begin
      if (start) begin busy <= 1'b1; cnt <= '0; end
    end else begin
      cnt <= cnt + 1'b1;
      if (cnt == 4'(OP_CYCLES - 1)) busy <= 1'b0;
    end
  end
  assign done = busy && (cnt == 4'(OP_CYCLES - 1));
  assign cmd  = (busy && cnt == '0) ? SD_AREF : SD_NOP;
endmodule
