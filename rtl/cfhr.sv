// cfhr: Correlator Frame Header RAM, two banks (A = 0, B = 1) of DEPTH (240)
// words of W (16) bits. Software writes either bank through its own port
// (sw_*, on the software clock); the Station Unit output reads the readout
// bank on the back-end clock with one clock of latency. The readout bank
// toggles at every BOCF while the block is enabled, starting from bank B after
// reset, so the first BOCF reads bank A: even frames use A, odd frames B.
module cfhr #(
  parameter int unsigned DEPTH = 240,
  parameter int unsigned W     = 16,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic          sw_clk,
  input  logic          sw_we,
  input  logic          sw_bank,
  input  logic [AW-1:0] sw_addr,
  input  logic [W-1:0]  sw_wdata,
  input  logic          clk,
  input  logic          rst,
  input  logic          rclk_en,
  input  logic          en,
  input  logic          bocf_rise,
  input  logic [AW-1:0] raddr,
  output logic [W-1:0]  rdata,
  output logic          rd_bank
);
  logic [W-1:0] bank_a [DEPTH];
  logic [W-1:0] bank_b [DEPTH];

  // during the first RCLK of a BOCF the bank that is about to become the
  // readout bank is already read, so header word 0 comes from the new bank
  logic rd_sel;
  assign rd_sel = (en && bocf_rise) ? !rd_bank : rd_bank;

  always_ff @(posedge sw_clk) begin
    if (sw_we && sw_addr < AW'(DEPTH)) begin
      if (sw_bank) bank_b[sw_addr] <= sw_wdata;
      else         bank_a[sw_addr] <= sw_wdata;
    end
  end

  always_ff @(posedge clk) begin
    if (rst)                               rd_bank <= 1'b1;
    else if (rclk_en && en && bocf_rise)   rd_bank <= !rd_bank;
  end

  always_ff @(posedge clk) begin
    rdata <= rd_sel ? bank_b[raddr] : bank_a[raddr];
  end
endmodule
