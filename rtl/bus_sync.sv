// bus_sync: request/acknowledge synchroniser for a multi-bit value that may
// jump arbitrarily (such as the CFDR read address, which the delay generator
// advances by 0, 1 or 2 and clears). The source captures its value into a
// holding register whenever the previous transfer has been acknowledged and
// flips a request toggle; the destination loads the held value when it sees
// the toggle change and returns it as the acknowledge. The destination thus
// always holds a value the source really had, a few clocks old.
module bus_sync #(
  parameter int unsigned W = 8
) (
  input  logic         src_clk,
  input  logic         src_rst,
  input  logic [W-1:0] src_val,
  input  logic         dst_clk,
  input  logic         dst_rst,
  output logic [W-1:0] dst_val
);
  logic         req, ack_m, ack_s;
  logic [W-1:0] hold;
  logic         req_m, req_s, req_q;

  always_ff @(posedge src_clk) begin
    if (src_rst) begin
      req <= 1'b0; hold <= '0; ack_m <= 1'b0; ack_s <= 1'b0;
    end else begin
      ack_m <= req_q; ack_s <= ack_m;
      if (ack_s == req) begin
        hold <= src_val;
        req  <= !req;
      end
    end
  end
  always_ff @(posedge dst_clk) begin
    if (dst_rst) begin
      req_m <= 1'b0; req_s <= 1'b0; req_q <= 1'b0; dst_val <= '0;
    end else begin
      req_m <= req; req_s <= req_m; req_q <= req_s;
      if (req_s != req_q) dst_val <= hold;
    end
  end
endmodule
