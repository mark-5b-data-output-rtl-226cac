// xbar: N x N bit-stream crossbar. Output stream i takes input stream sel[i];
// any input may feed several outputs. It is an array of N-to-1 multiplexers,
// one per output, each seeing all N inputs. The select values are the Xbar
// Slice Setting registers; their reset value (sel[i] = i) makes the crossbar
// straight-through, which the register block supplies. Combinational.
module xbar #(
  parameter int unsigned N  = 32,
  localparam int unsigned SW = $clog2(N)
) (
  input  logic [N-1:0]  din,
  input  logic [SW-1:0] sel [N],
  output logic [N-1:0]  dout
);
  always_comb begin
    for (int i = 0; i < N; i++) dout[i] = din[sel[i]];
  end
endmodule
