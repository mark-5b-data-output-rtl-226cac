// sdram_dimm_model: behavioural model of a registered 72-bit SDRAM DIMM for
// the testbenches. Commands, address and bank are latched at a rising edge
// (the DIMM input register), so a command on the pins in cycle n acts as if
// issued in cycle n+1. CAS latency 3 and burst length 8 follow the mode
// register value the interface loads; read data is therefore driven in cycles
// n+4 .. n+11 after a READ on the pins in cycle n, and write data is taken in
// cycles n+1 .. n+8 after a WRITE on the pins in cycle n. Storage is sparse
// (associative array keyed by {bank, row, column}). The model counts every
// command and flags protocol errors: ACT to an open bank, READ/WRITE to a
// closed bank, AREF with a bank open, commands before the mode register is
// loaded, and a mode register value other than CL 3 / BL 8 / sequential.
// DENSE = 1 replaces the sparse store by a full 2^25-word array, which is
// faster when the whole DIMM is written (reads of unwritten words are then
// not detected).
module sdram_dimm_model #(
  parameter bit DENSE = 1'b0
) (
  input  logic        clk,
  input  logic        s0_n,
  input  logic        ras_n,
  input  logic        cas_n,
  input  logic        we_n,
  input  logic [1:0]  ba,
  input  logic [12:0] a,
  input  logic [71:0] dq_out,
  input  logic        dq_oe,
  output logic [71:0] dq_in
);
  int n_act = 0, n_read = 0, n_write = 0, n_pre = 0, n_aref = 0, n_lmr = 0;
  int proto_err = 0, rd_unwritten = 0;
  logic [12:0] mode_reg = 'x;
  logic        mode_ok = 1'b0;
  logic [71:0] mem [logic [24:0]];
  logic [71:0] dmem [];
  initial if (DENSE) dmem = new[1 << 25];
  logic        open_b [4] = '{default: 1'b0};
  logic [12:0] row_b  [4];
  logic [71:0] rq [16];
  logic        rqv [16] = '{default: 1'b0};
  int          wr_left = 0;
  logic [24:0] wr_addr;
  task automatic perr(input string m);
    proto_err++;
    if (proto_err < 10) $display("DIMM protocol error at %0t: %s", $time, m);
  endtask
  always @(posedge clk) begin
    // read pipeline: slot 0 is the word for the cycle that starts now
    dq_in <= rqv[0] ? rq[0] : 'x;
    for (int i = 0; i < 15; i++) begin rq[i] = rq[i + 1]; rqv[i] = rqv[i + 1]; end
    rqv[15] = 1'b0;
    // write data of the cycle that ends now
    if (wr_left > 0) begin
      if (!dq_oe) perr("write data without dq_oe");
      if (DENSE) dmem[wr_addr] = dq_out; else mem[wr_addr] = dq_out;
      wr_addr[2:0] = wr_addr[2:0] + 1'b1;
      wr_left--;
    end
    if (!s0_n) begin
      unique case ({ras_n, cas_n, we_n})
        3'b011: begin  // ACT
          n_act++;
          if (!mode_ok) perr("ACT before LMR");
          if (open_b[ba]) perr("ACT to open bank");
          open_b[ba] = 1'b1; row_b[ba] = a;
        end
        3'b101: begin  // READ
          n_read++;
          if (!open_b[ba]) perr("READ to closed bank");
          for (int i = 0; i < 8; i++) begin
            logic [24:0] ad;
            ad = {row_b[ba], ba, a[9:3], 3'(a[2:0] + 3'(i))};
            rqv[2 + i] = 1'b1;
            if (DENSE) rq[2 + i] = dmem[ad];
            else if (mem.exists(ad)) rq[2 + i] = mem[ad];
            else begin rq[2 + i] = 'x; rd_unwritten++; end
          end
        end
        3'b100: begin  // WRITE
          n_write++;
          if (!open_b[ba]) perr("WRITE to closed bank");
          if (wr_left > 0) perr("WRITE during write burst");
          wr_addr = {row_b[ba], ba, a[9:0]};
          wr_left = 8;
        end
        3'b010: begin  // PRE
          n_pre++;
          if (a[10]) open_b = '{default: 1'b0}; else open_b[ba] = 1'b0;
        end
        3'b001: begin  // AREF
          n_aref++;
          if (open_b[0] | open_b[1] | open_b[2] | open_b[3]) perr("AREF with a bank open");
        end
        3'b000: begin  // LMR
          n_lmr++;
          mode_reg = a;
          mode_ok  = (a[6:4] == 3'd3) && (a[2:0] == 3'd3) && !a[3];
          if (!mode_ok) perr("mode register not CL3/BL8");
        end
        default: ;
      endcase
    end
  end
endmodule
