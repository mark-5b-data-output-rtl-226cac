// tb_dom_front_end: the playback front end from the FPDP pins to the Xbar RAM
// read port, with short 68-word disk frames (64 data words), 4 frames per
// second, 8 bit streams (four samples per recorded word) and a permuting
// crossbar. The SDRAM side drains the Xbar RAM in bursts of 16 72-bit words
// with pauses, so the whole chain backs up and the FPDP source is suspended.
// Every sample read out is compared with a reference model of header removal,
// invalid-word marking, TOT tagging, unpacking and crossbar routing; the
// source never overruns the input FIFO; a frame with a bad SYNC word stops
// the stream with header_err.
module tb_dom_front_end;
  import dom_pkg::*;
  int checks = 0, failures = 0;
  task automatic chk(input bit c, input string m);
    checks++; if (!c) begin failures++; $display("FAIL: %s", m); end
  endtask
  localparam int FLEN = 68, FDATA = 64, FPS = 4;
  localparam logic [31:0] INV_SS = 32'h1111_2222, INV_DIM = 32'h3333_4444;
  logic fclk = 0, sclk = 0;
  always #15 fclk = ~fclk;
  always #6 sclk = ~sclk;
  logic frst = 1, srst = 1, en = 0;
  logic [4:0] xbar_sel [32];
  logic fpdp_dvalid_n = 1, fpdp_suspend_n, fpdp_nrdy_n;
  logic [31:0] fpdp_data = 0;
  logic header_err, tot_int, fpdp_overflow, pcal_v;
  logic [15:0] tot_count;
  logic [31:0] vlba_tc0, vlba_tc1;
  fe_word_t pcal_data;
  logic xr_rd = 0;
  logic [71:0] xr_data;
  logic [6:0] xr_avail72;
  dom_front_end #(.FRAME_LEN(FLEN), .XRAM_DEPTH72(64)) dut (
    .fclk, .frst, .en, .fps(16'(FPS)), .inv_ss(INV_SS), .inv_dim(INV_DIM),
    .unpack_code(3'd3), .xbar_sel, .fpdp_dvalid_n, .fpdp_data, .fpdp_suspend_n,
    .fpdp_nrdy_n, .header_err, .tot_int, .tot_count, .vlba_tc0, .vlba_tc1,
    .fpdp_overflow, .pcal_v, .pcal_data, .sclk, .srst, .xr_rd, .xr_data, .xr_avail72);

  function automatic logic [31:0] rec(int i);
    logic [31:0] w;
    if (i % 100 == 50) return INV_DIM;
    w = 32'(i) * 32'h9E37_79B1 ^ 32'h5A5A_0F0F;
    if (w == INV_SS || w == INV_DIM) w = ~w;
    return w;
  endfunction
  function automatic int xs(int b); return (b * 5 + 11) % 32; endfunction
  function automatic fe_word_t smp(int k);
    logic [31:0] w, u, x;
    int j;
    w = rec(k / 4); j = k % 4;
    u = w;
    for (int s = 0; s < j; s++) u = {u[31:24], u[31:8]};
    for (int b = 0; b < 32; b++) x[b] = u[xs(b)];
    return '{pad: 2'b00, tot: (j == 0) && ((k / 4) % (FPS * FDATA) == 0),
             valid: (k / 4) % 100 != 50, data: x};
  endfunction

  // source
  int widx = 0, nframes_to_send = 40, bad_frame = -1;
  logic susp_q = 1;
  int n_susp = 0;
  always @(posedge fclk) begin
    susp_q <= fpdp_suspend_n;
    if (!fpdp_suspend_n && en) n_susp++;
    if (en && susp_q && fpdp_suspend_n && widx < nframes_to_send * FLEN) begin
      int f, p;
      f = widx / FLEN; p = widx % FLEN;
      fpdp_dvalid_n <= 1'b0;
      unique case (p)
        0: fpdp_data <= (f == bad_frame) ? 32'h0BAD_0BAD : SYNC_WORD;
        1: fpdp_data <= 32'(f % FPS);
        2: fpdp_data <= 32'hC000_0000 + 32'(f);
        3: fpdp_data <= 32'hD000_0000 + 32'(f);
        default: fpdp_data <= rec(f * FDATA + p - 4);
      endcase
      widx++;
    end else fpdp_dvalid_n <= 1'b1;
  end
  // SDRAM-side reader: bursts of 16 when 16 are available, then a pause
  int k = 0, bad = 0, ntot = 0, ninv = 0, pause = 0, burst = 0;
  logic rd_q = 0;
  always @(posedge sclk) if (!srst) begin
    rd_q <= xr_rd;
    if (rd_q) begin
      fe_word_t lo, hi, el, eh;
      lo = xr_data[35:0]; hi = xr_data[71:36];
      el = smp(k); eh = smp(k + 1);
      if (lo != el || hi != eh) begin
        bad++; if (bad < 5) $display("sample %0d: %h %h exp %h %h", k, lo, hi, el, eh);
      end
      if (el.tot) ntot++;
      if (!el.valid) ninv++;
      k += 2;
    end
    if (burst > 0) begin burst--; xr_rd <= (burst > 1); end
    else if (pause > 0) begin pause--; xr_rd <= 1'b0; end
    else if (xr_avail72 >= 16) begin xr_rd <= 1'b1; burst = 16; pause = 120; end
  end
  int ntot_int = 0;
  always @(posedge fclk) if (tot_int) ntot_int++;
  initial begin
    repeat (2_000_000) @(posedge sclk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    for (int b = 0; b < 32; b++) xbar_sel[b] = 5'(xs(b));
    repeat (4) @(posedge sclk); frst = 0; srst = 0;
    @(posedge fclk); en <= 1;
    chk(1, "start");
    wait (widx == nframes_to_send * FLEN);
    repeat (12000) @(posedge sclk);
    chk(k >= 4 * FDATA * nframes_to_send - 64, $sformatf("samples read %0d", k));
    chk(bad == 0, $sformatf("samples match (%0d bad)", bad));
    chk(ntot == nframes_to_send / FPS && ntot_int == nframes_to_send / FPS && tot_count == 16'(nframes_to_send / FPS), "TOT tags and interrupts");
    chk(ninv > 0, "invalid words marked");
    chk(n_susp > 0 && !fpdp_overflow, "FPDP suspended without overflow");
    chk(vlba_tc0 == 32'hC000_0000 + 32'(nframes_to_send - FPS) && vlba_tc1 == 32'hD000_0000 + 32'(nframes_to_send - FPS), "time code words");
    chk(!header_err, "no header error");
    // a bad frame
    bad_frame = nframes_to_send; nframes_to_send += 2;
    repeat (3000) @(posedge fclk);
    chk(header_err, "bad SYNC raises header_err");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
