// tb_fea_top: end-to-end test of one Front End Assembly at the default
// sizes (three ADBs of two ELEFANT chips, 180-sample latency buffers, four
// event buffers everywhere).
// Every channel sees a repeating pulse with a discriminator hit, different
// per ADB, chip and channel; one channel never fires. The host sequence:
// board reset, load the FEX constants (one read back), the global
// corrections and a prefix-free encoding table, then triggers in four
// phases: FEX records with raw framing, FEX records Huffman coded, a burst
// of full waveforms (fills the event buffers so readout stalls and the
// chips drop triggers), and half-sampled waveforms after a configuration
// upset was reported. The 2-bit output link is decoded here into chip blocks
// and every block is compared with a reference computed from the stimulus:
// the 32-sample window LATENCY samples before its trigger, feature
// extraction, half sampling. Then the JTAG programmer runs a chunk and the
// image switch selects PROM 1 and reloads. Each mechanism is counted and
// must have happened. Finally the link bits per chip block are compared
// between modes: half sampling must nearly halve them and feature
// extraction must cut them at least four times, the reductions the readout
// upgrade was built for.
module tb_fea_top;
  import dch_pkg::*;
  localparam int LAT = 160;
  logic clk = 1'b0, rst_n = 1'b1;
  initial #1 rst_n = 1'b0;  // falling edge applies the asynchronous reset at once
  always #5 clk = ~clk;

  logic [2:0][1:0][7:0][7:0] fadc_i;
  logic [2:0][1:0][7:0]      tdc_hit_i;
  logic [2:0][1:0][7:0][6:0] tdc_i;
  logic cmd_valid = 1'b0;
  cmd_op_e cmd_op = CMD_NOP;
  logic [15:0] cmd_addr = '0;
  logic [23:0] cmd_data = '0, rd_data;
  logic rd_valid;
  logic [1:0] data_o;
  logic data_strobe_o, trig_link_o, tck_o, tms_o, tdi_o, tdo_i = 1'b0;
  logic cfg_valid_i = 1'b0, cfg_rb_i = 1'b0, cfg_prom_i = 1'b0;
  logic board_rst_i = 1'b1, prog_n_o, prom_sel_o;
  logic [5:0] elefant_overflow_o;
  logic trig_lost_o;
  logic [2:0] adb_stalled_o, fex_overrun_o;

  fea_top dut (.*);

  int checks = 0, failures = 0;
  task automatic chk(bit c, string m);
    checks++; if (!c) begin failures++; $display("FAIL %s", m); end
  endtask

  initial begin
    repeat (9_000_000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // ---------------- stimulus ----------------
  int nsamp = 0;
  function automatic bit f_hit(int n, int a, int c, int k);
    if (a == 0 && c == 0 && k == 7) return 1'b0;           // a dead channel
    return ((n + 3 * k + 7 * c + 11 * a) % 40) == 0;
  endfunction
  function automatic int f_fadc(int n, int a, int c, int k);
    int d;
    d = (n + 3 * k + 7 * c + 11 * a) % 40;
    if (d >= 1 && d <= 8) return (k == 0 && d == 1) ? 200 : 20 + 70 - 8 * d;
    return 12 + (k % 3);
  endfunction
  function automatic byte unsigned f_byte(int n, int a, int c, int k);
    int f;
    if (f_hit(n, a, c, k)) return 8'h80 | 8'((n * 5 + k) % 128);
    f = f_fadc(n, a, c, k);
    return (f > 127) ? 8'd127 : 8'(f);
  endfunction

  always_comb
    for (int a = 0; a < 3; a++) for (int c = 0; c < 2; c++) for (int k = 0; k < 8; k++) begin
      tdc_hit_i[a][c][k] = f_hit(nsamp, a, c, k);
      tdc_i[a][c][k]     = 7'((nsamp * 5 + k) % 128);
      fadc_i[a][c][k]    = 8'(f_fadc(nsamp, a, c, k));
    end
  always @(posedge clk) if (rst_n && dut.samp_en) nsamp <= nsamp + 1;

  // triggers as the chips see them
  int trig_n[4096];
  int ntrig = 0, nlost = 0, nlost_chip = 0, nstall = 0, noverrun = 0;
  always @(posedge clk) if (rst_n) begin
    if (dut.l1_acc) begin trig_n[ntrig] = nsamp; ntrig++; end
    if (trig_lost_o) nlost++;
    if (|elefant_overflow_o) nlost_chip++;
    if (|adb_stalled_o) nstall++;
    if (|fex_overrun_o) noverrun++;
  end

  // ---------------- host commands ----------------
  task automatic cmd(cmd_op_e op, logic [15:0] a, logic [23:0] d);
    @(negedge clk); cmd_valid = 1'b1; cmd_op = op; cmd_addr = a; cmd_data = d;
    @(negedge clk); cmd_valid = 1'b0; cmd_op = CMD_NOP;
  endtask
  task automatic cmd_read(cmd_op_e op, logic [15:0] a, output logic [23:0] d);
    cmd(op, a, 0);
    while (!rd_valid) @(posedge clk);
    #1 d = rd_data;
  endtask

  byte unsigned peds[48];
  shortint unsigned gains[48];
  logic [7:0] drift = 8'hFE, sat_corr = 8'd25;

  // ---------------- reference ----------------
  rd_mode_e cur_mode = MODE_FEX;
  bit cur_seu = 1'b0;
  function automatic void ref_block(int a, int c, int e, rd_mode_e m, ref shortint unsigned q[$], output logic [7:0] hm);
    byte unsigned w[8][32];
    int base;
    base = trig_n[e] - LAT;
    hm = '0;
    for (int k = 0; k < 8; k++) for (int i = 0; i < 32; i++) begin
      w[k][i] = f_byte(base + i, a, c, k);
      if (w[k][i][7]) hm[k] = 1'b1;
    end
    q.delete();
    for (int k = 0; k < 8; k++) begin
      if (m == MODE_RAW)
        for (int i = 0; i < 16; i++) q.push_back({w[k][2*i], w[k][2*i+1]});
      else if (m == MODE_HALF) begin
        byte unsigned h[16];
        for (int p = 0; p < 16; p++) h[p] = w[k][2*p][7] ? w[k][2*p] : w[k][2*p+1];
        for (int i = 0; i < 8; i++) q.push_back({h[2*i], h[2*i+1]});
      end else begin
        int lead, ntdc, sum, n, nsat, lastf, v, net, ci;
        longint prod;
        ci = a * 16 + c * 8 + k;
        ntdc = 0; lead = -1;
        for (int i = 0; i < 32; i++) if (w[k][i][7]) begin ntdc++; if (lead < 0) lead = i; end
        if (ntdc == 0) continue;
        sum = 0; n = 0; nsat = 0; lastf = 0;
        for (int i = 0; i < 32; i++) begin
          if (i >= lead) begin
            if (w[k][i][7]) begin
              bit lf, rf;
              lf = (i > 0) && !w[k][i-1][7];
              rf = (i < 31) && !w[k][i+1][7];
              if (lf && rf) v = (w[k][i-1] + w[k][i+1]) / 2;
              else if (lf) v = w[k][i-1];
              else if (rf) v = w[k][i+1];
              else v = lastf;
            end else begin
              v = w[k][i];
              if (v == 127) nsat++;
            end
            sum += v; n++;
          end
          if (!w[k][i][7]) lastf = w[k][i];
        end
        net  = sum - n * (int'(peds[ci]) + int'(signed'(drift))) + nsat * int'(sat_corr);
        prod = (longint'(net) * longint'(gains[ci])) >>> 8;
        if (prod < 0) prod = 0;
        if (prod > 65535) prod = 65535;
        q.push_back({nsat != 0, 3'(k), 6'(ntdc), 5'(lead), 1'b1});
        q.push_back(16'(prod));
        for (int i = 0; i < 32; i++) if (w[k][i][7]) q.push_back({4'b0, 5'(i), w[k][i][6:0]});
      end
    end
  endfunction

  // ---------------- output link decoder ----------------
  bit bits[$];
  always @(posedge clk) if (rst_n && data_strobe_o) begin
    #1 bits.push_back(data_o[1]); bits.push_back(data_o[0]);
  end
  function automatic bit take(); return bits.pop_front(); endfunction
  function automatic int dec_byte();
    int v;
    v = 0;
    if (take() == 1'b0) for (int i = 0; i < 4; i++) v = (v << 1) | take();
    else for (int i = 0; i < 8; i++) v = (v << 1) | take();
    return v;
  endfunction

  int npad = 0, nraw_fr = 0, ncoded_fr = 0;
  int nblocks = 0, nbad_blocks = 0, nfex_blk = 0, nraw_blk = 0, nhalf_blk = 0;
  int ninterleave = 0, ndropped_ch = 0, nseu_hdr = 0, nsat_rec = 0;
  int last_adb = -1;
  int open_chip[3] = '{-1, -1, -1};
  shortint unsigned blk[$];
  int need = 4;

  // link bits per chip block, by kind: 0 FEX raw framing, 1 FEX coded,
  // 2 full waveform, 3 half-sampled waveform
  int fr_bits = 0, blk_bits = 0;
  bit fr_coded = 1'b0, blk_coded = 1'b0;
  longint kind_bits[4] = '{0, 0, 0, 0};
  int kind_blks[4] = '{0, 0, 0, 0};

  task automatic got_word(shortint unsigned wd);
    blk.push_back(wd);
    blk_bits += fr_bits;
    blk_coded |= fr_coded;
    if (blk.size() == 4) need = 4 + blk[3];
    if (blk.size() == need) begin
      int a, c, e, bad;
      rd_mode_e m;
      logic [7:0] hm;
      shortint unsigned q[$];
      bad = 0;
      a = blk[0][8:7]; c = blk[0][6:5]; m = rd_mode_e'(blk[0][10:9]); e = blk[1][11:0];
      if (blk[0][15:12] != HDR_TAG || blk[1][15:12] != {2'(a), 2'(c)}) bad++;
      if (blk[0][11]) nseu_hdr++;
      if (m != cur_mode || blk[0][11] != cur_seu) bad++;
      ref_block(a, c, e, m, q, hm);
      if (blk[2] != {hm, 8'h00}) bad++;
      if (blk[3] != q.size()) bad++;
      else for (int i = 0; i < q.size(); i++) if (blk[4 + i] != q[i]) begin
        bad++;
        if (bad < 3) $display("  word %0d got %04x exp %04x", i, blk[4 + i], q[i]);
      end
      if (bad) $display("  hdr %04x %04x %04x %04x seu %0d", blk[0], blk[1], blk[2], blk[3], cur_seu);
      if (bad) begin
        nbad_blocks++;
        $display("bad block adb %0d chip %0d trig %0d mode %0d: %0d", a, c, e, m, bad);
      end
      if (m == MODE_FEX) begin
        nfex_blk++;
        for (int k = 0; k < 8; k++) if (!hm[k]) ndropped_ch++;
        for (int i = 4; i < blk.size(); i++) ;
      end else if (m == MODE_RAW) nraw_blk++;
      else nhalf_blk++;
      // chip 0 of an ADB followed by another ADB's block: interleaving
      if (last_adb >= 0 && last_adb != a && open_chip[last_adb] == 0) ninterleave++;
      open_chip[a] = (c == 0) ? 0 : -1;
      last_adb = a;
      nblocks++;
      begin
        int k;
        k = (m == MODE_FEX) ? (blk_coded ? 1 : 0) : (m == MODE_RAW) ? 2 : 3;
        kind_bits[k] += blk_bits; kind_blks[k]++;
      end
      blk_bits = 0; blk_coded = 1'b0;
      blk.delete(); need = 4;
    end
  endtask

  always @(negedge clk) begin
    while (bits.size() >= 40) begin
      bit b0, b1;
      b0 = take(); b1 = take();
      if (!b0 && !b1) npad++;
      else if (b0 && !b1) begin
        int v;
        v = 0;
        for (int i = 0; i < 16; i++) v = (v << 1) | take();
        nraw_fr++;
        fr_bits = 18; fr_coded = 1'b0;
        got_word(16'(v));
      end else if (b0 && b1) begin
        int hi, lo, n0;
        n0 = bits.size();
        hi = dec_byte(); lo = dec_byte();
        if (((n0 - bits.size()) % 2) == 1) void'(take());
        ncoded_fr++;
        fr_bits = 2 + n0 - bits.size(); fr_coded = 1'b1;
        got_word(16'((hi << 8) | lo));
      end else begin
        nbad_blocks++;   // '01' is not a valid frame start
      end
    end
  end

  // ---------------- trigger link ----------------
  int tl_state = 0, tl_n = 0, tl_frames = 0, tl_hit_frames = 0;
  logic [47:0] tl_sh;
  always @(posedge clk) if (rst_n) begin
    if (tl_state == 0) begin
      if (trig_link_o) begin tl_state = 1; tl_n = 0; end
    end else begin
      tl_sh = {tl_sh[46:0], trig_link_o}; tl_n++;
      if (tl_n == 48) begin
        tl_frames++; if (tl_sh != '0) tl_hit_frames++;
        tl_state = 0;
      end
    end
  end

  // ---------------- configuration stream with upsets ----------------
  task automatic cfg_frames(int nframes, bit upset);
    for (int f = 0; f < nframes; f++)
      for (int i = 0; i < 1024; i++) begin
        @(negedge clk);
        cfg_valid_i = 1'b1; cfg_prom_i = 1'((i * 7 + f) % 3 == 0);
        cfg_rb_i = cfg_prom_i ^ (upset && i == 100);
      end
    @(negedge clk); cfg_valid_i = 1'b0;
  endtask

  task automatic wait_blocks(int n, int limit);
    int t;
    t = 0;
    while (nblocks < n && t < limit) begin @(posedge clk); t++; end
    chk(nblocks == n, $sformatf("received %0d of %0d chip blocks", nblocks, n));
  endtask

  initial begin
    logic [23:0] d;
    int accepted;
    repeat (5) @(posedge clk);
    chk(!prog_n_o, "reset IC holds PROG at power-up");
    chk(prom_sel_o == 1'b0, "board reset selects PROM 0");
    rst_n = 1'b1;
    @(negedge clk); board_rst_i = 1'b0;
    // constants, globals, encoding table
    for (int i = 0; i < 48; i++) begin
      peds[i]  = 8'(10 + (i * 7) % 6);
      gains[i] = 16'(200 + i * 13);
      cmd(CMD_CONST_WR, 16'(i), {gains[i], peds[i]});
    end
    cmd_read(CMD_CONST_RD, 16'd29, d);
    chk(d == {gains[29], peds[29]}, "constant read-back");
    cmd(CMD_GLOBAL, 0, {8'h0, sat_corr, drift});
    for (int b = 0; b < 256; b++)
      cmd(CMD_ENC_WR, 16'(b), (b < 16) ? {4'h0, 4'd4, 16'(b)} : {4'h0, 4'd8, 16'(9'h100 | b)});
    cmd(CMD_MODE, 0, 24'(MODE_FEX));
    wait (nsamp >= 200);

    // phase A: FEX records, raw framing
    for (int t = 0; t < 3; t++) begin cmd(CMD_L1, 0, 0); repeat (3000) @(posedge clk); end
    wait_blocks(18, 200000);
    // phase B: FEX records, Huffman coded
    cmd(CMD_MODE, 0, 24'(MODE_FEX) | 24'h4);
    for (int t = 0; t < 2; t++) begin cmd(CMD_L1, 0, 0); repeat (3000) @(posedge clk); end
    wait_blocks(30, 200000);
    // phase C: burst of full waveforms
    cmd(CMD_MODE, 0, 24'(MODE_RAW));
    cur_mode = MODE_RAW;
    for (int t = 0; t < 12; t++) begin cmd(CMD_L1, 0, 0); repeat (300) @(posedge clk); end
    accepted = 6 * (12 - nlost);
    wait_blocks(30 + accepted, 1500000);
    // phase D: a configuration upset, then half-sampled waveforms
    cfg_frames(2, 1'b0);
    cfg_frames(1, 1'b1);
    cur_seu = 1'b1;
    cmd_read(CMD_STATUS_RD, 0, d);
    chk(d[15:0] == 16'd1, $sformatf("upset counter %0d", d[15:0]));
    cmd(CMD_MODE, 0, 24'(MODE_HALF));
    cur_mode = MODE_HALF;
    for (int t = 0; t < 2; t++) begin cmd(CMD_L1, 0, 0); repeat (3000) @(posedge clk); end
    wait_blocks(42 + accepted, 300000);

    // JTAG programmer: reset the TAP, clock Run-Test/Idle, end in Idle
    cmd(CMD_CHUNK_WR, 0, 24'h3000);
    cmd(CMD_CHUNK_WR, 1, 24'h4100);
    cmd(CMD_CHUNK_WR, 2, 24'd5);
    cmd(CMD_CHUNK_WR, 3, 24'h0000);
    cmd(CMD_PROG_START, 0, 0);
    repeat (400) @(posedge clk);
    cmd_read(CMD_STATUS_RD, 0, d);
    chk(d[22] && !d[23] && d[19:16] == 4'(TAP_IDLE), $sformatf("programmer status %06x", d));

    // image switch: PROM 1, then reload
    repeat (6_000_100) @(posedge clk) if (prog_n_o) break;
    chk(prog_n_o, "PROG released after the hold");
    cmd(CMD_IMG_SEL, 0, 24'h1);
    repeat (10) @(posedge clk);
    chk(prom_sel_o == 1'b1, "PROM 1 selected");
    cmd(CMD_RELOAD, 0, 0);
    repeat (2) @(posedge clk); #1;
    chk(!prog_n_o, "RELOAD drives PROG");

    // mechanisms
    $display("blocks %0d (fex %0d raw %0d half %0d), pads %0d, coded frames %0d, interleave %0d, dropped ch %0d",
             nblocks, nfex_blk, nraw_blk, nhalf_blk, npad, ncoded_fr, ninterleave, ndropped_ch);
    $display("lost triggers %0d (%0d chip events), stall cycles %0d, seu headers %0d, trigger frames %0d (%0d with hits)",
             nlost, nlost_chip, nstall, nseu_hdr, tl_frames, tl_hit_frames);
    chk(nbad_blocks == 0, $sformatf("%0d bad blocks", nbad_blocks));
    chk(npad > 0, "padding on underrun");
    chk(ncoded_fr > 0 && nraw_fr > 0, "raw and coded framing");
    chk(nfex_blk > 0 && nraw_blk > 0 && nhalf_blk > 0, "all three readout modes");
    chk(ninterleave > 0, "ADB switch after a chip");
    chk(ndropped_ch > 0, "channels without TDC hits dropped");
    chk(nstall > 0, "readout waits for a free event buffer");
    chk(nlost > 0, "trigger lost while the ELEFANT buffers are full");
    chk(nlost_chip == 0, "chips never overflow on their own");
    chk(noverrun == 0, "FEX engines keep up with the 15 MHz byte stream");
    chk(nseu_hdr > 0, "upset status bit in the data");
    chk(tl_hit_frames > 0, "trigger link frames");
    // data volume per chip block on the link, the figure the FEX exists for
    begin
      real avg[4];
      for (int k = 0; k < 4; k++) avg[k] = kind_blks[k] ? real'(kind_bits[k]) / real'(kind_blks[k]) : 0.0;
      $display("link bits per chip block: FEX %0.1f, FEX coded %0.1f, waveform %0.1f, half-sampled %0.1f",
               avg[0], avg[1], avg[2], avg[3]);
      $display("reduction against full waveforms: half %0.2f, FEX %0.2f, FEX coded %0.2f",
               avg[2] / avg[3], avg[2] / avg[0], avg[2] / avg[1]);
      chk(avg[2] / avg[3] > 1.9, "half sampling halves the data");
      chk(avg[2] / avg[0] > 4.0, "FEX reduces the data at least four times");
      chk(avg[1] < avg[0], "coding shortens FEX records");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
