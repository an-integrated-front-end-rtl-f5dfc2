// tb_data_mux: three behavioural ADB buffers (one-clock read latency) hold
// events of two chips each. The receiver takes words with random stalls and
// checks every chip block (header fields, ancillary, hit mask, count, body),
// the chip order within an ADB, the release of each slot, that blocks of
// different ADBs interleave, that padding appears only while no buffer has
// data, and the FEX / waveform body choice in both modes.
module tb_data_mux;
  import dch_pkg::*;
  logic clk = 1'b0, rst_n = 1'b1;
  initial #1 rst_n = 1'b0;  // falling edge applies the asynchronous reset at once
  always #5 clk = ~clk;
  rd_mode_e mode = MODE_FEX;
  logic seu_flag = 1'b0;
  logic [2:0] rd_avail, release_slot;
  logic rd_chip;
  logic [1:0] rd_sel;
  logic [8:0] rd_addr;
  logic [2:0][15:0] rd_data;
  logic [2:0][8:0] fex_cnt;
  logic [2:0][7:0] wf_cnt;
  logic [15:0] word_o;
  logic pad_o, word_valid_o, word_ready_i = 1'b0, chip_switch_o;
  int checks = 0, failures = 0;

  data_mux dut (.*);

  task automatic chk(bit c, string m);
    checks++; if (!c) begin failures++; $display("FAIL %s", m); end
  endtask

  initial begin
    repeat (300000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // event contents are a function of (adb, event number, chip)
  function automatic int nfex(int a, int e, int c); return (a * 7 + e * 13 + c * 5) % 40; endfunction
  function automatic int nwf(int a, int e, int c);  return 64 + 64 * ((a + e + c) % 2); endfunction
  function automatic logic [15:0] word(int a, int e, int c, int sel, int k);
    return 16'(a * 10007 + e * 1009 + c * 101 + sel * 4001 + k);
  endfunction

  int avail[3];      // events queued per ADB
  int head[3];       // event number at the read slot
  always_comb for (int a = 0; a < 3; a++) begin
    rd_avail[a] = avail[a] > 0;
    fex_cnt[a]  = 9'(nfex(a, head[a], rd_chip));
    wf_cnt[a]   = 8'(nwf(a, head[a], rd_chip));
  end
  always @(posedge clk)
    for (int a = 0; a < 3; a++) begin
      rd_data[a] <= word(a, head[a], rd_chip, rd_sel, rd_addr);
      if (release_slot[a]) begin avail[a]--; head[a]++; end
    end

  always @(posedge clk) word_ready_i <= ($urandom_range(0, 3) != 0);

  // receiver
  int nexp_chip[3];
  int npad = 0, nblocks = 0, ninterleave = 0, lastadb = -1, bad = 0, pad_bad = 0;
  logic [15:0] blk[$];
  int need = 4;
  always @(posedge clk) if (word_valid_o && word_ready_i) begin
    if (pad_o) begin
      npad++;
      if (blk.size() != 0) pad_bad++;
      if (avail[0] + avail[1] + avail[2] > 0 && blk.size() == 0) ;  // may race a new arrival
    end else begin
      blk.push_back(word_o);
      if (blk.size() == 4) need = 4 + blk[3];
      if (blk.size() == need) begin
        int a, c, e;
        rd_mode_e m;
        a = blk[0][8:7]; c = blk[0][6:5]; m = rd_mode_e'(blk[0][10:9]);
        e = head[a];
        if (blk[0][15:12] != 4'hC || blk[0][11] != seu_flag || m != mode) bad++;
        if (c != nexp_chip[a]) bad++;
        if (blk[1] != word(a, e, c, 0, 0) || blk[2] != word(a, e, c, 0, 1)) bad++;
        if (blk[3] != ((m == MODE_FEX) ? nfex(a, e, c) : nwf(a, e, c))) bad++;
        for (int k = 0; k < blk[3]; k++)
          if (blk[4 + k] != word(a, e, c, (m == MODE_FEX) ? 1 : 2, k)) bad++;
        if (bad != 0 && nblocks < 30) $display("blk %0d a=%0d c=%0d e=%0d h=%04x %04x %04x %04x bad=%0d", nblocks, a, c, e, blk[0], blk[1], blk[2], blk[3], bad);
        nexp_chip[a] = (c + 1) % 2;
        if (lastadb >= 0 && a != lastadb && nexp_chip[lastadb] == 1) ninterleave++;
        lastadb = a;
        nblocks++;
        blk.delete(); need = 4;
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk); rst_n = 1'b1;
    repeat (50) @(posedge clk);
    chk(npad > 0, "padding while empty");
    @(negedge clk);
    avail[0] = 3; avail[1] = 1; avail[2] = 2;
    wait (avail[0] + avail[1] + avail[2] == 0);
    repeat (20) @(posedge clk);
    chk(nblocks == 12, $sformatf("blocks %0d", nblocks));
    @(negedge clk); mode = MODE_RAW; seu_flag = 1'b1;
    avail[1] = 2; avail[2] = 2;
    wait (avail[0] + avail[1] + avail[2] == 0);
    repeat (200) @(posedge clk);
    chk(nblocks == 20, $sformatf("blocks %0d", nblocks));
    chk(bad == 0, $sformatf("%0d bad words", bad));
    chk(pad_bad == 0, "no padding inside a block");
    chk(ninterleave > 0, "ADBs interleave chip by chip");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
