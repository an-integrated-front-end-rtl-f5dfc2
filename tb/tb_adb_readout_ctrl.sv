// tb_adb_readout_ctrl: two behavioural ELEFANT chips answer rd_start with
// 259 bytes, one per 4 clocks. Checks the header words, every sample byte
// with its s_first/ch_first marks, that chip_done waits for the FEX engine to
// go idle, that commit follows the last chip, and that no readout starts
// while the buffer has no free slot.
module tb_adb_readout_ctrl;
  logic clk = 1'b0, rst_n = 1'b1;
  initial #1 rst_n = 1'b0;  // falling edge applies the asynchronous reset at once
  always #5 clk = ~clk;
  logic [1:0] ev_pending_i = '0, rd_start_o;
  logic [7:0] din_i = '0, s_data;
  logic dv_i = 1'b0, slot_free_i = 1'b1, fex_idle_i = 1'b1;
  logic chip_o, hdr_we, hdr_idx, s_valid, s_first, ch_first, chip_done, commit, busy;
  logic [15:0] hdr_wd;
  int checks = 0, failures = 0;

  adb_readout_ctrl dut (.*);

  task automatic chk(bit c, string m);
    checks++; if (!c) begin failures++; $display("FAIL %s", m); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  function automatic logic [7:0] bval(int e, int c, int k); return 8'(e * 31 + c * 17 + k * 5); endfunction

  int ev = 0;
  // chips: stream an event when started
  initial begin
    forever begin
      @(posedge clk);
      for (int c = 0; c < 2; c++) if (rd_start_o[c]) begin
        chk(ev_pending_i[c], "start only with a pending event");
        fork
          automatic int cc = c;
          begin
            repeat (2) @(negedge clk);
            for (int k = 0; k < 259; k++) begin
              din_i = bval(ev, cc, k); dv_i = 1'b1;
              @(negedge clk); din_i = '0; dv_i = 1'b0;
              repeat (3) @(negedge clk);
            end
            ev_pending_i[cc] = 1'b0;
          end
        join_none
      end
    end
  end

  // monitor
  int nsamp = 0, nfirst = 0, nchf = 0, nbad = 0, ndone = 0, ncommit = 0, nhdr = 0;
  always @(posedge clk) begin
    if (s_valid) begin
      if (s_data != bval(ev, chip_o, 3 + nsamp)) nbad++;
      if (s_first != (nsamp == 0)) nbad++;
      if (ch_first != ((nsamp % 32) == 0)) nbad++;
      nsamp++;
    end
    if (hdr_we) begin
      nhdr++;
      if (hdr_idx && hdr_wd != {bval(ev, chip_o, 0), 8'h00}) nbad++;
      if (!hdr_idx && hdr_wd != {bval(ev, chip_o, 1), bval(ev, chip_o, 2)}) nbad++;
    end
    if (chip_done) begin
      if (!fex_idle_i) nbad++;
      ndone++;
    end
    if (commit) ncommit++;
  end

  initial begin
    repeat (3) @(posedge clk); rst_n = 1'b1;
    // no free slot: nothing may start
    slot_free_i = 1'b0; ev_pending_i = 2'b11;
    repeat (50) @(posedge clk);
    chk(!busy, "waits for a free slot");
    for (int e = 0; e < 3; e++) begin
      ev = e; nsamp = 0;
      ev_pending_i = 2'b11; slot_free_i = 1'b1;
      wait (nsamp == 256);
      fex_idle_i = 1'b0;
      repeat (30) @(posedge clk);
      chk(ndone == 2 * e, "chip_done held while FEX busy");
      fex_idle_i = 1'b1;
      wait (chip_done); @(posedge clk); #1;
      nsamp = 0;
      wait (nsamp == 256);
      wait (commit); @(posedge clk); #1;
      chk(ncommit == e + 1 && ndone == 2 * e + 2, $sformatf("event %0d committed c=%0d d=%0d", e, ncommit, ndone));
    end
    chk(nbad == 0, $sformatf("%0d bad bytes/marks", nbad));
    chk(nhdr == 12, "header writes");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
