// tb_adb_buffer: fills event slots with random FEX, waveform and header
// words for two chips, checks slot_free drops after four committed events,
// then reads every word and count back in order and releases the slots.
module tb_adb_buffer;
  logic clk = 1'b0, rst_n = 1'b1;
  initial #1 rst_n = 1'b0;  // falling edge applies the asynchronous reset at once
  always #5 clk = ~clk;
  logic slot_free, rd_avail;
  logic wr_chip = 1'b0, fex_we = 1'b0, wf_we = 1'b0, hdr_we = 1'b0, hdr_idx = 1'b0;
  logic chip_done = 1'b0, commit = 1'b0, release_slot = 1'b0, rd_chip = 1'b0;
  logic [15:0] fex_wd = '0, wf_wd = '0, hdr_wd = '0, rd_data;
  logic [1:0] rd_sel = '0;
  logic [8:0] rd_addr = '0, fex_cnt;
  logic [7:0] wf_cnt;
  int checks = 0, failures = 0;

  adb_buffer dut (.*);

  task automatic chk(bit c, string m);
    checks++; if (!c) begin failures++; $display("FAIL %s", m); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // event e, chip c: nf FEX words, nw waveform words, word k = f(e,c,k)
  function automatic logic [15:0] fw(int e, int c, int k); return 16'(e * 4099 + c * 577 + k * 3); endfunction
  function automatic logic [15:0] ww(int e, int c, int k); return 16'(e * 911 + c * 37 + k * 7 + 16'h8000); endfunction
  int nf[8][2], nw[8][2];

  task automatic write_event(int e);
    for (int c = 0; c < 2; c++) begin
      nf[e][c] = $urandom_range(0, 272);
      nw[e][c] = (e % 2) ? 128 : 64;
      @(negedge clk); wr_chip = c[0];
      hdr_we = 1'b1; hdr_idx = 1'b0; hdr_wd = 16'(e * 16 + c);
      @(negedge clk); hdr_idx = 1'b1; hdr_wd = 16'(e * 16 + c + 8);
      @(negedge clk); hdr_we = 1'b0;
      for (int k = 0; k < 272; k++) begin
        fex_we = (k < nf[e][c]); fex_wd = fw(e, c, k);
        wf_we = (k < nw[e][c]); wf_wd = ww(e, c, k);
        @(negedge clk);
      end
      fex_we = 1'b0; wf_we = 1'b0; chip_done = 1'b1;
      @(negedge clk); chip_done = 1'b0;
    end
    commit = 1'b1; @(negedge clk); commit = 1'b0;
  endtask

  task automatic read_event(int e);
    for (int c = 0; c < 2; c++) begin
      int bad = 0;
      @(negedge clk); rd_chip = c[0];
      #1;
      chk(fex_cnt == 9'(nf[e][c]) && wf_cnt == 8'(nw[e][c]), "counts");
      for (int h = 0; h < 2; h++) begin
        rd_sel = 2'd0; rd_addr = 9'(h); @(posedge clk); #1;
        chk(rd_data == 16'(e * 16 + c + 8 * h), "header");
        @(negedge clk);
      end
      for (int k = 0; k < nf[e][c]; k++) begin
        rd_sel = 2'd1; rd_addr = 9'(k); @(posedge clk); #1;
        if (rd_data != fw(e, c, k)) bad++;
        @(negedge clk);
      end
      for (int k = 0; k < nw[e][c]; k++) begin
        rd_sel = 2'd2; rd_addr = 9'(k); @(posedge clk); #1;
        if (rd_data != ww(e, c, k)) bad++;
        @(negedge clk);
      end
      chk(bad == 0, $sformatf("event %0d chip %0d: %0d words wrong", e, c, bad));
    end
    release_slot = 1'b1; @(negedge clk); release_slot = 1'b0;
  endtask

  initial begin
    repeat (3) @(posedge clk); rst_n = 1'b1;
    chk(slot_free && !rd_avail, "empty after reset");
    for (int e = 0; e < 4; e++) write_event(e);
    #1 chk(!slot_free && rd_avail, "full after four events");
    read_event(0);
    #1 chk(slot_free, "slot free after release");
    write_event(4);
    for (int e = 1; e < 5; e++) read_event(e);
    #1 chk(!rd_avail && slot_free, "empty at end");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
