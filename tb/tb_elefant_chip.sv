// tb_elefant_chip: drives eight channels with a known sample pattern (FADC
// values above full scale to exercise clipping, discriminator hits at known
// samples), sends five triggers in a row (four fit, the fifth must overflow),
// then reads the four events and compares every byte with the window taken
// LATENCY samples before each trigger, the SRAM2 header (hit mask under the
// channel enable, ancillary data) and the readout time (one byte per bus
// strobe). Also checks the per-sample trigger byte.
module tb_elefant_chip;
  import dch_pkg::*;
  localparam int LAT = 160, DEPTH = 180;
  logic clk = 1'b0, rst_n = 1'b1;
  initial #1 rst_n = 1'b0;  // falling edge applies the asynchronous reset at once
  always #5 clk = ~clk;
  logic samp_en, bus_en;
  logic [7:0][7:0] fadc_i;
  logic [7:0] tdc_hit_i;
  logic [7:0][6:0] tdc_i;
  logic trig_i = 1'b0, rd_start_i = 1'b0;
  logic [15:0] anc_i = '0;
  logic [7:0] ch_en_i = 8'hF7;
  logic [7:0] trig_byte_o, dout_o;
  logic ev_pending_o, dv_o, overflow_o, trig_ready_o;
  int checks = 0, failures = 0;
  int cyc = 0, nsamp = 0;

  elefant_chip #(.LB_DEPTH(DEPTH), .LATENCY(LAT)) dut (.*);

  task automatic chk(bit c, string m);
    checks++; if (!c) begin failures++; $display("FAIL %s", m); end
  endtask

  function automatic bit f_hit(int n, int c); return ((n * 7 + c * 5) % 23) == 0; endfunction
  function automatic byte unsigned f_byte(int n, int c);
    int f;
    if (f_hit(n, c)) return 8'h80 | 8'((n + c) % 128);
    f = (n * 3 + c * 11) % 200;
    return (f > 127) ? 8'd127 : 8'(f);
  endfunction

  always @(posedge clk) cyc <= cyc + 1;
  assign samp_en = (cyc % 4) == 0;
  assign bus_en  = (cyc % 4) == 2;
  always_comb for (int c = 0; c < 8; c++) begin
    tdc_hit_i[c] = f_hit(nsamp, c);
    tdc_i[c]     = 7'((nsamp + c) % 128);
    fadc_i[c]    = 8'((nsamp * 3 + c * 11) % 200);
  end
  always @(posedge clk) if (rst_n && samp_en) nsamp <= nsamp + 1;

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  int trig_n[5];
  int novf = 0;
  always @(posedge clk) if (overflow_o) novf++;

  initial begin
    repeat (3) @(posedge clk); rst_n = 1'b1;
    wait (nsamp == 250);
    // trigger byte of the latest sample
    @(negedge clk); @(posedge clk); #1;
    begin
      logic [7:0] e;
      for (int c = 0; c < 8; c++) e[c] = f_hit(nsamp - 1, c);
      chk(trig_byte_o == e, "trigger byte");
    end
    for (int t = 0; t < 5; t++) begin
      @(negedge clk);
      while ((cyc % 4) == 0) @(negedge clk);
      chk(trig_ready_o == (t < 4), $sformatf("trig_ready before trigger %0d", t));
      trig_i = 1'b1; anc_i = 16'hA500 + 16'(t); trig_n[t] = nsamp;
      @(negedge clk); trig_i = 1'b0;
      repeat (40) @(negedge clk);
    end
    chk(novf == 1, "fifth trigger overflows");
    for (int e = 0; e < 4; e++) begin
      automatic byte unsigned got[$];
      int t0, t1;
      logic [7:0] hm;
      chk(ev_pending_o, "event pending");
      @(negedge clk); rd_start_i = 1'b1; t0 = cyc; @(negedge clk); rd_start_i = 1'b0;
      while (got.size() < 259) begin
        @(posedge clk); #1;
        if (dv_o) begin got.push_back(dout_o); t1 = cyc; end
        if (cyc - t0 > 3000) break;
      end
      chk(got.size() == 259, "byte count");
      chk(t1 - t0 >= 258 * 4 && t1 - t0 <= 260 * 4, $sformatf("readout time %0d", t1 - t0));
      hm = '0;
      for (int c = 0; c < 8; c++)
        for (int i = 0; i < 32; i++) if (f_hit(trig_n[e] - LAT + i, c)) hm[c] = 1'b1;
      hm &= ch_en_i;
      chk(got[0] == hm, $sformatf("hit mask %02x exp %02x", got[0], hm));
      chk({got[1], got[2]} == 16'hA500 + 16'(e), "ancillary");
      begin
        int bad = 0;
        for (int c = 0; c < 8; c++)
          for (int i = 0; i < 32; i++)
            if (got[3 + c * 32 + i] != f_byte(trig_n[e] - LAT + i, c)) bad++;
        chk(bad == 0, $sformatf("event %0d: %0d sample bytes wrong", e, bad));
      end
      @(posedge clk); #1;
      chk(dout_o == 8'h00 && !dv_o, "bus idle after readout");
    end
    chk(!ev_pending_o, "no event left");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
