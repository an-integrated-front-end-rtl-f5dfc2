// tb_fex_engine: random waveforms (FADC bytes with TDC words mixed in,
// saturated samples, empty channels) through the feature-extraction engine.
// The expected words (status, charge, TDC hit list) are computed here from
// the algorithm's definition; channels without TDC words must produce
// nothing. Bytes arrive every 4 clocks, the readout bus rate, so the engine
// must keep up (no overrun). Random pedestals, gains, drift and saturation
// corrections.
module tb_fex_engine;
  import dch_pkg::*;
  logic clk = 1'b0, rst_n = 1'b1;
  initial #1 rst_n = 1'b0;  // falling edge applies the asynchronous reset at once
  always #5 clk = ~clk;
  logic s_valid = 1'b0, s_first = 1'b0;
  logic [7:0] s_data = '0;
  logic [2:0] const_ch;
  logic [7:0] ped, drift = '0, sat_corr = '0;
  logic [15:0] gain;
  logic wr_en, idle, overrun;
  logic [15:0] wr_data;
  int checks = 0, failures = 0;
  shortint unsigned expq[$];
  byte unsigned peds[8];
  shortint unsigned gains[8];

  fex_engine dut (.*);

  assign ped  = peds[const_ch];
  assign gain = gains[const_ch];

  initial begin
    repeat (400000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  always @(posedge clk) if (wr_en) begin
    checks++;
    if (expq.size() == 0 || wr_data != expq[0]) begin
      failures++; $display("FAIL got %04x exp %04x", wr_data, expq.size() ? expq[0] : 16'h0);
    end
    if (expq.size()) void'(expq.pop_front());
  end

  // reference feature extraction of one channel
  task automatic ref_fex(byte unsigned w[32], int ch);
    int lead, ntdc, sum, n, nsat, lastf, v, net, ch_q;
    longint prod;
    bit sat;
    ntdc = 0; lead = -1;
    for (int i = 0; i < 32; i++) if (w[i][7]) begin ntdc++; if (lead < 0) lead = i; end
    if (ntdc == 0) return;
    sum = 0; n = 0; nsat = 0; lastf = 0;
    for (int i = 0; i < 32; i++) begin
      if (i >= lead) begin
        if (w[i][7]) begin
          bit lf, rf;
          lf = (i > 0) && !w[i-1][7];
          rf = (i < 31) && !w[i+1][7];
          if (lf && rf) v = (w[i-1] + w[i+1]) / 2;
          else if (lf) v = w[i-1];
          else if (rf) v = w[i+1];
          else v = lastf;
        end else begin
          v = w[i];
          if (v == 127) nsat++;
        end
        sum += v; n++;
      end
      if (!w[i][7]) lastf = w[i];
    end
    net  = sum - n * (int'(peds[ch]) + int'(signed'(drift))) + nsat * int'(sat_corr);
    prod = (longint'(net) * longint'(gains[ch])) >>> 8;
    if (prod < 0) prod = 0;
    if (prod > 65535) prod = 65535;
    expq.push_back({nsat != 0, 3'(ch), 6'(ntdc), 5'(lead), 1'b1});
    expq.push_back(16'(prod));
    for (int i = 0; i < 32; i++) if (w[i][7]) expq.push_back({4'b0, 5'(i), w[i][6:0]});
  endtask

  int hit_ch = 0, empty_ch = 0, sat_ch = 0;
  initial begin
    byte unsigned w[32];
    repeat (3) @(posedge clk); rst_n = 1'b1;
    for (int chip = 0; chip < 12; chip++) begin
      drift    = 8'($urandom_range(0, 20)) - 8'd10;
      sat_corr = 8'($urandom_range(0, 60));
      for (int c = 0; c < 8; c++) begin
        peds[c]  = 8'($urandom_range(0, 30));
        gains[c] = 16'($urandom_range(64, 1024));
      end
      for (int c = 0; c < 8; c++) begin
        int kind;
        kind = $urandom_range(0, 5);
        for (int i = 0; i < 32; i++) begin
          if (kind == 0) w[i] = 8'($urandom_range(0, 40));                     // no hit
          else if (kind == 1) w[i] = ($urandom_range(0, 2) == 0) ? 8'(127) : 8'($urandom_range(0, 127)); // saturating
          else w[i] = 8'($urandom_range(0, 127));
          if (kind != 0 && $urandom_range(0, 6) == 0) w[i] = 8'h80 | 8'($urandom_range(0, 127));
        end
        if (kind == 5) for (int i = 10; i < 14; i++) w[i] = 8'h80 | 8'(i); // run of TDC words
        if (kind != 0 && !(w[3][7])) w[3] = 8'h85;                         // at least one hit
        if (kind == 0) empty_ch++; else hit_ch++;
        if (kind == 1) sat_ch++;
        ref_fex(w, c);
        for (int i = 0; i < 32; i++) begin
          @(negedge clk); s_valid = 1'b1; s_first = (c == 0 && i == 0); s_data = w[i];
          @(negedge clk); s_valid = 1'b0; s_first = 1'b0;
          repeat (2) @(negedge clk);
        end
      end
      // the engine is idle shortly after the last channel
      begin
        int t; t = 0;
        while (!idle && t < 200) begin @(posedge clk); t++; if (t==199) $display("st=%0d pend=%0d widx=%0d", dut.st, dut.pend, dut.widx); end
        checks++; if (!idle || t > 2 * 32 + 40) begin failures++; $display("FAIL idle after %0d", t); end
      end
    end
    repeat (10) @(posedge clk);
    checks++; if (expq.size() != 0) begin failures++; $display("FAIL %0d words missing", expq.size()); end
    checks++; if (overrun) begin failures++; $display("FAIL overrun"); end
    checks++; if (hit_ch == 0 || empty_ch == 0 || sat_ch == 0) begin failures++; $display("FAIL coverage"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
