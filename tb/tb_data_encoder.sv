// tb_data_encoder: sends random words and padding, first raw then with a
// prefix-free table loaded (bytes below 16: '0' + 4 bits; others: '1' + 8
// bits). A receiver here decodes the 2-bit stream (taken every second
// clock) frame by frame and compares words and pads in order; it also
// checks the table read-back and that the link idles with '00'.
module tb_data_encoder;
  logic clk = 1'b0, rst_n = 1'b1;
  initial #1 rst_n = 1'b0;  // falling edge applies the asynchronous reset at once
  always #5 clk = ~clk;
  logic enc_en = 1'b0, pad_i = 1'b0, word_valid_i = 1'b0, word_ready_o, out_en;
  logic [15:0] word_i = '0;
  logic [1:0] dibit_o;
  logic tbl_we = 1'b0;
  logic [7:0] tbl_addr = '0;
  logic [19:0] tbl_wd = '0, tbl_rd;
  int checks = 0, failures = 0;

  data_encoder dut (.*);

  task automatic chk(bit c, string m);
    checks++; if (!c) begin failures++; $display("FAIL %s", m); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;
  assign out_en = (cyc % 2) == 0;

  // expected items: -1 = pad, else word; with the coding mode of each
  int expq[$];
  bit bits[$];
  always @(posedge clk) if (rst_n && out_en) begin
    // dibit_o updates on this edge; collect after it settles
    #1 bits.push_back(dibit_o[1]); bits.push_back(dibit_o[0]);
  end

  function automatic bit take(); bit b; b = bits.pop_front(); return b; endfunction
  function automatic int decode_byte();
    int v = 0;
    if (take() == 1'b0) begin for (int i = 0; i < 4; i++) v = (v << 1) | take(); end
    else begin for (int i = 0; i < 8; i++) v = (v << 1) | take(); end
    return v;
  endfunction

  int npad = 0, nraw = 0, ncoded = 0, bad = 0, skipped_idle = 0;
  // decoder runs when enough bits are buffered
  always @(negedge clk) begin
    while (bits.size() >= 40 && expq.size() > 0) begin
      bit b0, b1;
      b0 = take(); b1 = take();
      if (!b0 && !b1) begin
        if (expq[0] == -1) begin void'(expq.pop_front()); npad++; end
        else skipped_idle++;                      // idle between frames
      end else if (b0 && !b1) begin
        int v;
        v = 0;
        for (int i = 0; i < 16; i++) v = (v << 1) | take();
        if (expq[0] != v) begin bad++; if (bad < 4) $display("raw got %04x exp %0x", v, expq[0]); end
        void'(expq.pop_front()); nraw++;
      end else if (b0 && b1) begin
        int hi, lo, n;
        n = bits.size();
        hi = decode_byte(); lo = decode_byte();
        if (((n - bits.size()) % 2) == 1) void'(take());
        if (expq[0] != (hi << 8 | lo)) begin bad++; if (bad < 4) $display("coded got %04x exp %0x", hi<<8|lo, expq[0]); end
        void'(expq.pop_front()); ncoded++;
      end else bad++;
    end
  end

  task automatic send(bit pad, logic [15:0] w);
    @(negedge clk); word_valid_i = 1'b1; pad_i = pad; word_i = w;
    @(posedge clk); while (!word_ready_o) @(posedge clk);
    expq.push_back(pad ? -1 : int'(w));
    @(negedge clk); word_valid_i = 1'b0;
  endtask

  initial begin
    repeat (3) @(posedge clk); rst_n = 1'b1;
    repeat (10) @(posedge clk);
    chk(dibit_o == 2'b00, "idle link is padding");
    for (int n = 0; n < 200; n++) send($urandom_range(0, 4) == 0, 16'($urandom));
    // load the table and read it back
    for (int b = 0; b < 256; b++) begin
      @(negedge clk); tbl_we = 1'b1; tbl_addr = 8'(b);
      tbl_wd = (b < 16) ? {4'd4, 16'(b)} : {4'd8, 16'(9'h100 | b)};
    end
    @(negedge clk); tbl_we = 1'b0; tbl_addr = 8'h05; @(posedge clk); #1;
    chk(tbl_rd == {4'd4, 16'h0005}, "table read-back");
    wait (expq.size() == 0);
    @(negedge clk); enc_en = 1'b1;
    for (int n = 0; n < 300; n++) begin
      logic [15:0] w;
      w = 16'($urandom);
      if ($urandom_range(0, 1)) w[15:12] = 4'h0;
      if ($urandom_range(0, 1)) w[7:4] = 4'h0;
      send($urandom_range(0, 4) == 0, w);
    end
    for (int n = 0; n < 30; n++) send(1'b1, 16'h0);
    repeat (400) @(posedge clk);
    chk(expq.size() <= 1, $sformatf("%0d items not received", expq.size()));
    chk(bad == 0, $sformatf("%0d frames wrong", bad));
    chk(nraw > 100 && ncoded > 150 && npad > 60, $sformatf("raw %0d coded %0d pad %0d", nraw, ncoded, npad));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
