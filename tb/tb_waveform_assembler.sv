// tb_waveform_assembler: random bytes in, checks each 16-bit word is the
// byte pair in order (first byte high) and that `first` restarts pairing.
module tb_waveform_assembler;
  logic clk = 1'b0, rst_n = 1'b1;
  initial #1 rst_n = 1'b0;  // falling edge applies the asynchronous reset at once
  always #5 clk = ~clk;
  logic in_valid = 1'b0, first = 1'b0, wr_en;
  logic [7:0] in_data = '0;
  logic [15:0] wr_data;
  int checks = 0, failures = 0;
  shortint unsigned expq[$];

  waveform_assembler dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  always @(posedge clk) if (wr_en) begin
    checks++;
    if (expq.size() == 0 || wr_data != expq[0]) begin
      failures++; $display("FAIL got %04x", wr_data);
    end
    if (expq.size()) void'(expq.pop_front());
  end

  task automatic send(byte unsigned b, bit f);
    @(negedge clk); in_valid = 1'b1; first = f; in_data = b;
    @(negedge clk); in_valid = 1'b0; first = 1'b0;
  endtask

  initial begin
    byte unsigned b0, b1;
    repeat (3) @(posedge clk); rst_n = 1'b1;
    // a stray odd byte, then a restart with `first`
    send(8'hAA, 1'b0);
    for (int n = 0; n < 200; n++) begin
      b0 = 8'($urandom); b1 = 8'($urandom);
      expq.push_back({b0, b1});
      send(b0, (n % 16) == 0);
      send(b1, 1'b0);
    end
    repeat (5) @(posedge clk);
    checks++; if (expq.size() != 0) begin failures++; $display("FAIL missing words"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
