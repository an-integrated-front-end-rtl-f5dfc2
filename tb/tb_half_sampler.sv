// tb_half_sampler: random 32-sample channels through the half sampler; the
// expected 16 samples (TDC word of a pair if any, else the second FADC) are
// computed here and compared in order.
module tb_half_sampler;
  logic clk = 1'b0, rst_n = 1'b1;
  initial #1 rst_n = 1'b0;  // falling edge applies the asynchronous reset at once
  always #5 clk = ~clk;
  logic in_valid = 1'b0, first = 1'b0, out_valid;
  logic [7:0] in_data = '0, out_data;
  int checks = 0, failures = 0;
  byte unsigned expq[$];

  half_sampler dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  always @(posedge clk) if (out_valid) begin
    checks++;
    if (expq.size() == 0 || out_data != expq[0]) begin
      failures++; $display("FAIL got %02x exp %02x", out_data, expq.size() ? expq[0] : 8'h00);
    end
    if (expq.size()) void'(expq.pop_front());
  end

  initial begin
    byte unsigned w[32];
    int nout = 0;
    repeat (3) @(posedge clk); rst_n = 1'b1;
    for (int ch = 0; ch < 40; ch++) begin
      for (int i = 0; i < 32; i++)
        w[i] = ($urandom_range(0, 5) == 0) ? (8'h80 | 8'($urandom_range(0, 127))) : 8'($urandom_range(0, 127));
      for (int p = 0; p < 16; p++) expq.push_back(w[2*p][7] ? w[2*p] : w[2*p+1]);
      for (int i = 0; i < 32; i++) begin
        @(negedge clk); in_valid = 1'b1; first = (i == 0); in_data = w[i];
        @(negedge clk); in_valid = 1'b0; first = 1'b0;
        if ($urandom_range(0, 1)) @(negedge clk);
      end
    end
    repeat (5) @(posedge clk);
    checks++; if (expq.size() != 0) begin failures++; $display("FAIL %0d samples missing", expq.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
