// tb_fex_const_ram: loads random constants into every channel, verifies
// them through the registered read-back port and through each engine's
// combinational port.
module tb_fex_const_ram;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic wr_en = 1'b0;
  logic [5:0] addr = '0;
  logic [23:0] wdata = '0, rdata;
  logic [2:0][5:0] eng_addr = '0;
  logic [2:0][23:0] eng_const;
  int checks = 0, failures = 0;
  logic [23:0] model [48];

  fex_const_ram dut (.*);

  initial begin
    repeat (10000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int i = 0; i < 48; i++) begin
      model[i] = 24'($urandom);
      @(negedge clk); wr_en = 1'b1; addr = 6'(i); wdata = model[i];
    end
    @(negedge clk); wr_en = 1'b0;
    for (int i = 0; i < 48; i++) begin
      @(negedge clk); addr = 6'(i);
      @(posedge clk); #1;
      checks++; if (rdata != model[i]) begin failures++; $display("FAIL verify %0d", i); end
    end
    for (int n = 0; n < 100; n++) begin
      for (int a = 0; a < 3; a++) eng_addr[a] = 6'($urandom_range(0, 47));
      #1;
      for (int a = 0; a < 3; a++) begin
        checks++; if (eng_const[a] != model[eng_addr[a]]) begin failures++; $display("FAIL engine %0d", a); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
