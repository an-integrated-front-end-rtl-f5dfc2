// tb_config_check: feeds identical read-back and PROM frames, then frames
// with one or two flipped bits, and checks the upset counter, the status
// flag, the frame counter, the CRC and bit-compare indications, and clear.
module tb_config_check;
  localparam int FB = 64;
  logic clk = 1'b0, rst_n = 1'b1;
  initial #1 rst_n = 1'b0;  // falling edge applies the asynchronous reset at once
  always #5 clk = ~clk;
  logic bit_valid = 1'b0, rb_bit = 1'b0, prom_bit = 1'b0, seu_clr = 1'b0;
  logic [15:0] seu_count, frames;
  logic seu_flag, bit_mismatch, crc_mismatch;
  int checks = 0, failures = 0;

  config_check #(.FRAME_BITS(FB)) dut (.*);

  task automatic chk(bit c, string m);
    checks++; if (!c) begin failures++; $display("FAIL %s", m); end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic frame(int nflip);
    int f1, f2;
    f1 = $urandom_range(0, FB - 1); f2 = (f1 + 1 + $urandom_range(0, FB - 2)) % FB;
    for (int i = 0; i < FB; i++) begin
      @(negedge clk);
      bit_valid = ($urandom_range(0, 3) != 0);
      while (!bit_valid) begin @(negedge clk); bit_valid = 1'b1; end
      prom_bit = 1'($urandom);
      rb_bit = prom_bit ^ ((nflip >= 1 && i == f1) || (nflip >= 2 && i == f2));
    end
    @(negedge clk); bit_valid = 1'b0;
  endtask

  initial begin
    repeat (3) @(posedge clk); rst_n = 1'b1;
    for (int n = 0; n < 5; n++) frame(0);
    #1 chk(seu_count == 0 && !seu_flag && frames == 5, "clean frames");
    frame(1);
    #1 chk(seu_count == 1 && seu_flag && bit_mismatch && crc_mismatch, "single upset");
    frame(0);
    #1 chk(seu_count == 1 && seu_flag && !bit_mismatch, "flag sticky");
    frame(2);
    #1 chk(seu_count == 2 && bit_mismatch, "double upset");
    @(negedge clk); seu_clr = 1'b1; @(negedge clk); seu_clr = 1'b0;
    #1 chk(seu_count == 0 && !seu_flag, "clear");
    for (int n = 0; n < 3; n++) frame(1);
    #1 chk(seu_count == 3 && frames == 11, "count and frames");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
