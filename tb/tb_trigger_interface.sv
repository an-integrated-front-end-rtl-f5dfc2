// tb_trigger_interface: six chips' trigger bytes change every 4 clocks; a
// receiver here finds each frame's start bit on the 1-bit link and checks
// the 48 bits of every frame against the OR of the bytes seen since the
// previous frame (one check per frame), and the frame spacing of PERIOD
// clocks.
module tb_trigger_interface;
  localparam int N = 6, PERIOD = 64;
  logic clk = 1'b0, rst_n = 1'b1;
  initial #1 rst_n = 1'b0;  // falling edge applies the asynchronous reset at once
  always #5 clk = ~clk;
  logic [N-1:0][7:0] trig_bytes_i = '0;
  logic link_o, frame_o;
  int checks = 0, failures = 0;

  trigger_interface #(.NCHIPS(N), .PERIOD(PERIOD)) dut (.*);

  initial begin
    repeat (50000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;
  always @(negedge clk) if (cyc % 4 == 0)
    for (int c = 0; c < N; c++) trig_bytes_i[c] = ($urandom_range(0, 5) == 0) ? 8'(1 << $urandom_range(0, 7)) : 8'h00;

  // reference accumulation, sampled at the same edges as the DUT
  logic [N-1:0][7:0] acc = '0;
  logic [N-1:0][7:0] expq[$];
  int pcnt = 0;
  always @(posedge clk) if (rst_n) begin
    if (pcnt == PERIOD - 1) begin
      expq.push_back(acc | trig_bytes_i); acc = '0; pcnt = 0;
    end else begin
      acc = acc | trig_bytes_i; pcnt++;
    end
  end

  // receiver
  int state = 0, nb = 0, nframes = 0, bad = 0, last_start = -1, badgap = 0;
  logic [8*N-1:0] sh;
  always @(posedge clk) if (rst_n) begin
    if (state == 0) begin
      if (link_o) begin
        state = 1; nb = 0;
        if (last_start >= 0 && cyc - last_start != PERIOD) badgap++;
        last_start = cyc;
      end
    end else begin
      sh = {sh[8*N-2:0], link_o}; nb++;
      if (nb == 8 * N) begin
        checks++;
        if (expq.size() == 0 || sh != expq[0]) begin
          bad++; failures++;
          $display("FAIL frame %0d: got %012x", nframes, sh);
        end
        if (expq.size()) void'(expq.pop_front());
        nframes++; state = 0;
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk); rst_n = 1'b1;
    repeat (PERIOD * 40) @(posedge clk);
    checks++; if (nframes < 38) begin failures++; $display("FAIL frames %0d", nframes); end
    checks++; if (badgap != 0) begin failures++; $display("FAIL frame spacing"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
