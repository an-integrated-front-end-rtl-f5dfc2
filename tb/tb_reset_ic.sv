// tb_reset_ic: checks the power-up hold, that PROG stays low for exactly
// HOLD_CYCLES clocks after a request ends, and that a new request restarts
// the hold.
module tb_reset_ic;
  localparam int HOLD = 100;
  logic clk = 1'b0, trig = 1'b0, prog_n;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  reset_ic #(.HOLD_CYCLES(HOLD)) dut (.*);

  task automatic chk(bit c, string m);
    checks++; if (!c) begin failures++; $display("FAIL %s", m); end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic measure(output int n);
    n = 0;
    while (!prog_n) begin @(posedge clk); #1; n++; end
  endtask

  initial begin
    int n;
    #1 chk(!prog_n, "held at power-up");
    measure(n);
    chk(n == HOLD, $sformatf("power-up hold %0d", n));
    repeat (10) @(posedge clk);
    @(negedge clk); trig = 1'b1; #1 chk(!prog_n, "asserted with the request");
    repeat (3) @(negedge clk); trig = 1'b0;
    @(posedge clk); #1;
    measure(n);
    chk(n == HOLD - 1, $sformatf("hold %0d", n));
    @(negedge clk); trig = 1'b1; @(negedge clk); trig = 1'b0;
    repeat (50) @(negedge clk);
    trig = 1'b1; @(negedge clk); trig = 1'b0;
    @(posedge clk); #1;
    measure(n);
    chk(n == HOLD - 1, $sformatf("restarted hold %0d", n));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
