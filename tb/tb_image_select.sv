// tb_image_select: walks the image-switch sequence (reset selects PROM 0,
// SEL then LE selects PROM 1, SEL alone changes nothing, RELOAD requests
// PROG, reset returns to PROM 0) and checks the PROG request and the latch.
module tb_image_select;
  logic rst = 1'b1, reload = 1'b0, le = 1'b0, sel = 1'b0, prog_req, prom_sel;
  int checks = 0, failures = 0;

  image_select dut (.*);

  task automatic chk(bit c, string m);
    checks++; if (!c) begin failures++; $display("FAIL %s", m); end
  endtask

  initial begin
    #1000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    sel = 1'b1; #1;                       // reset forces PROM 0 even with SEL high
    chk(prom_sel == 1'b0 && prog_req, "reset: PROM 0, PROG requested");
    rst = 1'b0; sel = 1'b0; #1;
    chk(prom_sel == 1'b0 && !prog_req, "after reset");
    sel = 1'b1; #1;
    chk(prom_sel == 1'b0, "SEL without LE holds");
    le = 1'b1; #1;
    chk(prom_sel == 1'b1, "LE latches PROM 1");
    le = 1'b0; #1; sel = 1'b0; #1;
    chk(prom_sel == 1'b1, "latched after LE falls");
    reload = 1'b1; #1;
    chk(prog_req && prom_sel, "RELOAD requests PROG, PROM 1 kept");
    reload = 1'b0; rst = 1'b1; sel = 1'b1; #1;
    chk(prom_sel == 1'b0 && prog_req, "RST returns to PROM 0");
    rst = 1'b0; #1;
    chk(prom_sel == 1'b0 && !prog_req, "stays PROM 0");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
