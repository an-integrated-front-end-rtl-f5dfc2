// tb_prom_programmer: a behavioural TAP (16-state controller, 8-bit IR,
// 32-bit ID register for IR 0xFE, 1-bit bypass otherwise) stands in for the
// PROM. Runs a chunk with STATE, SIR, SDR with expected TDO and mask,
// RUNTEST and a shift that ends in Pause-DR, then checks the instruction
// and data seen by the TAP, the Run-Test/Idle clock count, the final state,
// done without error and the TCK period (TCK_DIV clocks plus at most
// eight clocks of handshake and decoding between bits). A second chunk expects a wrong ID
// and must end with error.
module tb_prom_programmer;
  import dch_pkg::*;
  localparam logic [31:0] ID = 32'hF504_6093;
  logic clk = 1'b0, rst_n = 1'b1;
  initial #1 rst_n = 1'b0;  // falling edge applies the asynchronous reset at once
  always #5 clk = ~clk;
  logic chunk_we = 1'b0, start = 1'b0, tck, tms, tdi, tdo = 1'b0, busy, done, error;
  logic [9:0] chunk_addr = '0;
  logic [15:0] chunk_wd = '0;
  tap_state_e tap;
  int checks = 0, failures = 0;

  prom_programmer dut (.*);

  task automatic chk(bit c, string m);
    checks++; if (!c) begin failures++; $display("FAIL %s", m); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // ---- behavioural TAP, written from the IEEE 1149.1 state diagram ----
  typedef enum {RESET, IDLE, SELDR, CAPDR, SHDR, EX1DR, PDR, EX2DR, UPDR,
                SELIR, CAPIR, SHIR, EX1IR, PIR, EX2IR, UPIR} ts_e;
  ts_e ts = RESET;
  logic [7:0] ir = 8'h01, ir_sh;
  logic [31:0] dr_sh;
  logic [31:0] dr_in;       // bits shifted in during the last DR scan
  int dr_n = 0, idle_clks = 0, nrise = 0;
  always @(posedge tck) begin
    nrise++;
    case (ts)
      SHIR: ir_sh = {tdi, ir_sh[7:1]};
      SHDR: begin
        dr_sh = (ir == 8'hFE) ? {tdi, dr_sh[31:1]} : {31'b0, tdi};
        dr_in = {tdi, dr_in[31:1]}; dr_n++;
      end
      IDLE: idle_clks++;
      default: ;
    endcase
    case (ts)
      RESET: ts = tms ? RESET : IDLE;
      IDLE:  ts = tms ? SELDR : IDLE;
      SELDR: ts = tms ? SELIR : CAPDR;
      CAPDR: begin dr_sh = (ir == 8'hFE) ? ID : 32'h0; dr_n = 0; dr_in = '0; ts = tms ? EX1DR : SHDR; end
      SHDR:  ts = tms ? EX1DR : SHDR;
      EX1DR: ts = tms ? UPDR : PDR;
      PDR:   ts = tms ? EX2DR : PDR;
      EX2DR: ts = tms ? UPDR : SHDR;
      UPDR:  ts = tms ? SELDR : IDLE;
      SELIR: ts = tms ? RESET : CAPIR;
      CAPIR: begin ir_sh = 8'h01; ts = tms ? EX1IR : SHIR; end
      SHIR:  ts = tms ? EX1IR : SHIR;
      EX1IR: ts = tms ? UPIR : PIR;
      PIR:   ts = tms ? EX2IR : PIR;
      EX2IR: ts = tms ? UPIR : SHIR;
      UPIR:  begin ir = ir_sh; ts = tms ? SELDR : IDLE; end
    endcase
  end
  always @(negedge tck) tdo <= (ts == SHIR) ? ir_sh[0] : (ts == SHDR) ? dr_sh[0] : 1'b0;

  // ---- chunk loading ----
  task automatic load(input logic [15:0] w[$]);
    for (int i = 0; i < w.size(); i++) begin
      @(negedge clk); chunk_we = 1'b1; chunk_addr = 10'(i); chunk_wd = w[i];
    end
    @(negedge clk); chunk_we = 1'b0;
  endtask

  task automatic run(output int cycles);
    @(negedge clk); start = 1'b1; @(negedge clk); start = 1'b0;
    cycles = 0;
    while (busy && cycles < 50000) begin @(posedge clk); #1; cycles++; end
  endtask

  int t_hi = 0, t_lo = 0, t_last = 0, badper = 0, cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;
  always @(posedge tck) begin if (t_last != 0 && (cyc - t_last < 4 || (cyc - t_last > 12 && busy))) badper++; t_last = cyc; end

  initial begin
    int cycles, r0, i0;
    logic [15:0] c1[$], c2[$];
    c1 = '{16'h3000,                                   // STATE RESET
           16'h1100, 16'd8, 16'h00FE,                  // SIR 8 TDI(FE) ENDIR IDLE
           16'h21C0, 16'd32, 16'h0000, 16'h0000,       // SDR 32 TDI(0)
           ID[15:0], ID[31:16], 16'hFFFF, 16'hFFFF,    //   TDO(ID) MASK(FFFFFFFF)
           16'h4100, 16'd10,                           // RUNTEST 10 TCK, end IDLE
           16'h2600, 16'd12, 16'h0ABC,                 // SDR 12 TDI(ABC) ENDDR DRPAUSE
           16'h0000};                                  // end of chunk
    c2 = '{16'h3100,                                   // STATE IDLE
           16'h21C0, 16'd32, 16'h0000, 16'h0000,
           16'h1234, 16'h5678, 16'hFFFF, 16'h0000,     // wrong ID, low half masked in
           16'h0000};
    repeat (3) @(posedge clk); rst_n = 1'b1;
    load(c1);
    r0 = nrise; i0 = idle_clks;
    run(cycles);
    chk(done && !error, "chunk 1 done without error");
    chk(ir == 8'hFE, $sformatf("instruction %02x", ir));
    chk(ts == PDR && tap == TAP_PAUSE_DR, "ends in Pause-DR");
    chk(dr_n == 12 && dr_in[31:20] == 12'hABC, $sformatf("last DR scan %0d bits %03x", dr_n, dr_in[31:20]));
    chk(idle_clks - i0 >= 10, "RUNTEST clocks in Run-Test/Idle");
    chk(badper == 0, "TCK period of 4 to 12 clocks while busy");
    chk(cycles >= 4 * (nrise - r0) && cycles <= 8 * (nrise - r0) + 100, $sformatf("time %0d for %0d TCK", cycles, nrise - r0));
    load(c2);
    run(cycles);
    chk(error && !done, "wrong ID detected");
    chk(!busy, "stopped after error");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
