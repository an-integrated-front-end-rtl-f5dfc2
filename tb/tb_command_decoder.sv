// tb_command_decoder: issues every command and checks the settings, the
// one-clock strobes with their address/data, the SEL-before-LE order and LE
// length, RELOAD, and the read-back path (data and two-clock latency).
module tb_command_decoder;
  import dch_pkg::*;
  logic clk = 1'b0, rst_n = 1'b1;
  initial #1 rst_n = 1'b0;  // falling edge applies the asynchronous reset at once
  always #5 clk = ~clk;
  logic cmd_valid = 1'b0;
  cmd_op_e cmd_op = CMD_NOP;
  logic [15:0] cmd_addr = '0, addr_o;
  logic [23:0] cmd_data = '0, data_o, const_rd = 24'h123456, status_rd = 24'hABCDEF, rd_data;
  logic [19:0] tbl_rd = 20'h9_8765;
  rd_mode_e mode;
  logic enc_en, l1_trig, const_we, tbl_we, chunk_we, prog_start, seu_clr, sel, le, reload, rd_valid;
  logic [7:0] drift, sat_corr, ch_en;
  int checks = 0, failures = 0;

  command_decoder dut (.*);

  task automatic chk(bit c, string m);
    checks++; if (!c) begin failures++; $display("FAIL %s", m); end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic cmd(cmd_op_e op, logic [15:0] a, logic [23:0] d);
    @(negedge clk); cmd_valid = 1'b1; cmd_op = op; cmd_addr = a; cmd_data = d;
    @(negedge clk); cmd_valid = 1'b0; cmd_op = CMD_NOP;
  endtask

  // strobe counters
  int n_l1 = 0, n_cw = 0, n_tw = 0, n_kw = 0, n_ps = 0, n_sc = 0, n_le = 0, le_first_sel = -1;
  always @(posedge clk) begin
    if (l1_trig) n_l1++;
    if (const_we) begin n_cw++; if (addr_o != 16'd17 || data_o != 24'h00_ABCD) failures++; end
    if (tbl_we) n_tw++;
    if (chunk_we) n_kw++;
    if (prog_start) n_ps++;
    if (seu_clr) n_sc++;
    if (le) begin n_le++; if (le_first_sel < 0) le_first_sel = sel; end
  end

  initial begin
    repeat (3) @(posedge clk); rst_n = 1'b1;
    #1 chk(mode == MODE_FEX && !enc_en && ch_en == 8'hFF && !sel && !le && !reload, "reset values");
    cmd(CMD_L1, 0, 0); cmd(CMD_L1, 0, 0);
    cmd(CMD_MODE, 0, 24'h6);
    #1 chk(mode == MODE_HALF && enc_en, "mode");
    cmd(CMD_GLOBAL, 0, 24'h00_3CF6);
    #1 chk(drift == 8'hF6 && sat_corr == 8'h3C, "globals");
    cmd(CMD_CONST_WR, 16'd17, 24'h00_ABCD);
    cmd(CMD_ENC_WR, 16'h0005, 24'h4_0005);
    cmd(CMD_CHUNK_WR, 16'd3, 24'h1234);
    cmd(CMD_PROG_START, 0, 0);
    cmd(CMD_CHEN, 0, 24'h5A);
    #1 chk(ch_en == 8'h5A, "channel enable");
    cmd(CMD_SEU_CLR, 0, 0);
    cmd(CMD_IMG_SEL, 0, 24'h1);
    repeat (8) @(posedge clk);
    chk(sel && le_first_sel == 1 && n_le == 4, $sformatf("SEL then LE (%0d clocks)", n_le));
    cmd(CMD_RELOAD, 0, 0);
    repeat (5) @(posedge clk);
    chk(reload, "reload held");
    chk(n_l1 == 2 && n_cw == 1 && n_tw == 1 && n_kw == 1 && n_ps == 1 && n_sc == 1, "strobes");
    // read-backs
    begin
      logic [23:0] exp_d [3];
      cmd_op_e ops [3];
      logic [15:0] adr [3];
      exp_d = '{24'h123456, 24'h098765, 24'hABCDEF};
      ops = '{CMD_CONST_RD, CMD_ENC_WR, CMD_STATUS_RD};
      adr = '{16'h0, 16'h8005, 16'h0};
      for (int r = 0; r < 3; r++) begin
        int t;
        cmd(ops[r], adr[r], 0);
        t = 0;
        while (!rd_valid && t < 10) begin @(posedge clk); #1; t++; end
        chk(rd_valid && rd_data == exp_d[r], $sformatf("read-back %0d", r));
        chk(t <= 2, "read latency");
      end
      chk(n_tw == 1, "table read does not write");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
