// fea_top: readout of one Front End Assembly of the drift chamber with the
// feature-extracting readout FPGA.
//
// NADB amplifier/digitizer boards (ADBs) carry NCHIP ELEFANT chips each; the
// chips' digitized samples are ports (the amplifiers and the FADC/TDC are
// analog). One clock, clk = 60 MHz, with strobes derived from it: samples at
// 15 MHz (SAMP_DIV), the ELEFANT readout bus at 15 MHz (BUS_DIV), the 2-bit
// output link at 30 MHz (OUT_DIV); the trigger link runs at clk.
// Data path: a level-1 trigger (CMD_L1) makes every chip copy its 32-sample
// window into an event buffer. Each ADB unit then reads the event from its
// chips, extracts features (status, charge, TDC hits) with the channel
// constants from the FEX constants RAM, assembles waveforms, and buffers
// up to four events. The data multiplexer sends one chip block at a time
// from the ADBs in round robin, padding when none has data, and the data
// encoder puts the words on the 2-bit link (raw or Huffman coded).
// Trigger path: the chips' trigger bytes are serialised on trig_link_o.
// Control: the command decoder, the JTAG PROM programmer (tck/tms/tdi/tdo to
// the upload PROM), the configuration check (seu status bit in every chip
// header), and the board's image-select latch and reset IC (prog_n, the
// FPGA's PROG; prom_sel, which PROM configures it).
// The ancillary data each chip stores is {adb[1:0], chip[1:0], trigger
// count[11:0]} (this design's choice). A trigger is passed to the chips only
// when all of them can store it, else trig_lost_o pulses (this design's
// choice: it keeps the chips' event buffers in step).
// Monitoring outputs: elefant_overflow_o (a chip dropped a trigger, never
// expected given the rule above), trig_lost_o, adb_stalled_o (an ADB waits
// for a free event slot) and fex_overrun_o (a FEX engine fell behind the
// byte stream; at the default BUS_DIV = 4 a channel takes 128 clocks to
// arrive and at most 100 to process, so it is not expected).
module fea_top
  import dch_pkg::*;
#(
  parameter int NADB        = 3,
  parameter int NCHIP       = 2,
  parameter int LB_DEPTH    = 180,
  parameter int LATENCY     = 160,
  parameter int SAMP_DIV    = 4,
  parameter int BUS_DIV     = 4,
  parameter int OUT_DIV     = 2,
  parameter int TRIG_PERIOD = 64,
  parameter int CHUNK_WORDS = 1024,
  parameter int FRAME_BITS  = 1024,
  parameter int RESET_HOLD  = 6_000_000,
  localparam int NCHIPS     = NADB * NCHIP,
  localparam int CW         = $clog2(NCHIP > 1 ? NCHIP : 2),
  localparam int KAW        = $clog2(NADB * NCHIP * NCH)
) (
  input  logic                                  clk,
  input  logic                                  rst_n,
  // digitized front-end signals per ADB, chip and channel
  input  logic [NADB-1:0][NCHIP-1:0][NCH-1:0][7:0] fadc_i,
  input  logic [NADB-1:0][NCHIP-1:0][NCH-1:0]      tdc_hit_i,
  input  logic [NADB-1:0][NCHIP-1:0][NCH-1:0][6:0] tdc_i,
  // Fast Control commands
  input  logic                                  cmd_valid,
  input  cmd_op_e                               cmd_op,
  input  logic [15:0]                           cmd_addr,
  input  logic [23:0]                           cmd_data,
  output logic                                  rd_valid,
  output logic [23:0]                           rd_data,
  // 2-bit output link to the data I/O module
  output logic [1:0]                            data_o,
  output logic                                  data_strobe_o,
  // 1-bit trigger link to the trigger I/O module
  output logic                                  trig_link_o,
  // JTAG to the upload PROM
  output logic                                  tck_o,
  output logic                                  tms_o,
  output logic                                  tdi_o,
  input  logic                                  tdo_i,
  // configuration read-back and PROM streams for the upset check
  input  logic                                  cfg_valid_i,
  input  logic                                  cfg_rb_i,
  input  logic                                  cfg_prom_i,
  // board
  input  logic                                  board_rst_i,
  output logic                                  prog_n_o,
  output logic                                  prom_sel_o,
  // monitoring
  output logic [NCHIPS-1:0]                     elefant_overflow_o,
  output logic                                  trig_lost_o,
  output logic [NADB-1:0]                       adb_stalled_o,
  output logic [NADB-1:0]                       fex_overrun_o
);
  // ---------------- strobes ----------------
  logic [7:0] sdiv, bdiv, odiv;
  logic samp_en, bus_en, out_en;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      sdiv <= '0; bdiv <= '0; odiv <= '0;
    end else begin
      sdiv <= (sdiv == 8'(SAMP_DIV - 1)) ? '0 : sdiv + 1'b1;
      bdiv <= (bdiv == 8'(BUS_DIV - 1))  ? '0 : bdiv + 1'b1;
      odiv <= (odiv == 8'(OUT_DIV - 1))  ? '0 : odiv + 1'b1;
    end
  assign samp_en = (sdiv == '0);
  assign bus_en  = (bdiv == '0);
  assign out_en  = (odiv == '0);
  assign data_strobe_o = out_en;

  // ---------------- command decoder ----------------
  rd_mode_e    mode;
  logic        enc_en, l1, const_we, tbl_we, chunk_we, prog_start, seu_clr;
  logic        sel, le, reload;
  logic [7:0]  drift, sat_corr, ch_en;
  logic [15:0] caddr;
  logic [23:0] cdata, const_rd, status_rd;
  logic [19:0] tbl_rd;

  command_decoder u_cmd (
    .clk, .rst_n, .cmd_valid, .cmd_op, .cmd_addr, .cmd_data,
    .mode, .enc_en, .drift, .sat_corr, .ch_en,
    .l1_trig(l1), .const_we, .tbl_we, .chunk_we, .prog_start, .seu_clr,
    .addr_o(caddr), .data_o(cdata), .sel, .le, .reload,
    .const_rd, .tbl_rd, .status_rd, .rd_valid, .rd_data);

  // A trigger goes to the chips only if every chip can store it, so the
  // chips' event buffers stay in step; otherwise it is lost (dead time).
  logic [NCHIPS-1:0] trig_ready;
  logic              l1_acc;
  logic [11:0]       trig_count;
  assign l1_acc      = l1 && (&trig_ready);
  assign trig_lost_o = l1 && !(&trig_ready);
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) trig_count <= '0;
    else if (l1_acc) trig_count <= trig_count + 1'b1;

  // ---------------- FEX constants ----------------
  logic [NADB-1:0][KAW-1:0] eng_addr;
  logic [NADB-1:0][23:0]    eng_const;
  fex_const_ram #(.NADB(NADB), .NCHIP(NCHIP), .NCH(NCH)) u_const (
    .clk, .wr_en(const_we), .addr(caddr[KAW-1:0]), .wdata(cdata), .rdata(const_rd),
    .eng_addr, .eng_const);

  // ---------------- ADBs: ELEFANT chips and ADB units ----------------
  localparam int FEXW = NCH * (2 + NSAMP);
  localparam int WFW  = NCH * NSAMP / 2;
  localparam int FAW  = $clog2(FEXW + 1);
  localparam int WAW  = $clog2(WFW + 1);

  logic [NADB-1:0]              rd_avail, release_slot;
  logic [CW-1:0]                rd_chip;
  logic [1:0]                   rd_sel;
  logic [8:0]                   rd_addr;
  logic [NADB-1:0][15:0]        rd_word;
  logic [NADB-1:0][FAW-1:0]     fex_cnt;
  logic [NADB-1:0][WAW-1:0]     wf_cnt;
  logic [NCHIPS-1:0][7:0]       trig_bytes;
  logic                         seu_flag;

  for (genvar a = 0; a < NADB; a++) begin : g_adb
    logic [NCHIP-1:0]      pend, rd_start, dv;
    logic [NCHIP-1:0][7:0] dout;
    logic [7:0]            bus;
    logic [CW+2:0]         cch;

    for (genvar c = 0; c < NCHIP; c++) begin : g_chip
      elefant_chip #(.LB_DEPTH(LB_DEPTH), .LATENCY(LATENCY)) u_elefant (
        .clk, .rst_n, .samp_en, .bus_en,
        .fadc_i(fadc_i[a][c]), .tdc_hit_i(tdc_hit_i[a][c]), .tdc_i(tdc_i[a][c]),
        .trig_i(l1_acc), .anc_i({2'(a), 2'(c), trig_count}), .ch_en_i(ch_en),
        .trig_byte_o(trig_bytes[a * NCHIP + c]), .ev_pending_o(pend[c]),
        .rd_start_i(rd_start[c]), .dout_o(dout[c]), .dv_o(dv[c]),
        .overflow_o(elefant_overflow_o[a * NCHIP + c]),
        .trig_ready_o(trig_ready[a * NCHIP + c]));
    end

    // shared 8-bit bus: an idle chip drives zero
    always_comb begin
      bus = '0;
      for (int c = 0; c < NCHIP; c++) bus |= dout[c];
    end

    adb_unit #(.NCHIP(NCHIP)) u_adb (
      .clk, .rst_n, .mode,
      .ev_pending_i(pend), .rd_start_o(rd_start), .din_i(bus), .dv_i(|dv),
      .const_ch(cch), .ped(eng_const[a][7:0]), .gain(eng_const[a][23:8]),
      .drift, .sat_corr,
      .rd_avail(rd_avail[a]), .rd_chip, .rd_sel, .rd_addr, .rd_data(rd_word[a]),
      .fex_cnt(fex_cnt[a]), .wf_cnt(wf_cnt[a]), .release_slot(release_slot[a]),
      .overrun(fex_overrun_o[a]), .stalled(adb_stalled_o[a]));

    assign eng_addr[a] = KAW'(a * NCHIP * NCH + int'(cch));
  end

  // ---------------- data multiplexer and encoder ----------------
  logic [15:0] mword;
  logic        mpad, mvalid, mready, chip_switch;

  data_mux #(.NADB(NADB), .NCHIP(NCHIP), .FAW(FAW), .WAW(WAW)) u_mux (
    .clk, .rst_n, .mode, .seu_flag, .rd_avail, .rd_chip, .rd_sel, .rd_addr,
    .rd_data(rd_word), .fex_cnt, .wf_cnt, .release_slot,
    .word_o(mword), .pad_o(mpad), .word_valid_o(mvalid), .word_ready_i(mready),
    .chip_switch_o(chip_switch));

  data_encoder u_enc (
    .clk, .rst_n, .enc_en, .word_i(mword), .pad_i(mpad), .word_valid_i(mvalid),
    .word_ready_o(mready), .out_en, .dibit_o(data_o),
    .tbl_we, .tbl_addr(caddr[7:0]), .tbl_wd(cdata[19:0]), .tbl_rd);

  // ---------------- trigger interface ----------------
  trigger_interface #(.NCHIPS(NCHIPS), .PERIOD(TRIG_PERIOD)) u_trig (
    .clk, .rst_n, .trig_bytes_i(trig_bytes), .link_o(trig_link_o), .frame_o());

  // ---------------- PROM programmer ----------------
  logic pp_busy, pp_done, pp_error;
  tap_state_e pp_tap;
  prom_programmer #(.CHUNK_WORDS(CHUNK_WORDS)) u_pp (
    .clk, .rst_n, .chunk_we, .chunk_addr(caddr[$clog2(CHUNK_WORDS)-1:0]), .chunk_wd(cdata[15:0]),
    .start(prog_start), .tck(tck_o), .tms(tms_o), .tdi(tdi_o), .tdo(tdo_i),
    .busy(pp_busy), .done(pp_done), .error(pp_error), .tap(pp_tap));

  // ---------------- configuration check ----------------
  logic [15:0] seu_count, frames;
  config_check #(.FRAME_BITS(FRAME_BITS)) u_cc (
    .clk, .rst_n, .bit_valid(cfg_valid_i), .rb_bit(cfg_rb_i), .prom_bit(cfg_prom_i),
    .seu_clr, .seu_count, .frames, .seu_flag, .bit_mismatch(), .crc_mismatch());

  assign status_rd = {pp_error, pp_done, pp_busy, 1'b0, pp_tap, seu_count};

  // ---------------- board: image select and reset IC ----------------
  logic prog_req;
  image_select u_img (
    .rst(board_rst_i), .reload, .le, .sel, .prog_req, .prom_sel(prom_sel_o));

  reset_ic #(.HOLD_CYCLES(RESET_HOLD)) u_rst_ic (
    .clk, .trig(prog_req), .prog_n(prog_n_o));
endmodule
