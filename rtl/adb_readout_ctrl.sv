// adb_readout_ctrl: ADB readout ("slave") controller.
//
// Reads one triggered event from each ELEFANT chip of an ADB in turn over the
// shared 8-bit data bus and writes it into the ADB buffer. For chip c it
// waits until the buffer has a free event slot (chip 0 only) and the chip has
// an unread event, pulses rd_start_o[c], and takes the 3 + NCH*NSAMP bytes
// the chip returns with dv_i: byte 0 (hit mask) and bytes 1-2 (ancillary
// data) become the two Chip Header RAM words, the sample bytes go out on
// s_valid/s_data to the feature-extraction engine and the waveform path,
// with s_first on the chip's first sample and ch_first on each channel's
// first sample. After the last byte it waits for the FEX engine to finish
// (fex_idle_i), pulses chip_done, and after the last chip pulses commit, so
// the next event is fetched as soon as this one is buffered. The bus
// handshake and header word layout are this design's choices.
module adb_readout_ctrl
  import dch_pkg::*;
#(
  parameter int NCHIP   = 2,
  parameter int NCH_P   = NCH,
  parameter int NSAMP_P = NSAMP,
  localparam int CW     = $clog2(NCHIP > 1 ? NCHIP : 2)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [NCHIP-1:0] ev_pending_i,
  output logic [NCHIP-1:0] rd_start_o,
  input  logic [7:0]       din_i,
  input  logic             dv_i,
  input  logic             slot_free_i,
  input  logic             fex_idle_i,
  output logic [CW-1:0]    chip_o,
  output logic             hdr_we,
  output logic             hdr_idx,
  output logic [15:0]      hdr_wd,
  output logic             s_valid,
  output logic             s_first,
  output logic             ch_first,
  output logic [7:0]       s_data,
  output logic             chip_done,
  output logic             commit,
  output logic             busy
);
  localparam int NBYTES = 3 + NCH_P * NSAMP_P;
  localparam int KW     = $clog2(NBYTES + 1);
  localparam int SW     = $clog2(NSAMP_P);

  typedef enum logic [2:0] {R_IDLE, R_START, R_RECV, R_WAIT, R_DONE} rst_e;
  rst_e         st;
  logic [KW-1:0] k;
  logic [7:0]   anc_hi;
  logic [2:0]   wcnt;
  logic [KW-1:0] sk;

  assign sk = k - KW'(3);
  assign busy = (st != R_IDLE);

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      st <= R_IDLE; k <= '0; anc_hi <= '0; wcnt <= '0; chip_o <= '0;
      rd_start_o <= '0; hdr_we <= 1'b0; hdr_idx <= 1'b0; hdr_wd <= '0;
      s_valid <= 1'b0; s_first <= 1'b0; ch_first <= 1'b0; s_data <= '0;
      chip_done <= 1'b0; commit <= 1'b0;
    end else begin
      rd_start_o <= '0;
      hdr_we     <= 1'b0;
      s_valid    <= 1'b0;
      s_first    <= 1'b0;
      ch_first   <= 1'b0;
      chip_done  <= 1'b0;
      commit     <= 1'b0;
      unique case (st)
        R_IDLE: if (slot_free_i && ev_pending_i[0] && !commit) begin  // commit: slot count not yet updated
          chip_o        <= '0;
          rd_start_o[0] <= 1'b1;
          k             <= '0;
          st            <= R_RECV;
        end
        R_START: if (ev_pending_i[chip_o]) begin
          rd_start_o[chip_o] <= 1'b1;
          k                  <= '0;
          st                 <= R_RECV;
        end
        R_RECV: if (dv_i) begin
          k <= k + 1'b1;
          if (k == KW'(0)) begin
            hdr_we <= 1'b1; hdr_idx <= 1'b1; hdr_wd <= {din_i, 8'h00};
          end else if (k == KW'(1)) begin
            anc_hi <= din_i;
          end else if (k == KW'(2)) begin
            hdr_we <= 1'b1; hdr_idx <= 1'b0; hdr_wd <= {anc_hi, din_i};
          end else begin
            s_valid  <= 1'b1;
            s_data   <= din_i;
            s_first  <= (k == KW'(3));
            ch_first <= (sk[SW-1:0] == '0);
            if (k == KW'(NBYTES - 1)) begin
              st   <= R_WAIT;
              wcnt <= '0;
            end
          end
        end
        R_WAIT: begin
          if (wcnt != 3'd4) wcnt <= wcnt + 1'b1;
          else if (fex_idle_i) begin
            chip_done <= 1'b1;
            st        <= R_DONE;
          end
        end
        R_DONE: begin
          if (int'(chip_o) == NCHIP - 1) begin
            commit <= 1'b1;
            st     <= R_IDLE;
          end else begin
            chip_o <= chip_o + 1'b1;
            st     <= R_START;
          end
        end
        default: st <= R_IDLE;
      endcase
    end
endmodule
