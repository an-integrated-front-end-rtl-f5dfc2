// fex_engine: feature extraction of one ELEFANT channel's waveform.
//
// Samples arrive one byte per s_valid, NSAMP per channel, channels 0..7 in
// order; s_first marks the first byte of a chip and restarts the channel
// count. A full channel is captured into one of two buffers while the other
// is processed, so processing overlaps the arrival of the next channel.
// Processing, one sample per clock:
//   1. scan: list the TDC words (bit 7 set); the first is the leading edge.
//      A channel without TDC words produces no output.
//   2. sum:  add the samples from the leading edge to the end. A TDC sample
//      is replaced by an interpolated FADC value: the mean of its FADC
//      neighbours, the one neighbour that is FADC, or else the last FADC value
//      seen. Samples at full scale (127) are counted as saturated.
//   3. charge = clamp(((sum - n*(ped + drift) + nsat*sat_corr) * gain) >> 8,
//      0, 65535), with n the number of summed samples and gain in 8.8.
//   4. write: status word {sat, ch[2:0], ntdc[5:0], lead[4:0], 1}, the charge,
//      then one word {4'b0, sample[4:0], fine[6:0]} per TDC word.
// Worst case 2*NSAMP + ntdc + 4 clocks per channel, below the NSAMP bus
// strobes a channel takes to arrive at one byte every 4 clocks. const_ch
// names the channel whose constants ped/gain must be presented; they are
// read at step 3. idle is high when nothing is captured or pending.
// The algorithm (TDC list, leading edge, charge integral from the leading
// edge with interpolation, saturation and pedestal-drift corrections, a gain
// factor, dropping channels without TDC hits, 2-byte words) is the one the
// readout system uses; the formulas, window and word layouts are this
// design's own.
module fex_engine
  import dch_pkg::*;
#(
  parameter int NSAMP_P = NSAMP
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        s_valid,
  input  logic        s_first,
  input  logic [7:0]  s_data,
  output logic [2:0]  const_ch,
  input  logic [7:0]  ped,
  input  logic [15:0] gain,
  input  logic [7:0]  drift,      // signed
  input  logic [7:0]  sat_corr,
  output logic        wr_en,
  output logic [15:0] wr_data,
  output logic        idle,
  output logic        overrun
);
  localparam int SW = $clog2(NSAMP_P);

  typedef enum logic [2:0] {F_IDLE, F_SCAN, F_SUM, F_CALC, F_STAT, F_CHG, F_TDC} fst_e;

  logic [7:0] buf_q [2][NSAMP_P];
  logic       wsel, psel;
  logic [SW-1:0] widx;
  logic [2:0]    wch;
  logic          pend;        // a captured channel waits for processing
  logic [2:0]    pend_ch;

  fst_e          st;
  logic [SW:0]   i;
  logic [2:0]    pch;
  logic [5:0]    ntdc;
  logic [SW-1:0] lead;
  logic [SW-1:0] tlist [NSAMP_P];
  logic [5:0]    tk;
  logic [13:0]   sum;
  logic [6:0]    nsum;
  logic [5:0]    nsat;
  logic [6:0]    last_fadc;
  logic [15:0]   charge;

  // ---- capture ----
  always_ff @(posedge clk) if (s_valid) buf_q[s_first ? 1'b0 : wsel][s_first ? '0 : widx] <= s_data;

  logic cap_done;
  assign cap_done = s_valid && (s_first ? (NSAMP_P == 1) : (widx == SW'(NSAMP_P - 1)));

  logic start_proc;
  assign start_proc = (st == F_IDLE) && pend;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      wsel <= 1'b0; widx <= '0; wch <= '0; pend <= 1'b0; pend_ch <= '0; overrun <= 1'b0;
    end else begin
      if (start_proc) pend <= 1'b0;
      if (s_valid) begin
        if (s_first) begin
          wsel <= 1'b0; widx <= SW'(1); wch <= '0;
        end else widx <= widx + 1'b1;
        if (cap_done) begin
          widx    <= '0;
          wsel    <= s_first ? 1'b1 : !wsel;
          wch     <= (s_first ? 3'd0 : wch) + 1'b1;
          pend    <= 1'b1;
          pend_ch <= s_first ? 3'd0 : wch;
          if (pend && !start_proc) overrun <= 1'b1;
        end
      end
    end

  // ---- processing ----
  logic [7:0] cur, lft, rgt;
  logic [SW-1:0] iw;
  assign iw  = i[SW-1:0];
  assign cur = buf_q[psel][iw];
  assign lft = (iw == '0) ? 8'h80 : buf_q[psel][iw - 1'b1];
  assign rgt = (iw == SW'(NSAMP_P - 1)) ? 8'h80 : buf_q[psel][iw + 1'b1];

  logic [6:0] interp;
  always_comb begin
    if (!lft[7] && !rgt[7])  interp = 7'((8'(lft[6:0]) + 8'(rgt[6:0])) >> 1);
    else if (!lft[7])        interp = lft[6:0];
    else if (!rgt[7])        interp = rgt[6:0];
    else                     interp = last_fadc;
  end

  logic signed [19:0] net;
  logic signed [37:0] prod;
  always_comb begin
    net  = 20'(signed'({1'b0, sum}))
         - 20'(signed'({1'b0, nsum})) * (20'(signed'({1'b0, ped})) + 20'(signed'(drift)))
         + 20'(signed'({1'b0, nsat})) * 20'(signed'({1'b0, sat_corr}));
    prod = (38'(net) * 38'(signed'({1'b0, gain}))) >>> 8;
  end

  assign const_ch = pch;
  assign idle     = (st == F_IDLE) && !pend && (widx == '0);

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      st <= F_IDLE; i <= '0; pch <= '0; psel <= 1'b0; ntdc <= '0; lead <= '0; tk <= '0;
      sum <= '0; nsum <= '0; nsat <= '0; last_fadc <= '0; charge <= '0;
      wr_en <= 1'b0; wr_data <= '0;
    end else begin
      wr_en <= 1'b0;
      unique case (st)
        F_IDLE: if (pend) begin
          st <= F_SCAN; i <= '0; pch <= pend_ch; psel <= !wsel;
          ntdc <= '0; lead <= '0;
        end
        F_SCAN: begin
          if (cur[7]) begin
            if (ntdc == '0) lead <= iw;
            tlist[ntdc[SW-1:0]] <= iw;
            ntdc <= ntdc + 1'b1;
          end
          if (i == (SW+1)'(NSAMP_P - 1)) begin
            i <= '0;
            st <= F_SUM;
            if (ntdc == '0 && !cur[7]) st <= F_IDLE;  // no TDC hit: channel dropped
          end else i <= i + 1'b1;
          sum <= '0; nsum <= '0; nsat <= '0; last_fadc <= '0;
        end
        F_SUM: begin
          if (iw >= lead) begin
            sum  <= sum + 14'(cur[7] ? interp : cur[6:0]);
            nsum <= nsum + 1'b1;
            if (!cur[7] && cur[6:0] == 7'(FADC_MAX)) nsat <= nsat + 1'b1;
          end
          if (!cur[7]) last_fadc <= cur[6:0];
          if (i == (SW+1)'(NSAMP_P - 1)) st <= F_CALC;
          else i <= i + 1'b1;
        end
        F_CALC: begin
          charge <= (prod < 0) ? 16'd0 : (prod > 38'sd65535) ? 16'hFFFF : prod[15:0];
          st <= F_STAT;
        end
        F_STAT: begin
          wr_en   <= 1'b1;
          wr_data <= fex_status_t'{sat: (nsat != '0), ch: pch, ntdc: ntdc,
                                   lead: 5'(lead), one: 1'b1};
          st <= F_CHG;
        end
        F_CHG: begin
          wr_en <= 1'b1; wr_data <= charge; tk <= '0; st <= F_TDC;
        end
        F_TDC: begin
          wr_en   <= 1'b1;
          wr_data <= {4'b0, 5'(tlist[tk[SW-1:0]]), buf_q[psel][tlist[tk[SW-1:0]]][6:0]};
          tk <= tk + 1'b1;
          if (tk + 1'b1 == ntdc) st <= F_IDLE;
        end
        default: st <= F_IDLE;
      endcase
    end
endmodule
