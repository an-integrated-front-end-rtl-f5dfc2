// prom_programmer: JTAG "PROM programmer" that replays SVF commands.
//
// The host writes a chunk of 16-bit words into the chunk RAM (chunk_we) and
// pulses start. The controller walks the chunk and drives the TAP of the
// configuration PROM through tck/tms/tdi, reading tdo, while tracking the
// TAP's 16-state controller (dch_pkg::tap_state_e). Chunk format (this
// design's encoding of the SVF subset SIR, SDR, STATE, RUNTEST):
//   opcode word {op[3:0], end_state[3:0], has_tdo, has_mask, 6'b0}
//   SVF_STATE:   move to end_state
//   SVF_RUNTEST: next word = count; go to Run-Test/Idle, give count TCKs
//                with TMS low, then move to end_state
//   SVF_SIR/SDR: next word = length in bits, then ceil(len/16) TDI words,
//                then as many expected-TDO words if has_tdo and mask words if
//                has_mask; bit i is word i/16, bit i%16 (first shifted = LSB).
//                Go to Shift-IR/DR, shift, leave on the last bit, move to
//                end_state (the SVF ENDIR/ENDDR state carried in the opcode).
//   SVF_END:     chunk finished: done.
// TDO is compared with the expected bits where the mask is 1; a difference,
// or an unknown opcode, stops the chunk with error set. The host polls
// {error, done, busy} to send the next chunk or to start again. One TCK
// period is TCK_DIV clocks; TMS/TDI change with TCK low, TDO is sampled and
// the TAP state advanced at the rising edge. Moves between states take the
// shortest path through the state diagram (dch_pkg::tap_step_tms).
module prom_programmer
  import dch_pkg::*;
#(
  parameter int CHUNK_WORDS = 1024,
  parameter int TCK_DIV     = 4,
  localparam int AW = $clog2(CHUNK_WORDS)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          chunk_we,
  input  logic [AW-1:0] chunk_addr,
  input  logic [15:0]   chunk_wd,
  input  logic          start,
  output logic          tck,
  output logic          tms,
  output logic          tdi,
  input  logic          tdo,
  output logic          busy,
  output logic          done,
  output logic          error,
  output tap_state_e    tap
);
  localparam int H  = TCK_DIV / 2;
  localparam int PW = $clog2(TCK_DIV);

  logic [15:0] mem [CHUNK_WORDS];
  always_ff @(posedge clk) if (chunk_we) mem[chunk_addr] <= chunk_wd;

  function automatic logic [15:0] rd(logic [AW:0] a);
    return (int'(a) < CHUNK_WORDS) ? mem[a[AW-1:0]] : 16'h0;
  endfunction

  // ---- one TCK cycle ----
  logic          bit_go, bit_tms, bit_tdi, bit_done, bit_tdo, bact;
  logic [PW-1:0] ph;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      bact <= 1'b0; ph <= '0; tck <= 1'b0; tms <= 1'b1; tdi <= 1'b0;
      bit_done <= 1'b0; bit_tdo <= 1'b0; tap <= TAP_RESET;
    end else begin
      bit_done <= 1'b0;
      if (bit_go && !bact) begin
        bact <= 1'b1; ph <= '0; tms <= bit_tms; tdi <= bit_tdi;
      end else if (bact) begin
        ph <= ph + 1'b1;
        if (ph == PW'(H - 1)) begin
          tck     <= 1'b1;
          bit_tdo <= tdo;
          tap     <= tap_next(tap, tms);
        end
        if (ph == PW'(TCK_DIV - 1)) begin
          tck      <= 1'b0;
          bact     <= 1'b0;
          bit_done <= 1'b1;
        end
      end
    end

  // ---- SVF interpreter ----
  typedef enum logic [2:0] {P_IDLE, P_FETCH, P_OPND, P_MOVE, P_SHIFT, P_RUN} pst_e;
  typedef enum logic [1:0] {A_FETCH, A_SHIFT, A_RUN} after_e;

  pst_e        st;
  after_e      after;
  logic        waiting;
  logic [AW:0] pc, dbase;
  logic [15:0] w;
  svf_op_e     op;
  tap_state_e  endst, target;
  logic        has_tdo, has_mask;
  logic [15:0] len, k, cnt;
  logic [AW:0] nw;

  assign w = rd(pc);

  logic        tdi_bit, exp_bit, msk_bit;
  logic [AW:0] kw;
  assign kw      = (AW+1)'(k >> 4);
  assign tdi_bit = rd(dbase + kw)[k[3:0]];
  assign exp_bit = rd(dbase + nw + kw)[k[3:0]];
  assign msk_bit = has_mask ? rd(dbase + nw + nw + kw)[k[3:0]] : 1'b1;

  assign busy = (st != P_IDLE);

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      st <= P_IDLE; after <= A_FETCH; waiting <= 1'b0; pc <= '0; dbase <= '0;
      op <= SVF_END; endst <= TAP_IDLE; target <= TAP_IDLE; has_tdo <= 1'b0;
      has_mask <= 1'b0; len <= '0; k <= '0; cnt <= '0; nw <= '0;
      done <= 1'b0; error <= 1'b0; bit_go <= 1'b0; bit_tms <= 1'b0; bit_tdi <= 1'b0;
    end else begin
      bit_go <= 1'b0;
      unique case (st)
        P_IDLE: if (start) begin
          pc <= '0; done <= 1'b0; error <= 1'b0; st <= P_FETCH;
        end
        P_FETCH: begin
          op       <= svf_op_e'(w[15:12]);
          endst    <= tap_state_e'(w[11:8]);
          has_tdo  <= w[7];
          has_mask <= w[6];
          unique case (w[15:12])
            SVF_END:   begin done <= 1'b1; st <= P_IDLE; end
            SVF_STATE: begin
              target <= tap_state_e'(w[11:8]); after <= A_FETCH;
              pc <= pc + 1'b1; st <= P_MOVE;
            end
            SVF_RUNTEST, SVF_SIR, SVF_SDR: st <= P_OPND;
            default:   begin error <= 1'b1; st <= P_IDLE; end
          endcase
        end
        P_OPND: begin
          // w now reads pc + 1 (pc advanced below on entry)
          if (op == SVF_RUNTEST) begin
            cnt    <= rd(pc + 1'b1);
            target <= TAP_IDLE;
            after  <= A_RUN;
            pc     <= pc + (AW+1)'(2);
          end else begin
            logic [15:0] l;
            logic [AW:0] n;
            l = rd(pc + 1'b1);
            n = (AW+1)'((32'(l) + 15) >> 4);
            len   <= l;
            nw    <= n;
            dbase <= pc + (AW+1)'(2);
            pc    <= pc + (AW+1)'(2) + n + (has_tdo ? n : '0) + (has_mask ? n : '0);
            k     <= '0;
            if (l == '0) begin
              target <= endst; after <= A_FETCH;
            end else begin
              target <= (op == SVF_SIR) ? TAP_SHIFT_IR : TAP_SHIFT_DR;
              after  <= A_SHIFT;
            end
          end
          st <= P_MOVE;
        end
        P_MOVE: begin
          if (!waiting) begin
            if (tap == target) begin
              unique case (after)
                A_SHIFT: st <= P_SHIFT;
                A_RUN:   st <= P_RUN;
                default: st <= P_FETCH;
              endcase
            end else begin
              bit_go <= 1'b1; bit_tms <= tap_step_tms(tap, target); bit_tdi <= 1'b0;
              waiting <= 1'b1;
            end
          end else if (bit_done) waiting <= 1'b0;
        end
        P_SHIFT: begin
          if (!waiting) begin
            bit_go <= 1'b1; bit_tms <= (k == len - 1'b1); bit_tdi <= tdi_bit;
            waiting <= 1'b1;
          end else if (bit_done) begin
            waiting <= 1'b0;
            if (has_tdo && msk_bit && (bit_tdo != exp_bit)) begin
              error <= 1'b1;
              st    <= P_IDLE;
            end else if (k == len - 1'b1) begin
              target <= endst; after <= A_FETCH; st <= P_MOVE;
            end else k <= k + 1'b1;
          end
        end
        P_RUN: begin
          if (!waiting) begin
            if (cnt == '0) begin
              target <= endst; after <= A_FETCH; st <= P_MOVE;
            end else begin
              bit_go <= 1'b1; bit_tms <= 1'b0; bit_tdi <= 1'b0; waiting <= 1'b1;
            end
          end else if (bit_done) begin
            waiting <= 1'b0;
            cnt     <= cnt - 1'b1;
          end
        end
        default: st <= P_IDLE;
      endcase
    end

  initial assert (TCK_DIV >= 2 && TCK_DIV % 2 == 0) else $error("TCK_DIV must be even");
endmodule
