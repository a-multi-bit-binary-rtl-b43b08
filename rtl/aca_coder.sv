// ACA1 coder: the registers A, B, C, Q and bufout, the ALU, and the state
// machine that sequences them (the controller) for ACA1 encoding.
//
// Algorithm. Symbols arrive two at a time (sym1 then sym2, a non-overlapping
// window). Every coded binary decision uses the ACA step, which moves the
// code register only on the LPS path:
//     A = A - Q;  if (LPS) { C = C + A; A = Q; }  if (A < 13'h1000) renormalise
// A window is coded as follows:
//   * sym1 is coded with the current context;
//   * if sym1 was an LPS and the previous window was dropped (loop_prev), a
//     flag decision is coded as an MPS of the flag context;
//   * sym1 enters the context register and the context is looked up again;
//   * if sym1 and sym2 are both MPS, sym2 is dropped (not coded, not shifted
//     into the context) and loop_prev is set;
//   * otherwise sym2 is coded; if sym1 was an MPS (so sym2 is an LPS), a flag
//     decision is coded as an LPS of the flag context; sym2 enters the
//     context and loop_prev is cleared.
// The flag context is selected by the sense of the previous flag bit.
//
// Renormalisation loads the number of leading zeros of A into a 5-bit shift
// counter and then shifts A and C left one bit per cycle, counting down with
// the ALU's decrementer until its all-zeros detector fires. The same cycle
// that starts a renormalisation tells the look-up tables to adapt the context
// just coded (towards smaller Q after an MPS, larger Q after an LPS).
//
// Code register. C is 25 bits: bits 12..0 line up with A, bits 15..13 are
// spacer bits that absorb carries, bits 23..16 collect the next code byte
// and bit 24 catches a carry into the byte held in B. A 4-bit counter CT
// counts the shifts to the next byte (12 for the first byte, then 8, or 7
// after a byte 8'hFF). When CT reaches 0 the byte in B, plus any carry, goes
// to bufout and the new byte moves from C into B. A carry can never ripple
// past a byte 8'hFF: after such a byte only 7 new bits are taken and the
// byte's top bit is left free for the carry (bit stuffing). B's all-ones
// test decides this. C = C + A takes two cycles: the 13-bit adder forms the
// low bits and latches its carry out, then the 12-bit incrementer adds that
// carry to bits 24..13.
//
// End of data. If the window flagged with in_last was dropped, the decoder
// could not tell it from an MPS followed by an LPS and a flag, so one more
// MPS decision is coded in the current context to confirm the pair. Then
// the coder shifts out the rest of C as three more bytes and then the byte
// in B, so the stream ends with the exact lower bound of the final
// interval. It then pulses done and starts a fresh code stream (A, C, B, CT, loop_prev); the context
// register and the context memory keep their contents until reset.
//
// Interfaces. Input: valid/ready, one window (sym1, sym2, last) accepted per
// handshake. Look-up tables: lut_rd requests a synchronous read (regular
// context, or flag context when lut_sel_flag), whose lut_mps and lut_q are
// used in the next cycle; lut_upd/lut_upd_lps adapt the entry read last.
// Context: ctx_shift/ctx_sym. Output: two-signal handshake; buf_full is high
// while bufout (code) holds a byte, and one cycle of ack from the receiver
// frees it. The coder stalls when it has a byte to write while buf_full is
// high and ack is low.
//
// Taken from the published architecture: the register set and widths, the
// ALU units, the renormalisation trigger on A's top bit, the two-step C + A,
// the all-ones test in B for bit stuffing, and the ack/buf_full handshake.
// This design's own: the state sequence (not the published 58-state
// machine), the C layout and byte-out rule (modelled on the usual
// carry-absorbing byte-out of binary arithmetic coders), the separate
// 4-bit byte counter, the flush and the input handshake.
module aca_coder
  import aca_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  // symbol window input
  input  logic              in_valid,
  output logic              in_ready,
  input  logic              sym1,
  input  logic              sym2,
  input  logic              in_last,
  // look-up tables
  input  logic              lut_ready,
  output logic              lut_rd,
  output logic              lut_sel_flag,
  output logic              lut_flag_ctx,
  input  logic              lut_mps,
  input  logic [Q_W-1:0]    lut_q,
  output logic              lut_upd,
  output logic              lut_upd_lps,
  // context register
  output logic              ctx_shift,
  output logic              ctx_sym,
  // code output
  output logic [7:0]        code,
  output logic              buf_full,
  input  logic              ack,
  output logic              done
);

  typedef enum logic [4:0] {
    S_IDLE, S_RD, S_SUB, S_ADD, S_INC, S_CHK, S_RN_START, S_RN_SHIFT,
    S_BYTEOUT, S_NEXT, S_SHIFT1, S_RD2, S_CMP2, S_SHIFT2, S_WIN_END,
    S_FLUSH, S_FL_LAST, S_FL_WAIT
  } state_t;

  // Which decision of the window is being coded.
  typedef enum logic [2:0] {D_SYM1, D_FLAG_M, D_SYM2, D_FLAG_L, D_TERM} dec_t;

  state_t          state;
  dec_t            step;
  logic [A_W-1:0]  a_q;
  logic [C_W-1:0]  c_q;
  logic [7:0]      b_q;
  logic            b_valid;
  logic [Q_W-1:0]  q_q;
  logic [7:0]      bufout_q;
  logic            buf_full_q;
  logic [3:0]      ct_q;
  logic [SC_W-1:0] sc_q;
  logic            cout_q;
  logic            sym1_q, sym2_q, last_q;
  logic            lps_q, lps1_q;
  logic            loop_prev, flag_prev, flushing;
  logic [1:0]      fl_cnt;

  // ALU
  logic [A_W-1:0]  add_a, add_b, add_sum;
  logic            add_sub, cout;
  logic [12:0]     inc_out;
  logic [SC_W-1:0] dec_out;
  logic            all0;

  aca_alu u_alu (
    .add_a   (add_a),
    .add_b   (add_b),
    .add_sub (add_sub),
    .add_sum (add_sum),
    .cout    (cout),
    .inc_in  (c_q[C_W-1:A_W]),
    .inc_en  (cout_q),
    .inc_out (inc_out),
    .dec_in  (sc_q),
    .dec_out (dec_out),
    .all0    (all0)
  );

  // Operand selection: A - Q in S_SUB, C[12:0] + A in S_ADD.
  always_comb begin
    if (state == S_ADD) begin
      add_a   = c_q[A_W-1:0];
      add_b   = a_q;
      add_sub = 1'b0;
    end else begin
      add_a   = a_q;
      add_b   = {1'b0, q_q};
      add_sub = 1'b1;
    end
  end

  // Shift needed to bring A's top bit back to 1.
  function automatic logic [SC_W-1:0] lead_zeros(input logic [A_W-1:0] v);
    logic [SC_W-1:0] n;
    logic            seen;
    n    = '0;
    seen = 1'b0;
    for (int i = A_W - 1; i >= 0; i--) begin
      if (v[i]) seen = 1'b1;
      if (!seen) n = n + 1'b1;
    end
    return n;
  endfunction

  // Byte-out decision, from B and the top of C.
  logic       can_write;
  logic [7:0] b_inc;
  logic       stuff;        // the byte leaving is 8'hFF: take 7 new bits
  logic [7:0] byte_leaving;
  logic [7:0] b_next;
  logic [C_W-1:0] c_kept;

  always_comb begin
    can_write = !buf_full_q || ack;
    b_inc     = b_q + 8'd1;
    if (b_q == 8'hFF) begin
      byte_leaving = b_q;
      stuff        = 1'b1;
    end else if (!c_q[24]) begin
      byte_leaving = b_q;
      stuff        = 1'b0;
    end else begin
      byte_leaving = b_inc;
      stuff        = (b_inc == 8'hFF);
    end
    if (stuff) begin
      b_next = {1'b0, c_q[23:17]};
      if (b_q == 8'hFF) b_next = c_q[24:17];
      c_kept = {8'd0, c_q[16:0]};
    end else begin
      b_next = c_q[23:16];
      c_kept = {9'd0, c_q[15:0]};
    end
  end

  // Fixed outputs of each state.
  always_comb begin
    in_ready     = (state == S_IDLE) && lut_ready;
    lut_rd       = 1'b0;
    lut_sel_flag = 1'b0;
    lut_flag_ctx = flag_prev;
    lut_upd      = (state == S_RN_START);
    lut_upd_lps  = lps_q;
    ctx_shift    = (state == S_SHIFT1) || (state == S_SHIFT2);
    ctx_sym      = (state == S_SHIFT2) ? sym2_q : sym1_q;
    case (state)
      S_IDLE:  lut_rd = in_valid && lut_ready;
      S_RD2:   lut_rd = 1'b1;
      S_WIN_END: lut_rd = last_q && loop_prev;
      S_NEXT: begin
        if ((step == D_SYM1 && lps_q && loop_prev) || (step == D_SYM2 && !lps1_q)) begin
          lut_rd       = 1'b1;
          lut_sel_flag = 1'b1;
        end
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      step       <= D_SYM1;
      a_q        <= A_INIT;
      c_q        <= '0;
      b_q        <= '0;
      b_valid    <= 1'b0;
      q_q        <= '0;
      bufout_q   <= '0;
      buf_full_q <= 1'b0;
      ct_q       <= 4'd12;
      sc_q       <= '0;
      cout_q     <= 1'b0;
      sym1_q     <= 1'b0;
      sym2_q     <= 1'b0;
      last_q     <= 1'b0;
      lps_q      <= 1'b0;
      lps1_q     <= 1'b0;
      loop_prev  <= 1'b0;
      flag_prev  <= 1'b0;
      flushing   <= 1'b0;
      fl_cnt     <= '0;
      done       <= 1'b0;
    end else begin
      done <= 1'b0;
      if (buf_full_q && ack) buf_full_q <= 1'b0;

      case (state)
        S_IDLE: begin
          if (in_valid && lut_ready) begin
            sym1_q <= sym1;
            sym2_q <= sym2;
            last_q <= in_last;
            step   <= D_SYM1;
            state  <= S_RD;
          end
        end

        // Context word read last cycle: take Q and decide MPS/LPS.
        S_RD: begin
          q_q <= lut_q;
          case (step)
            D_SYM1: begin
              lps_q  <= (sym1_q != lut_mps);
              lps1_q <= (sym1_q != lut_mps);
            end
            D_FLAG_M: lps_q <= 1'b0;
            D_FLAG_L: lps_q <= 1'b1;
            D_TERM:   lps_q <= 1'b0;
            default:  lps_q <= (sym2_q != lut_mps);
          endcase
          state <= S_SUB;
        end

        S_SUB: begin
          a_q   <= add_sum;
          state <= lps_q ? S_ADD : S_CHK;
        end

        S_ADD: begin
          c_q[A_W-1:0] <= add_sum;
          cout_q       <= cout;
          state        <= S_INC;
        end

        S_INC: begin
          c_q[C_W-1:A_W] <= inc_out[11:0];
          a_q            <= {1'b0, q_q};
          cout_q         <= 1'b0;
          state          <= S_CHK;
        end

        S_CHK: state <= a_q[A_W-1] ? S_NEXT : S_RN_START;

        S_RN_START: begin
          sc_q  <= lead_zeros(a_q);
          state <= S_RN_SHIFT;
        end

        S_RN_SHIFT: begin
          if (all0) begin
            state <= flushing ? S_FLUSH : S_NEXT;
          end else begin
            a_q  <= a_q << 1;
            c_q  <= c_q << 1;
            sc_q <= dec_out;
            ct_q <= ct_q - 4'd1;
            if (ct_q == 4'd1) state <= S_BYTEOUT;
          end
        end

        S_BYTEOUT: begin
          if (!b_valid || can_write) begin
            if (b_valid) begin
              bufout_q   <= byte_leaving;
              buf_full_q <= 1'b1;
            end
            b_valid <= 1'b1;
            b_q     <= b_next;
            c_q     <= c_kept;
            ct_q    <= stuff ? 4'd7 : 4'd8;
            state   <= S_RN_SHIFT;
          end
        end

        S_NEXT: begin
          case (step)
            D_SYM1: begin
              if (lps_q && loop_prev) begin
                step  <= D_FLAG_M;
                state <= S_RD;
              end else begin
                state <= S_SHIFT1;
              end
            end
            D_FLAG_M: begin
              flag_prev <= 1'b0;
              state     <= S_SHIFT1;
            end
            D_SYM2: begin
              if (!lps1_q) begin
                step  <= D_FLAG_L;
                state <= S_RD;
              end else begin
                state <= S_SHIFT2;
              end
            end
            D_FLAG_L: begin
              flag_prev <= 1'b1;
              state     <= S_SHIFT2;
            end
            default: begin                 // terminating MPS coded
              loop_prev <= 1'b0;
              state     <= S_WIN_END;
            end
          endcase
        end

        S_SHIFT1: begin
          loop_prev <= 1'b1;
          state     <= S_RD2;
        end

        S_RD2: state <= S_CMP2;

        S_CMP2: begin
          if (!lps1_q && sym2_q == lut_mps) begin
            state <= S_WIN_END;          // both MPS: the second one is dropped
          end else begin
            q_q   <= lut_q;
            lps_q <= (sym2_q != lut_mps);
            step  <= D_SYM2;
            state <= S_SUB;
          end
        end

        S_SHIFT2: begin
          loop_prev <= 1'b0;
          state     <= S_WIN_END;
        end

        S_WIN_END: begin
          if (last_q && loop_prev) begin
            step  <= D_TERM;
            state <= S_RD;
          end else if (last_q) begin
            flushing <= 1'b1;
            fl_cnt   <= '0;
            state    <= S_FLUSH;
          end else begin
            state <= S_IDLE;
          end
        end

        // Push the rest of C out: three times, shift up to the next byte.
        S_FLUSH: begin
          if (fl_cnt == 2'd3) begin
            state <= S_FL_LAST;
          end else begin
            sc_q   <= SC_W'(ct_q);
            fl_cnt <= fl_cnt + 2'd1;
            state  <= S_RN_SHIFT;
          end
        end

        S_FL_LAST: begin
          if (can_write) begin
            bufout_q   <= b_q;
            buf_full_q <= 1'b1;
            state      <= S_FL_WAIT;
          end
        end

        S_FL_WAIT: begin
          if (!buf_full_q) begin
            done      <= 1'b1;
            flushing  <= 1'b0;
            a_q       <= A_INIT;
            c_q       <= '0;
            b_q       <= '0;
            b_valid   <= 1'b0;
            ct_q      <= 4'd12;
            loop_prev <= 1'b0;
            flag_prev <= 1'b0;
            state     <= S_IDLE;
          end
        end

        default: state <= S_IDLE;
      endcase
    end
  end

  assign code     = bufout_q;
  assign buf_full = buf_full_q;

  // The interval invariant keeps the carry inside C.
  a_no_c_overflow: assert property (@(posedge clk) disable iff (!rst_n)
    (state == S_INC) |-> !inc_out[12]);
  // Handshake: ack only acknowledges a byte that is there.
  a_ack_when_full: assert property (@(posedge clk) disable iff (!rst_n)
    ack |-> buf_full_q);

endmodule
