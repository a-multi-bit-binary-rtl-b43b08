// ACA1 decoder core: the decoding registers (A, Q, code offset D), the ALU,
// and the state machine that turns decoded decisions back into symbols.
//
// Decisions. Each binary decision is decoded with the ACA rule that mirrors
// the encoder's:
//     A = A - Q;  if (D >= A) { LPS; D = D - A; A = Q; } else MPS;
//     if (A < 13'h1000) renormalise
// D is the distance of the code value from the bottom of the current
// interval, in the units of A. The comparison and the subtraction are one
// pass through the ALU's 13-bit adder (D - A; no borrow means D >= A).
//
// Symbols. Decisions become symbols with two state bits and a two-symbol
// buffer, following the published decoding rules:
//   LPS, mps_flag = 1 and lps_flag = 0: decode a flag decision next.
//        flag is MPS: lps_flag = 1, mps_flag = 0, output buf[0] buf[1] LPS
//        flag is LPS: mps_flag = 0, output buf[0] LPS
//   LPS otherwise:   lps_flag = not lps_flag, output LPS
//   MPS, lps_flag = 1: lps_flag = 0, output MPS
//   MPS, mps_flag = 0: mps_flag = 1, buf = {MPS, MPS of the context that
//        now includes this MPS}
//   MPS, mps_flag = 1: output buf[0] buf[1], then refill buf as above
// Every decoded symbol enters the context register; the second symbol of a
// buffered pair does not, as it was never coded. The flag context is chosen
// by the sense of the previous flag, as in the encoder.
//
// Code register. D is 29 bits: bits 28..16 line up with A and bits 15..0
// hold code bits read ahead. A 4-bit counter CT counts the shifts until the
// next byte is due; a byte is added at bits 7..0, or at bits 8..1 (and CT
// set to 7) when the byte before it was 8'hFF, so that its top bit lands on
// the previous byte's last bit and carries the encoder's stuffed carry. At
// start, 20 shifts with byte loads line the first code bit up with A.
//
// End of stream. The decoder does not know where the code ends; start
// gives it the number of windows (pairs of symbols) to produce, and it
// pulses done once they are all out. A stream whose last window was dropped
// carries one extra MPS decision from the encoder, which releases the
// buffered pair through the usual rule. The byte source must keep
// supplying bytes (zeros past the end of the code) while it runs.
//
// Interfaces: start/n_windows/done; code bytes in with valid/ready; symbols
// out with valid/ready, one per transfer, in their original order; look-up
// tables and context register as in the encoder.
//
// Taken from the publication: the decoding step, the decoding rules and
// their state bits and buffer, the renormalisation trigger. This design's
// own: the state sequence, the D layout and byte loading (the counterpart of
// the encoder's byte output), the window count and the handshakes.
module aca_dec_coder
  import aca_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  // control
  input  logic              start,
  input  logic [31:0]       n_windows,
  output logic              done,
  // code bytes in
  input  logic              code_valid,
  output logic              code_ready,
  input  logic [7:0]        code_byte,
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
  // symbols out
  output logic              out_valid,
  input  logic              out_ready,
  output logic              out_sym
);

  localparam int unsigned D_W = 29;

  typedef enum logic [3:0] {
    S_IDLE, S_DEC, S_RD, S_SUB, S_CMP, S_CHK, S_RN_START, S_RN_SHIFT,
    S_BYTEIN, S_APPLY, S_EMIT, S_RD2, S_FILL
  } state_t;

  state_t          state, em_ret;
  logic            step_flag;     // the decision being decoded is a flag
  logic [A_W-1:0]  a_q;
  logic [D_W-1:0]  d_q;
  logic [Q_W-1:0]  q_q;
  logic [3:0]      ct_q;
  logic [SC_W-1:0] sc_q;
  logic            init_q;        // initial alignment: shift D only
  logic            prev_ff;
  logic            mps_q, lps_q, lps_sym;
  logic            mps_flag, lps_flag, flag_prev;
  logic [1:0]      buf_q;         // buf_q[0] = buf[0], the earlier symbol
  logic [2:0]      em_bits;       // symbols still to send, em_bits[0] first
  logic [1:0]      em_n;
  logic [31:0]     nwin_q, out_cnt;

  // ALU
  logic [A_W-1:0]  add_a, add_b, add_sum;
  logic            cout;
  logic [12:0]     inc_out;
  logic [SC_W-1:0] dec_out;
  logic            all0;

  aca_alu u_alu (
    .add_a   (add_a),
    .add_b   (add_b),
    .add_sub (1'b1),
    .add_sum (add_sum),
    .cout    (cout),
    .inc_in  (12'd0),
    .inc_en  (1'b0),
    .inc_out (inc_out),
    .dec_in  (sc_q),
    .dec_out (dec_out),
    .all0    (all0)
  );

  // A - Q in S_SUB, D - A in S_CMP.
  always_comb begin
    if (state == S_CMP) begin
      add_a = d_q[D_W-1:16];
      add_b = a_q;
    end else begin
      add_a = a_q;
      add_b = {1'b0, q_q};
    end
  end

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

  logic dsym;       // symbol of the regular decision just decoded
  logic total_out;  // all 2 * n_windows symbols are out
  assign dsym      = mps_q ^ lps_q;
  assign total_out = (out_cnt == {nwin_q[30:0], 1'b0});

  always_comb begin
    lut_rd       = 1'b0;
    lut_sel_flag = 1'b0;
    lut_flag_ctx = flag_prev;
    lut_upd      = (state == S_RN_START);
    lut_upd_lps  = lps_q;
    code_ready   = (state == S_BYTEIN);
    out_valid    = (state == S_EMIT);
    out_sym      = em_bits[0];
    ctx_shift    = 1'b0;
    ctx_sym      = dsym;
    case (state)
      S_DEC:  lut_rd = !total_out;
      S_RD2:  lut_rd = 1'b1;
      S_APPLY: begin
        if (step_flag) begin
          ctx_shift = 1'b1;
          ctx_sym   = lps_sym;
        end else if (lps_q && mps_flag && !lps_flag) begin
          lut_rd       = 1'b1;
          lut_sel_flag = 1'b1;
        end else begin
          ctx_shift = 1'b1;
        end
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      em_ret    <= S_DEC;
      step_flag <= 1'b0;
      a_q       <= A_INIT;
      d_q       <= '0;
      q_q       <= '0;
      ct_q      <= '0;
      sc_q      <= '0;
      init_q    <= 1'b0;
      prev_ff   <= 1'b0;
      mps_q     <= 1'b0;
      lps_q     <= 1'b0;
      lps_sym   <= 1'b0;
      mps_flag  <= 1'b0;
      lps_flag  <= 1'b0;
      flag_prev <= 1'b0;
      buf_q     <= '0;
      em_bits   <= '0;
      em_n      <= '0;
      nwin_q    <= '0;
      out_cnt   <= '0;
      done      <= 1'b0;
    end else begin
      done <= 1'b0;
      case (state)
        S_IDLE: begin
          if (start && lut_ready) begin
            nwin_q    <= n_windows;
            out_cnt   <= '0;
            a_q       <= A_INIT;
            d_q       <= '0;
            ct_q      <= '0;
            sc_q      <= SC_W'(20);
            init_q    <= 1'b1;
            prev_ff   <= 1'b0;
            mps_flag  <= 1'b0;
            lps_flag  <= 1'b0;
            flag_prev <= 1'b0;
            state     <= S_RN_SHIFT;
          end
        end

        S_DEC: begin
          if (total_out) begin
            done  <= 1'b1;
            state <= S_IDLE;
          end else begin
            step_flag <= 1'b0;
            state     <= S_RD;
          end
        end

        S_RD: begin
          q_q   <= lut_q;
          mps_q <= step_flag ? mps_q : lut_mps;
          state <= S_SUB;
        end

        S_SUB: begin
          a_q   <= add_sum;
          state <= S_CMP;
        end

        S_CMP: begin
          lps_q <= cout;
          if (cout) begin
            d_q[D_W-1:16] <= add_sum;
            a_q           <= {1'b0, q_q};
          end
          state <= S_CHK;
        end

        S_CHK: state <= a_q[A_W-1] ? S_APPLY : S_RN_START;

        S_RN_START: begin
          sc_q  <= lead_zeros(a_q);
          state <= S_RN_SHIFT;
        end

        S_RN_SHIFT: begin
          if (ct_q == 4'd0) begin
            state <= S_BYTEIN;
          end else if (all0) begin
            init_q <= 1'b0;
            state  <= init_q ? S_DEC : S_APPLY;
          end else begin
            if (!init_q) a_q <= a_q << 1;
            d_q  <= d_q << 1;
            sc_q <= dec_out;
            ct_q <= ct_q - 4'd1;
          end
        end

        S_BYTEIN: begin
          if (code_valid) begin
            d_q     <= d_q + (prev_ff ? {20'd0, code_byte, 1'b0} : {21'd0, code_byte});
            ct_q    <= prev_ff ? 4'd7 : 4'd8;
            prev_ff <= (code_byte == 8'hFF);
            state   <= S_RN_SHIFT;
          end
        end

        // Apply the decoding rules to the decision just decoded.
        S_APPLY: begin
          em_ret <= S_DEC;
          if (step_flag) begin
            mps_flag <= 1'b0;
            if (lps_q) begin                       // flag is LPS
              flag_prev <= 1'b1;
              em_bits   <= {1'b0, lps_sym, buf_q[0]};
              em_n      <= 2'd2;
            end else begin                         // flag is MPS
              flag_prev <= 1'b0;
              lps_flag  <= 1'b1;
              em_bits   <= {lps_sym, buf_q};
              em_n      <= 2'd3;
            end
            state <= S_EMIT;
          end else if (lps_q) begin
            if (mps_flag && !lps_flag) begin       // a flag decision follows
              lps_sym   <= dsym;
              step_flag <= 1'b1;
              state     <= S_RD;
            end else begin
              lps_flag <= !lps_flag;
              em_bits  <= {2'b00, dsym};
              em_n     <= 2'd1;
              state    <= S_EMIT;
            end
          end else if (lps_flag) begin             // MPS completing a window
            lps_flag <= 1'b0;
            em_bits  <= {2'b00, dsym};
            em_n     <= 2'd1;
            state    <= S_EMIT;
          end else if (!mps_flag) begin            // MPS opening a window
            mps_flag <= 1'b1;
            buf_q[0] <= dsym;
            state    <= S_RD2;
          end else begin                           // MPS: previous pair confirmed
            buf_q[0] <= dsym;
            em_bits  <= {1'b0, buf_q};
            em_n     <= 2'd2;
            em_ret   <= S_RD2;
            state    <= S_EMIT;
          end
        end

        S_EMIT: begin
          if (out_ready) begin
            out_cnt <= out_cnt + 32'd1;
            em_bits <= em_bits >> 1;
            em_n    <= em_n - 2'd1;
            if (em_n == 2'd1) state <= em_ret;
          end
        end

        S_RD2: state <= S_FILL;

        S_FILL: begin
          buf_q[1] <= lut_mps;
          state    <= S_DEC;
        end

        default: state <= S_IDLE;
      endcase
    end
  end

  // D stays below A: the top bit of D never carries out on a shift.
  a_d_in_range: assert property (@(posedge clk) disable iff (!rst_n)
    (state == S_RN_SHIFT && ct_q != 4'd0 && !all0) |-> !d_q[D_W-1]);

endmodule
