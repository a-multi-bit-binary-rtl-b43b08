// Look-up tables of the ACA coder: the context state memory, the Q-value
// table and the logic that adapts a context's Q index.
//
// State memory: NCTX + 2 words of 6 bits ({mps, qidx}), one per regular
// context (addressed by the 10-bit context register) and two for the flag
// bits (addressed by a one-bit flag context). Reads are synchronous: the
// address given with rd_en is registered together with the word read, and
// mps, qidx and q are valid from the next cycle on and stay valid until the
// next read. q comes from the 30 x 12 Q table indexed by the registered word.
//
// Adaptation: upd_en rewrites the most recently read word. upd_lps = 0 (a
// renormalisation after an MPS) moves the index one step towards smaller Q,
// saturating at the last entry; upd_lps = 1 (after an LPS) moves it one step
// back, and at index 0 flips the MPS sense instead. The rewritten word also
// replaces the registered copy. This is the usual shape of Q-coder
// adaptation; the exact published update rules are not reproduced here.
//
// Q table: Q[0] = 12'hAC0 and Q[i] = max(1, (Q[i-1]*25 + 16) / 32), a
// geometric ladder with ratio 25/32. The table's size is the published one,
// its contents are this design's own.
//
// After reset the memory is cleared to {mps = 0, qidx = 0}, one word per
// cycle; ready rises when that is done (NCTX + 2 cycles). Reads and updates
// are ignored until then.
module aca_lut
  import aca_pkg::*;
#(
  parameter int unsigned CW = CTX_W   // context length; 2**CW regular contexts
) (
  input  logic               clk,
  input  logic               rst_n,
  output logic               ready,
  // read port
  input  logic               rd_en,
  input  logic               sel_flag,   // 1: flag context, 0: regular context
  input  logic [CW-1:0]      ctx,        // regular context
  input  logic               flag_ctx,   // one-bit flag context
  output logic               mps,
  output logic [QIDX_W-1:0]  qidx,
  output logic [Q_W-1:0]     q,
  // adaptation of the word read last
  input  logic               upd_en,
  input  logic               upd_lps
);

  localparam int unsigned NCTX  = 2 ** CW;
  localparam int unsigned DEPTH = NCTX + 2;
  localparam int unsigned AW    = $clog2(DEPTH);

  typedef logic [Q_W-1:0] qtab_t [NQ];

  function automatic qtab_t make_qtab();
    qtab_t t;
    int unsigned v;
    v = 32'hAC0;
    for (int i = 0; i < NQ; i++) begin
      t[i] = v[Q_W-1:0];
      v = (v * 25 + 16) / 32;
      if (v == 0) v = 1;
    end
    return t;
  endfunction

  localparam qtab_t QTAB = make_qtab();

  ctx_state_t        mem [DEPTH];
  ctx_state_t        ent_q, ent_nxt;
  logic [AW-1:0]     addr_q, rd_addr, init_cnt;
  logic              init_busy;

  assign rd_addr = sel_flag ? AW'(NCTX + 32'(flag_ctx)) : AW'(ctx);

  // Adaptation of the registered word.
  always_comb begin
    ent_nxt = ent_q;
    if (upd_lps) begin
      if (ent_q.qidx == '0) ent_nxt.mps = ~ent_q.mps;
      else                  ent_nxt.qidx = ent_q.qidx - 1'b1;
    end else if (ent_q.qidx != QIDX_W'(NQ - 1)) begin
      ent_nxt.qidx = ent_q.qidx + 1'b1;
    end
  end

  // Clearing sequence after reset.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      init_busy <= 1'b1;
      init_cnt  <= '0;
    end else if (init_busy) begin
      if (init_cnt == AW'(DEPTH - 1)) init_busy <= 1'b0;
      init_cnt <= init_cnt + 1'b1;
    end
  end

  // State memory: one write port (clearing or adaptation), one read port.
  always_ff @(posedge clk) begin
    if (init_busy)   mem[init_cnt] <= '0;
    else if (upd_en) mem[addr_q]   <= ent_nxt;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      addr_q <= '0;
      ent_q  <= '0;
    end else if (!init_busy) begin
      if (rd_en) begin
        addr_q <= rd_addr;
        ent_q  <= mem[rd_addr];
      end else if (upd_en) begin
        ent_q  <= ent_nxt;
      end
    end
  end

  assign ready = ~init_busy;
  assign mps   = ent_q.mps;
  assign qidx  = ent_q.qidx;
  assign q     = (ent_q.qidx < QIDX_W'(NQ)) ? QTAB[ent_q.qidx] : QTAB[NQ-1];

endmodule
