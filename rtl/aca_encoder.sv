// ACA1 binary arithmetic encoder, top level: look-up tables, coder and
// context register wired as in the published block diagram.
//
// Two symbols enter per accepted window; the coder looks up the MPS sense
// and the Q value of the current context in the look-up tables, codes the
// window (dropping the second of two MPS symbols and inserting flag bits
// where the decoder would otherwise be left guessing), shifts every coded
// symbol into the context register, whose contents address the look-up
// tables, and delivers the code one byte at a time.
//
// Interface:
//   in_valid/in_ready  window handshake; sym1 is the earlier symbol, sym2
//                      the later one; in_last marks the final window, after
//                      which the code stream is flushed and done pulses.
//   code/buf_full/ack  byte output: buf_full is high while code holds a
//                      byte; one cycle of ack takes it.
// After reset the look-up tables clear their 1026 context words, one per
// cycle, and in_ready stays low until they are done. A window takes from
// about 10 cycles (two MPS symbols, no renormalisation) to a few tens of
// cycles; the published work quotes no cycle counts to compare with.
module aca_encoder
  import aca_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  output logic       in_ready,
  input  logic       sym1,
  input  logic       sym2,
  input  logic       in_last,
  output logic [7:0] code,
  output logic       buf_full,
  input  logic       ack,
  output logic       done
);

  logic             lut_ready, lut_rd, lut_sel_flag, lut_flag_ctx;
  logic             lut_mps, lut_upd, lut_upd_lps;
  logic [Q_W-1:0]   lut_q;
  logic             ctx_shift, ctx_sym;
  logic [CTX_W-1:0] ctx;

  aca_lut u_lut (
    .clk      (clk),
    .rst_n    (rst_n),
    .ready    (lut_ready),
    .rd_en    (lut_rd),
    .sel_flag (lut_sel_flag),
    .ctx      (ctx),
    .flag_ctx (lut_flag_ctx),
    .mps      (lut_mps),
    .qidx     (),
    .q        (lut_q),
    .upd_en   (lut_upd),
    .upd_lps  (lut_upd_lps)
  );

  aca_coder u_coder (
    .clk          (clk),
    .rst_n        (rst_n),
    .in_valid     (in_valid),
    .in_ready     (in_ready),
    .sym1         (sym1),
    .sym2         (sym2),
    .in_last      (in_last),
    .lut_ready    (lut_ready),
    .lut_rd       (lut_rd),
    .lut_sel_flag (lut_sel_flag),
    .lut_flag_ctx (lut_flag_ctx),
    .lut_mps      (lut_mps),
    .lut_q        (lut_q),
    .lut_upd      (lut_upd),
    .lut_upd_lps  (lut_upd_lps),
    .ctx_shift    (ctx_shift),
    .ctx_sym      (ctx_sym),
    .code         (code),
    .buf_full     (buf_full),
    .ack          (ack),
    .done         (done)
  );

  aca_context u_ctx (
    .clk      (clk),
    .rst_n    (rst_n),
    .clear    (1'b0),
    .shift_en (ctx_shift),
    .sym      (ctx_sym),
    .ctx      (ctx)
  );

endmodule
