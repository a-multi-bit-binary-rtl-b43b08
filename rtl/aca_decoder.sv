// ACA1 binary arithmetic decoder: look-up tables, decoder core and context
// register, wired like the encoder (the published block diagram serves for
// both directions).
//
// start with n_windows begins a code stream; code bytes are taken with
// code_valid/code_ready (the source supplies zeros once the code has ended);
// the decoded symbols leave one per out_valid/out_ready transfer in their
// original order, and done pulses after the last of the 2 * n_windows
// symbols. The decoder's context register and context memory must start in
// the same state as the encoder's: both clear them at reset, so one reset
// precedes each stream pair. After reset the look-up tables need 1026
// cycles to clear before start is taken.
module aca_decoder
  import aca_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic [31:0] n_windows,
  output logic        done,
  input  logic        code_valid,
  output logic        code_ready,
  input  logic [7:0]  code_byte,
  output logic        out_valid,
  input  logic        out_ready,
  output logic        out_sym
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

  aca_dec_coder u_core (
    .clk          (clk),
    .rst_n        (rst_n),
    .start        (start),
    .n_windows    (n_windows),
    .done         (done),
    .code_valid   (code_valid),
    .code_ready   (code_ready),
    .code_byte    (code_byte),
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
    .out_valid    (out_valid),
    .out_ready    (out_ready),
    .out_sym      (out_sym)
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
