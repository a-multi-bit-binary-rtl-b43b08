// Self-checking testbench for the ACA1 decoder (aca_dec_coder, inside
// aca_decoder).
//
// Test 1 runs a second decoder core on its own, with a fixed probability
// table in place of the adaptive one: MPS = 0 everywhere and Q = 13'h800
// for symbols, 13'h850 for flags. This is the hand-worked example of the
// method with A scaled from 9 to 13 bits, and its code is the two bytes
// 39 00 (the encoder testbench derives them). The decoder must return the
// windows 00 01 10 00 10 00.
//
// The other tests have the encoder (aca_encoder) produce code for known
// symbol streams and check that aca_decoder returns them: the same six
// windows with adaptive Q, a stream that ends on a dropped window, one that
// ends on a flag, a white stretch, noise, and random streams. The byte
// source inserts random gaps and the symbol sink random back-pressure.
// Each stream is coded and decoded after its own reset, as both sides must
// start from cleared context memories.
module tb_aca_decoder;
  logic       clk = 0, rst_n = 0;
  logic       in_valid = 0, in_ready, sym1 = 0, sym2 = 0, in_last = 0;
  logic [7:0] code;
  logic       buf_full, ack = 0, enc_done;
  logic       start = 0, dec_done, code_valid = 0, code_ready, out_valid, out_ready = 0, out_sym;
  logic [31:0] n_windows = 0;
  logic [7:0] code_byte = 0;

  aca_encoder enc (.clk, .rst_n, .in_valid, .in_ready, .sym1, .sym2, .in_last,
                   .code, .buf_full, .ack, .done(enc_done));
  aca_decoder dut (.clk, .rst_n, .start, .n_windows, .done(dec_done), .code_valid,
                   .code_ready, .code_byte, .out_valid, .out_ready, .out_sym);

  // Decoder core with a fixed probability table for the worked example.
  logic       ex_start = 0, ex_done, ex_code_ready, ex_lut_rd, ex_lut_sel_flag, ex_lut_flag_ctx;
  logic       ex_lut_upd, ex_lut_upd_lps, ex_ctx_shift, ex_ctx_sym, ex_out_valid, ex_out_sym;
  logic [11:0] ex_lut_q = 0;
  logic [7:0] ex_code_byte;
  int unsigned ex_bp = 0;
  byte unsigned ex_code [2] = '{8'h39, 8'h00};
  assign ex_code_byte = (ex_bp < 2) ? ex_code[ex_bp] : 8'h00;
  always @(posedge clk) begin
    if (ex_lut_rd) ex_lut_q <= ex_lut_sel_flag ? 12'h850 : 12'h800;
    if (ex_code_ready) ex_bp <= ex_bp + 1;
  end
  aca_dec_coder ex (.clk, .rst_n, .start(ex_start), .n_windows(32'd6), .done(ex_done),
                    .code_valid(1'b1), .code_ready(ex_code_ready), .code_byte(ex_code_byte),
                    .lut_ready(1'b1), .lut_rd(ex_lut_rd), .lut_sel_flag(ex_lut_sel_flag),
                    .lut_flag_ctx(ex_lut_flag_ctx), .lut_mps(1'b0), .lut_q(ex_lut_q),
                    .lut_upd(ex_lut_upd), .lut_upd_lps(ex_lut_upd_lps),
                    .ctx_shift(ex_ctx_shift), .ctx_sym(ex_ctx_sym),
                    .out_valid(ex_out_valid), .out_ready(1'b1), .out_sym(ex_out_sym));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  byte unsigned got [$];
  always @(posedge clk) begin
    ack <= 1'b0;
    if (rst_n && buf_full && !ack) begin
      got.push_back(code);
      ack <= 1'b1;
    end
  end

  bit syms [$];
  bit outq [$];
  longint unsigned n_a1a = 0, n_a1b = 0, n_pair_end = 0;

  always @(posedge clk) if (rst_n) begin
    if (dut.u_core.state == dut.u_core.S_APPLY && dut.u_core.step_flag) begin
      if (dut.u_core.lps_q) n_a1b++; else n_a1a++;
    end
    if (enc.u_coder.state == enc.u_coder.S_RD && enc.u_coder.step == enc.u_coder.D_TERM) n_pair_end++;
  end

  task automatic run_one(input string name);
    int unsigned nw, bp, nbad;
    nw = syms.size() / 2;
    got.delete();
    outq.delete();
    rst_n = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int i = 0; i < nw; i++) begin
      @(negedge clk);
      in_valid = 1; sym1 = syms[2 * i]; sym2 = syms[2 * i + 1]; in_last = (i == nw - 1);
      do @(posedge clk); while (!in_ready);
    end
    @(negedge clk);
    in_valid = 0;
    while (!enc_done) @(posedge clk);
    repeat (3) @(posedge clk);
    // decode
    @(negedge clk);
    n_windows = nw;
    start = 1;
    @(negedge clk);
    start = 0;
    bp = 0;
    fork
      begin : feeder
        forever begin
          @(negedge clk);
          code_valid = ($urandom % 4) != 0;
          code_byte  = (bp < got.size()) ? got[bp] : 8'h00;
          @(posedge clk);
          if (code_valid && code_ready) bp++;
        end
      end
      begin : sink
        forever begin
          @(negedge clk);
          out_ready = ($urandom % 3) != 0;
          @(posedge clk);
          if (out_valid && out_ready) outq.push_back(out_sym);
        end
      end
      begin
        while (!dec_done) @(posedge clk);
      end
    join_any
    disable feeder;
    disable sink;
    code_valid = 0;
    out_ready = 0;
    nbad = 0;
    check(outq.size() == syms.size(), $sformatf("%s: %0d symbols out, expected %0d", name, outq.size(), syms.size()));
    foreach (syms[i]) if (i < outq.size() && outq[i] != syms[i]) nbad++;
    check(nbad == 0, $sformatf("%s: %0d symbols differ", name, nbad));
  endtask

  task automatic run_example();
    bit exp [12] = '{0,0, 0,1, 1,0, 0,0, 1,0, 0,0};
    bit ex_out [$];
    int unsigned nbad = 0;
    rst_n = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    @(negedge clk) ex_start = 1;
    @(negedge clk) ex_start = 0;
    fork
      forever begin
        @(posedge clk);
        if (ex_out_valid) ex_out.push_back(ex_out_sym);
      end
      begin
        while (!ex_done) @(posedge clk);
        @(posedge clk);
      end
    join_any
    disable fork;
    check(ex_out.size() == 12, $sformatf("example: %0d symbols out, expected 12", ex_out.size()));
    foreach (exp[i]) if (i < ex_out.size() && ex_out[i] != exp[i]) nbad++;
    check(nbad == 0, $sformatf("example: %0d symbols differ", nbad));
    // Both code bytes were consumed (plus read-ahead zeros).
    check(ex_bp >= 2, "example: code bytes consumed");
  endtask

  initial begin
    run_example();
    syms = '{0,0, 0,1, 1,0, 0,0, 1,0, 0,0};
    run_one("example windows");
    syms = '{1,1, 0,0};
    run_one("ends on dropped window");
    syms = '{0,0, 1,0, 0,1};
    run_one("ends on LPS flag");
    syms.delete();
    for (int i = 0; i < 3000; i++) syms.push_back(0);
    for (int i = 0; i < 1000; i++) syms.push_back(1'($urandom));
    run_one("white then noise");
    for (int t = 0; t < 30; t++) begin
      int unsigned n, p;
      n = 2 * (1 + $urandom % 300);
      p = 1 + $urandom % 60;
      syms.delete();
      for (int i = 0; i < n; i++) syms.push_back(($urandom % 100) < p);
      run_one($sformatf("random %0d", t));
    end
    $display("flag MPS (A.1.a) %0d, flag LPS (A.1.b) %0d, terminated dropped windows %0d", n_a1a, n_a1b, n_pair_end);
    check(n_a1a > 0 && n_a1b > 0, "both flag rules exercised");
    check(n_pair_end > 0, "stream ending on a dropped window exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
