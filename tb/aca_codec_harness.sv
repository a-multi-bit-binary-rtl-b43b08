// End-to-end test harness for aca_codec, used by tb_aca_codec (small image)
// and tb_aca_codec_full (a full fax page, 1728 x 2376 pixels).
//
// It builds a synthetic binary image (white with dark blobs: each pixel
// repeats its left neighbour, flipping with FLIP_AGREE per mille where that
// neighbour agrees with the pixel above and 50% where it does not), then a
// white stretch and some coin flips, and codes it with the encoder half of
// the codec. The code bytes go into a queue as they appear (acknowledged
// after random delays) and feed the decoder half at the same time, which
// stalls when the queue runs dry and gets zeros once the code has ended;
// the decoded symbols are taken with random back-pressure. Checks: every
// decoded symbol equals the source; a behavioural decoder written from the
// method's rules (aca_ref_pkg) also recovers the source from the same bytes
// and needs as many decisions as the encoder coded. Every mechanism must
// occur at least once, and the run reports how often each did. It also
// counts the encoder's additions/subtractions and checks that they are
// fewer than the classic Q-coder step would need on the same symbols.
module aca_codec_harness #(
  parameter int W     = 64,
  parameter int H     = 48,
  parameter int BLANK = 40000,
  parameter int NOISE = 2048,
  parameter int ACK_SLOW = 8,     // one acknowledge in ACK_SLOW waits long
  parameter int FLIP_AGREE = 30   // flip probability, per mille, where left and above agree
);
  import aca_ref_pkg::*;

  logic        clk = 0, rst_n = 0;
  logic        enc_in_valid = 0, enc_in_ready, enc_sym1 = 0, enc_sym2 = 0, enc_in_last = 0;
  logic [7:0]  enc_code;
  logic        enc_buf_full, enc_ack = 0, enc_done;
  logic        dec_start = 0, dec_done, dec_code_valid = 0, dec_code_ready;
  logic [31:0] dec_n_windows = 0;
  logic [7:0]  dec_code_byte = 0;
  logic        dec_out_valid, dec_out_ready = 0, dec_out_sym;

  aca_codec dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  bit img [];
  int unsigned nsym;
  task automatic make_data();
    bit row_prev [], row_cur [];
    int unsigned k;
    nsym = W * H + BLANK + NOISE;
    img = new[nsym];
    row_prev = new[W];
    row_cur  = new[W];
    foreach (row_prev[i]) row_prev[i] = 0;
    k = 0;
    for (int r = 0; r < H; r++) begin
      for (int c = 0; c < W; c++) begin
        bit left, flip;
        left = (c == 0) ? row_prev[0] : row_cur[c - 1];
        flip = (left == row_prev[c]) ? ($urandom % 1000 < FLIP_AGREE) : ($urandom % 100 < 50);
        row_cur[c] = left ^ flip;
        img[k++] = row_cur[c];
      end
      row_prev = row_cur;
    end
    for (int i = 0; i < BLANK; i++) img[k++] = 1'b0;
    for (int i = 0; i < NOISE; i++) img[k++] = 1'($urandom);
  endtask

  // Encoder output: acknowledge after random delays, queue the bytes.
  byte unsigned got [$];
  initial begin
    forever begin
      @(posedge clk);
      if (rst_n && enc_buf_full && !enc_ack) begin
        repeat (($urandom % ACK_SLOW == 0) ? 200 : $urandom % 3) @(posedge clk);
        got.push_back(enc_code);
        enc_ack <= 1;
        @(posedge clk);
        enc_ack <= 0;
      end
    end
  end

  // Decoder input: bytes from the queue, zeros after the encoder is done.
  int unsigned bp = 0;
  bit          enc_finished = 0;
  always @(negedge clk) begin
    dec_code_valid = (bp < got.size()) || enc_finished;
    dec_code_byte  = (bp < got.size()) ? got[bp] : 8'h00;
    dec_out_ready  = ($urandom % 4) != 0;
  end
  always @(posedge clk) if (dec_code_valid && dec_code_ready) bp++;

  // Decoder output.
  bit outq [$];
  always @(posedge clk) if (dec_out_valid && dec_out_ready) outq.push_back(dec_out_sym);

  // Mechanism counters.
  longint unsigned n_drop = 0, n_flag_m = 0, n_flag_l = 0, n_renorm = 0, n_carry = 0,
                   n_stuff = 0, n_stall = 0, n_switch = 0, n_sat = 0, n_dec = 0, n_term = 0,
                   n_starve = 0, n_backp = 0, n_a1a = 0, n_a1b = 0, n_a2 = 0, n_b1 = 0,
                   n_b2 = 0, n_b3 = 0, n_add = 0, n_lps_reg = 0, cycles = 0;
  always @(posedge clk) if (rst_n) begin
    cycles++;
    if (dut.u_enc.u_coder.state == dut.u_enc.u_coder.S_CMP2 && !dut.u_enc.u_coder.lps1_q &&
        dut.u_enc.u_coder.sym2_q == dut.u_enc.u_coder.lut_mps) n_drop++;
    if (dut.u_enc.u_coder.state == dut.u_enc.u_coder.S_RD) begin
      if (dut.u_enc.u_coder.step == dut.u_enc.u_coder.D_FLAG_M) n_flag_m++;
      if (dut.u_enc.u_coder.step == dut.u_enc.u_coder.D_FLAG_L) n_flag_l++;
      if (dut.u_enc.u_coder.step == dut.u_enc.u_coder.D_TERM) n_term++;
    end
    if (dut.u_enc.u_coder.state == dut.u_enc.u_coder.S_SUB) n_dec++;
    if (dut.u_enc.u_coder.state == dut.u_enc.u_coder.S_ADD) begin
      n_add++;
      if (dut.u_enc.u_coder.step inside {dut.u_enc.u_coder.D_SYM1, dut.u_enc.u_coder.D_SYM2}) n_lps_reg++;
    end
    if (dut.u_enc.u_coder.state == dut.u_enc.u_coder.S_RN_START) n_renorm++;
    if (dut.u_enc.u_coder.state == dut.u_enc.u_coder.S_BYTEOUT && dut.u_enc.u_coder.can_write &&
        dut.u_enc.u_coder.c_q[24]) n_carry++;
    if (dut.u_enc.u_coder.state == dut.u_enc.u_coder.S_BYTEOUT && dut.u_enc.u_coder.b_valid &&
        dut.u_enc.u_coder.can_write && dut.u_enc.u_coder.b_q == 8'hFF) n_stuff++;
    if (dut.u_enc.u_coder.state == dut.u_enc.u_coder.S_BYTEOUT && dut.u_enc.u_coder.b_valid &&
        enc_buf_full && !enc_ack) n_stall++;
    if (dut.u_enc.u_lut.upd_en && dut.u_enc.u_lut.upd_lps && dut.u_enc.u_lut.ent_q.qidx == 0) n_switch++;
    if (dut.u_enc.u_lut.upd_en && !dut.u_enc.u_lut.upd_lps && dut.u_enc.u_lut.ent_q.qidx == 29) n_sat++;
    if (dec_code_ready && !dec_code_valid) n_starve++;
    if (dec_out_valid && !dec_out_ready) n_backp++;
    if (dut.u_dec.u_core.state == dut.u_dec.u_core.S_APPLY) begin
      if (dut.u_dec.u_core.step_flag) begin
        if (dut.u_dec.u_core.lps_q) n_a1b++; else n_a1a++;
      end else if (dut.u_dec.u_core.lps_q) begin
        if (!(dut.u_dec.u_core.mps_flag && !dut.u_dec.u_core.lps_flag)) n_a2++;
      end else if (dut.u_dec.u_core.lps_flag) n_b1++;
      else if (!dut.u_dec.u_core.mps_flag) n_b2++;
      else n_b3++;
    end
  end

  task automatic count(input longint unsigned n, input string what);
    check(n > 0, $sformatf("mechanism never happened: %s", what));
  endtask

  initial begin
    int unsigned nwin, nbad;
    bit ref_out [$];
    AcaRefDecoder ref_dec;
    make_data();
    nwin = nsym / 2;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    // Both halves clear their context memories; start the decoder at once,
    // it waits for them.
    @(negedge clk);
    dec_n_windows = nwin;
    dec_start = 1;
    while (!dut.u_dec.u_lut.ready) @(negedge clk);
    @(negedge clk);
    dec_start = 0;
    for (int i = 0; i < nwin; i++) begin
      @(negedge clk);
      enc_in_valid = 1; enc_sym1 = img[2 * i]; enc_sym2 = img[2 * i + 1]; enc_in_last = (i == nwin - 1);
      do @(posedge clk); while (!enc_in_ready);
    end
    @(negedge clk);
    enc_in_valid = 0; enc_in_last = 0;
    while (!enc_done) @(posedge clk);
    repeat (2) @(posedge clk);
    enc_finished = 1;
    $display("encoded %0d symbols into %0d bytes by cycle %0d (%0.2f bits/symbol)",
             nsym, got.size(), cycles, 8.0 * got.size() / nsym);
    while (!dec_done) @(posedge clk);
    repeat (2) @(posedge clk);
    $display("decoded by cycle %0d", cycles);

    nbad = 0;
    check(outq.size() == nsym, $sformatf("decoder gave %0d symbols, expected %0d", outq.size(), nsym));
    for (int i = 0; i < nsym && i < outq.size(); i++) if (outq[i] != img[i]) begin
      if (nbad < 5) $display("decoder mismatch at symbol %0d", i);
      nbad++;
    end
    check(nbad == 0, $sformatf("RTL decoder: %0d symbols differ", nbad));

    ref_dec = new(got);
    ref_dec.decode(nwin, ref_out);
    nbad = 0;
    for (int i = 0; i < nsym; i++) if (ref_out[i] != img[i]) nbad++;
    check(ref_out.size() == nsym && nbad == 0, $sformatf("reference decoder: %0d symbols differ", nbad));
    check(ref_dec.decisions == n_dec, $sformatf("decisions: reference %0d, encoder %0d", ref_dec.decisions, n_dec));

    $display("encoder: %0d decisions, drops %0d, flags MPS-sense %0d, LPS-sense %0d, terminations %0d, renorms %0d",
             n_dec, n_drop, n_flag_m, n_flag_l, n_term, n_renorm);
    $display("         carries %0d, stuffed bytes %0d, output stall cycles %0d, MPS switches %0d, saturations %0d",
             n_carry, n_stuff, n_stall, n_switch, n_sat);
    $display("decoder: rules A.1.a %0d, A.1.b %0d, A.2 %0d, B.1 %0d, B.2 %0d, B.3 %0d, starved %0d, back-pressured %0d",
             n_a1a, n_a1b, n_a2, n_b1, n_b2, n_b3, n_starve, n_backp);
    // Arithmetic work. Every coded decision costs one subtraction (A - Q)
    // and every LPS one addition (C + A). The classic Q-coder step spends
    // two operations on each MPS (C + Q and A - Q) and none on an LPS, so
    // with the same symbols it would need 2 * (symbols - LPS symbols).
    begin
      longint unsigned aca_ops, q_ops;
      aca_ops = n_dec + n_add;
      q_ops   = 2 * (longint'(nsym) - n_lps_reg);
      $display("additions/subtractions: %0d (%0.3f per symbol); Q-coder step on the same symbols: %0d (%0.1f %% fewer)",
               aca_ops, real'(aca_ops) / nsym, q_ops, 100.0 * (1.0 - real'(aca_ops) / real'(q_ops)));
      check(aca_ops < q_ops, "fewer additions/subtractions than the Q-coder step");
    end
    count(n_drop, "dropped second MPS");
    count(n_flag_m, "flag coded as MPS");
    count(n_flag_l, "flag coded as LPS");
    count(n_renorm, "renormalisation");
    count(n_carry, "carry into held byte");
    count(n_stuff, "bit stuffing after 8'hFF");
    count(n_stall, "encoder output stall");
    count(n_switch, "MPS switch");
    count(n_sat, "Q-index saturation");
    count(n_a1a, "decoder rule A.1.a");
    count(n_a1b, "decoder rule A.1.b");
    count(n_a2, "decoder rule A.2");
    count(n_b1, "decoder rule B.1");
    count(n_b2, "decoder rule B.2");
    count(n_b3, "decoder rule B.3");
    count(n_starve, "decoder waiting for code");
    count(n_backp, "decoder output back-pressure");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
