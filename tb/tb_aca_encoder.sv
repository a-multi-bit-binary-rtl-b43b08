// End-to-end testbench of the ACA1 encoder (aca_encoder at its default
// parameters: 10-bit context, 1026 context words, 30-entry Q table).
//
// It codes a synthetic binary image (runs of white with dark blobs: each
// pixel repeats its left neighbour, flipping with 3% probability where it
// agrees with the pixel above and 50% where it does not), followed by a
// long white stretch and a stream of fair coin flips, as one code stream. The receiver acknowledges
// bytes after random delays, so the encoder also stalls on a full output
// buffer. The byte stream is then decoded by a behavioural decoder built
// from the method's decoding rules (aca_ref_pkg) and must give back every
// symbol; the number of binary decisions the decoder needs must equal the
// number the encoder coded. Every mechanism of the encoder must occur:
// dropped MPS, flags of both senses, renormalisation, carry into the held
// byte, bit stuffing after 8'hFF, output stalls, MPS switches and Q-index
// saturation in the look-up tables.
module tb_aca_encoder;
  import aca_ref_pkg::*;

  localparam int W = 64;        // image width (pixels)
  localparam int H = 48;        // image height (rows)
  localparam int BLANK = 40000; // white pixels appended to the image
  localparam int NOISE = 2048;  // fair coin flips appended after them

  logic       clk = 0, rst_n = 0;
  logic       in_valid = 0, in_ready, sym1 = 0, sym2 = 0, in_last = 0;
  logic [7:0] code;
  logic       buf_full, ack = 0, done;

  aca_encoder dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  bit img [$];
  task automatic make_data();
    bit row_prev [], row_cur [];
    row_prev = new[W];
    row_cur  = new[W];
    foreach (row_prev[i]) row_prev[i] = 0;
    for (int r = 0; r < H; r++) begin
      for (int c = 0; c < W; c++) begin
        bit left, flip;
        left = (c == 0) ? row_prev[0] : row_cur[c - 1];
        flip = (left == row_prev[c]) ? ($urandom % 100 < 3) : ($urandom % 100 < 50);
        row_cur[c] = left ^ flip;
        img.push_back(row_cur[c]);
      end
      row_prev = row_cur;
    end
    for (int i = 0; i < BLANK; i++) img.push_back(1'b0);
    for (int i = 0; i < NOISE; i++) img.push_back(1'($urandom));
  endtask

  // Receiver: random acknowledge delay, now and then a long one.
  byte unsigned got [$];
  initial begin
    forever begin
      @(posedge clk);
      if (rst_n && buf_full && !ack) begin
        repeat (($urandom % 8 == 0) ? 200 : $urandom % 3) @(posedge clk);
        got.push_back(code);
        ack <= 1;
        @(posedge clk);
        ack <= 0;
      end
    end
  end

  // Mechanism counters.
  longint unsigned n_drop = 0, n_flag_m = 0, n_flag_l = 0, n_renorm = 0, n_carry = 0,
                   n_stuff = 0, n_stall = 0, n_switch = 0, n_sat = 0, n_dec = 0, cycles = 0;
  always @(posedge clk) if (rst_n) begin
    cycles++;
    if (dut.u_coder.state == dut.u_coder.S_CMP2 && !dut.u_coder.lps1_q &&
        dut.u_coder.sym2_q == dut.u_coder.lut_mps) n_drop++;
    if (dut.u_coder.state == dut.u_coder.S_RD && dut.u_coder.step == dut.u_coder.D_FLAG_M) n_flag_m++;
    if (dut.u_coder.state == dut.u_coder.S_RD && dut.u_coder.step == dut.u_coder.D_FLAG_L) n_flag_l++;
    if (dut.u_coder.state == dut.u_coder.S_SUB) n_dec++;
    if (dut.u_coder.state == dut.u_coder.S_RN_START) n_renorm++;
    if (dut.u_coder.state == dut.u_coder.S_BYTEOUT && dut.u_coder.c_q[24]) n_carry++;
    if (dut.u_coder.state == dut.u_coder.S_BYTEOUT && dut.u_coder.b_valid && dut.u_coder.b_q == 8'hFF) n_stuff++;
    if (dut.u_coder.state == dut.u_coder.S_BYTEOUT && dut.u_coder.b_valid && buf_full && !ack) n_stall++;
    if (dut.u_lut.upd_en && dut.u_lut.upd_lps && dut.u_lut.ent_q.qidx == 0) n_switch++;
    if (dut.u_lut.upd_en && !dut.u_lut.upd_lps && dut.u_lut.ent_q.qidx == 29) n_sat++;
  end

  initial begin
    int unsigned nwin, nbad;
    bit out [$];
    AcaRefDecoder dec;
    make_data();
    nwin = img.size() / 2;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int i = 0; i < nwin; i++) begin
      @(negedge clk);
      in_valid = 1; sym1 = img[2 * i]; sym2 = img[2 * i + 1]; in_last = (i == nwin - 1);
      do @(posedge clk); while (!in_ready);
    end
    @(negedge clk);
    in_valid = 0; in_last = 0;
    while (!done) @(posedge clk);
    repeat (2) @(posedge clk);
    $display("%0d symbols -> %0d bytes in %0d cycles", img.size(), got.size(), cycles);

    dec = new(got);
    dec.decode(nwin, out);
    nbad = 0;
    foreach (img[i]) if (out[i] != img[i]) begin
      if (nbad < 5) $display("mismatch at symbol %0d: decoded %0d, sent %0d", i, out[i], img[i]);
      nbad++;
    end
    check(out.size() == img.size(), "decoded length");
    check(nbad == 0, $sformatf("round trip: %0d symbols differ", nbad));
    check(dec.decisions == n_dec, $sformatf("decisions: decoder %0d, encoder %0d", dec.decisions, n_dec));
    check(got.size() < img.size() / 8, "stream is compressed");

    $display("drops %0d, flags MPS-sense %0d, LPS-sense %0d, renorms %0d, carries %0d, stuffed %0d, stalls %0d, MPS switches %0d, saturations %0d",
             n_drop, n_flag_m, n_flag_l, n_renorm, n_carry, n_stuff, n_stall, n_switch, n_sat);
    check(n_drop > 0, "dropped second MPS");
    check(n_flag_m > 0, "flag coded as MPS");
    check(n_flag_l > 0, "flag coded as LPS");
    check(n_renorm > 0, "renormalisation");
    check(n_carry > 0, "carry into held byte");
    check(n_stuff > 0, "bit stuffing after 8'hFF");
    check(n_stall > 0, "output stall");
    check(n_switch > 0, "MPS switch");
    check(n_sat > 0, "Q-index saturation");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
