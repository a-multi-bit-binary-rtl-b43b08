// Self-checking testbench for aca_coder (coder datapath and its controller).
//
// The testbench stands in for the look-up tables (fixed MPS sense and fixed
// Q values for regular and flag decisions, one cycle read latency) and for
// the byte receiver (ack after a random delay, so the coder also stalls).
//
// Test 1 is the worked example of the ACA1 method scaled from 9-bit to
// 13-bit A (A starts at 13'h1000, Q = 13'h800 for symbols and 13'h850 for
// flags, MPS = 0) on the windows 00 01 10 00 10 00. It checks A after every
// window against the example's values times 16 (1000, 10A0, 1000, 1000,
// 16C0, 1D80), the number of dropped windows and flag bits, and the first
// two code bytes, 8'h39 and 8'h00: the example's decoder starts from a
// code register of 8'h39, and the final code value 0.00111001 (binary)
// follows from the coding rules by hand.
//
// Tests 2.. use random windows, MPS senses and Q values. A reference model
// codes the same windows with the textbook rules on an unbounded code value
// (a wide vector, no byte handling); the bytes from the coder are turned
// back into a number (a byte after 8'hFF overlaps it by one bit) and must
// equal the reference value exactly.
module tb_aca_coder;
  import aca_pkg::*;

  localparam int BW = 4096;

  logic        clk = 0, rst_n = 0;
  logic        in_valid = 0, in_ready, sym1 = 0, sym2 = 0, in_last = 0;
  logic        lut_rd, lut_sel_flag, lut_flag_ctx, lut_upd, lut_upd_lps;
  logic        lut_mps = 0;
  logic [11:0] lut_q = 0;
  logic        ctx_shift, ctx_sym;
  logic [7:0]  code;
  logic        buf_full, ack = 0, done;

  aca_coder dut (
    .clk, .rst_n, .in_valid, .in_ready, .sym1, .sym2, .in_last,
    .lut_ready(1'b1), .lut_rd, .lut_sel_flag, .lut_flag_ctx, .lut_mps, .lut_q,
    .lut_upd, .lut_upd_lps, .ctx_shift, .ctx_sym, .code, .buf_full, .ack, .done);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // Look-up table stand-in.
  bit          cur_mps;
  logic [11:0] cur_qr, cur_qf;
  always_ff @(posedge clk) if (lut_rd) begin
    lut_mps <= cur_mps;
    lut_q   <= lut_sel_flag ? cur_qf : cur_qr;
  end

  // Byte receiver with random latency.
  int unsigned ack_wait_max = 0;
  byte unsigned got [$];
  int unsigned stalls = 0, stuffs = 0, carries = 0, drops = 0, flags_m = 0, flags_l = 0;
  initial begin
    forever begin
      @(posedge clk);
      if (rst_n && buf_full && !ack) begin
        repeat ($urandom % (ack_wait_max + 1)) @(posedge clk);
        got.push_back(code);
        ack <= 1;
        @(posedge clk);
        ack <= 0;
      end
    end
  end

  // Mechanism counters, from the controller's state.
  always @(posedge clk) if (rst_n) begin
    if (dut.state == dut.S_BYTEOUT && dut.b_valid && dut.buf_full_q && !ack) stalls++;
    if (dut.state == dut.S_BYTEOUT && dut.b_valid && dut.b_q == 8'hFF) stuffs++;
    if (dut.state == dut.S_BYTEOUT && dut.c_q[24]) carries++;
    if (dut.state == dut.S_CMP2 && !dut.lps1_q && dut.sym2_q == lut_mps) drops++;
    if (dut.state == dut.S_RD && dut.step == dut.D_FLAG_M) flags_m++;
    if (dut.state == dut.S_RD && dut.step == dut.D_FLAG_L) flags_l++;
  end

  // Reference coder on an unbounded code value.
  logic [BW-1:0] rc;
  int unsigned   ra, rs;
  task automatic ref_decision(input bit lps, input int unsigned q);
    ra = ra - q;
    if (lps) begin rc = rc + BW'(ra); ra = q; end
    while (ra < 32'h1000) begin ra = ra << 1; rc = rc << 1; rs++; end
  endtask

  bit w1 [$], w2 [$];
  task automatic ref_code_all(input bit mps, input int unsigned qr, input int unsigned qf);
    bit lp;
    rc = '0; ra = 32'h1000; rs = 0; lp = 0;
    foreach (w1[i]) begin
      ref_decision(w1[i] != mps, qr);
      if (w1[i] != mps && lp) ref_decision(0, qf);
      if (w1[i] == mps && w2[i] == mps) lp = 1;
      else begin
        ref_decision(w2[i] != mps, qr);
        if (w1[i] == mps) ref_decision(1, qf);
        lp = 0;
      end
    end
    if (lp) ref_decision(0, qr);   // terminating MPS after a dropped last window
  endtask

  // Drive the windows in w1/w2, collect bytes until done.
  logic [12:0] a_after [$];
  task automatic run_stream();
    got.delete();
    a_after.delete();
    foreach (w1[i]) begin
      @(negedge clk);
      in_valid = 1; sym1 = w1[i]; sym2 = w2[i]; in_last = (i == w1.size() - 1);
      do @(posedge clk); while (!in_ready);
      @(negedge clk);
      in_valid = 0;
      while (dut.state != dut.S_WIN_END) @(negedge clk);
      a_after.push_back(dut.a_q);
    end
    while (!done) @(posedge clk);
    @(posedge clk);
  endtask

  task automatic compare_value(input string name);
    logic [BW-1:0] v;
    int unsigned   l, sh;
    bit            prev_ff;
    v = '0; l = 0; prev_ff = 0;
    foreach (got[i]) begin
      sh = prev_ff ? 7 : 8;
      v = (v << sh) + BW'(got[i]);
      l += sh;
      prev_ff = (got[i] == 8'hFF);
    end
    if (l >= 12 + rs) check((rc << (l - 12 - rs)) == v, name);
    else              check((v << (12 + rs - l)) == rc, name);
  endtask

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;

    // Test 1: the worked example, scaled to 13-bit A.
    cur_mps = 0; cur_qr = 12'h800; cur_qf = 12'h850; ack_wait_max = 0;
    w1 = '{0, 0, 1, 0, 1, 0};
    w2 = '{0, 1, 0, 0, 0, 0};
    drops = 0; flags_m = 0; flags_l = 0;
    run_stream();
    begin
      logic [12:0] a_exp [6] = '{13'h1000, 13'h10A0, 13'h1000, 13'h1000, 13'h16C0, 13'h1D80};
      for (int i = 0; i < 6; i++) begin
        check(a_after[i] == a_exp[i], $sformatf("example A after window %0d: %h, expected %h", i + 1, a_after[i], a_exp[i]));
      end
    end
    check(drops == 3, $sformatf("example dropped windows %0d, expected 3", drops));
    check(flags_m == 1 && flags_l == 1, $sformatf("example flags %0d/%0d, expected 1/1", flags_m, flags_l));
    check(got.size() >= 2 && got[0] == 8'h39 && got[1] == 8'h00, "example first code bytes 39 00");
    ref_code_all(0, 12'h800, 12'h850);
    compare_value("example code value");

    // Tests 2..: random streams.
    for (int t = 0; t < 150; t++) begin
      int unsigned n, pl;
      n = 1 + $urandom % 80;
      cur_mps = 1'($urandom);
      cur_qr = 12'(1 + $urandom % 12'hAC0);
      cur_qf = 12'(1 + $urandom % 12'hAC0);
      if (t % 3 == 0) begin cur_qr = 12'(1 + $urandom % 8); end
      ack_wait_max = $urandom % 12;
      pl = (t % 4 == 0) ? 50 : ((t % 4 == 1) ? 20 : 5);
      w1.delete(); w2.delete();
      for (int i = 0; i < n; i++) begin
        w1.push_back(($urandom % 100 < pl) ? !cur_mps : cur_mps);
        w2.push_back(($urandom % 100 < pl) ? !cur_mps : cur_mps);
      end
      run_stream();
      ref_code_all(cur_mps, cur_qr, cur_qf);
      compare_value($sformatf("random stream %0d (n=%0d qr=%h qf=%h)", t, n, cur_qr, cur_qf));
    end

    check(stalls > 0, "output stall exercised");
    check(stuffs > 0, "bit stuffing after 8'hFF exercised");
    check(carries > 0, "carry into B exercised");
    $display("stalls %0d, stuffed bytes %0d, carries %0d, flags %0d/%0d", stalls, stuffs, carries, flags_m, flags_l);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #50000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
