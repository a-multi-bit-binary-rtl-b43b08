// Self-checking testbench for aca_lut. It waits for the clearing sequence
// (and checks that it takes 1026 cycles), then issues random reads of
// regular and flag contexts and random adaptations, keeping its own copy of
// every context word. Expected Q values come from a table worked out
// separately: Q[0] = 12'hAC0, Q[i] = max(1, round-half-up(Q[i-1] * 25/32)).
module tb_aca_lut;
  import aca_pkg::*;

  logic        clk = 0, rst_n = 0;
  logic        ready, rd_en = 0, sel_flag = 0, flag_ctx = 0, upd_en = 0, upd_lps = 0;
  logic [9:0]  ctx = 0;
  logic        mps;
  logic [4:0]  qidx;
  logic [11:0] q;
  int checks = 0, failures = 0;

  localparam logic [11:0] QEXP [30] = '{
    12'hAC0, 12'h866, 12'h690, 12'h521, 12'h402, 12'h322, 12'h273, 12'h1EA,
    12'h17F, 12'h12B, 12'h0EA, 12'h0B7, 12'h08F, 12'h070, 12'h058, 12'h045,
    12'h036, 12'h02A, 12'h021, 12'h01A, 12'h014, 12'h010, 12'h00D, 12'h00A,
    12'h008, 12'h006, 12'h005, 12'h004, 12'h003, 12'h002};

  bit          m_mps  [1026];
  int unsigned m_idx  [1026];
  int unsigned last_addr;
  int unsigned switches = 0, saturations = 0;

  aca_lut dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t: addr=%0d mps=%0d qidx=%0d q=%h model mps=%0d idx=%0d",
               what, $time, last_addr, mps, qidx, q, m_mps[last_addr], m_idx[last_addr]);
    end
  endtask

  initial begin
    int unsigned cyc;
    foreach (m_mps[i]) begin m_mps[i] = 0; m_idx[i] = 0; end
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    cyc = 0;
    while (!ready) begin @(negedge clk); cyc++; end
    check(cyc == 1026, $sformatf("clearing time (%0d cycles)", cyc));
    // Stimulus: a small set of hot addresses so that adaptation goes deep.
    for (int n = 0; n < 20000; n++) begin
      @(negedge clk);
      rd_en = 1;
      sel_flag = ($urandom % 4) == 0;
      flag_ctx = 1'($urandom);
      ctx = 10'($urandom % 8) | (($urandom % 16 == 0) ? 10'($urandom) : 10'd0);
      last_addr = sel_flag ? 1024 + 32'(flag_ctx) : 32'(ctx);
      @(negedge clk);
      rd_en = 0;
      check(mps == m_mps[last_addr], "mps");
      check(32'(qidx) == m_idx[last_addr], "qidx");
      check(q == QEXP[m_idx[last_addr]], "q");
      if ($urandom % 2) begin
        upd_en  = 1;
        upd_lps = ($urandom % 3) == 0;
        if (upd_lps) begin
          if (m_idx[last_addr] == 0) begin m_mps[last_addr] = !m_mps[last_addr]; switches++; end
          else m_idx[last_addr]--;
        end else if (m_idx[last_addr] < 29) m_idx[last_addr]++;
        else saturations++;
        @(negedge clk);
        upd_en = 0;
        // the registered copy follows the update
        check(mps == m_mps[last_addr], "mps after update");
        check(q == QEXP[m_idx[last_addr]], "q after update");
      end
    end
    check(switches > 0, "MPS switch exercised");
    check(saturations > 0, "index saturation exercised");
    $display("MPS switches %0d, saturations %0d", switches, saturations);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
