// Self-checking testbench for aca_alu: random operands for the 13-bit
// adder/subtractor, the 12-bit incrementer and the 5-bit decrementer and
// all-zeros detector, each compared with plain integer arithmetic.
module tb_aca_alu;
  import aca_pkg::*;

  logic [12:0] add_a, add_b, add_sum;
  logic        add_sub, cout;
  logic [11:0] inc_in;
  logic        inc_en;
  logic [12:0] inc_out;
  logic [4:0]  dec_in, dec_out;
  logic        all0;
  int checks = 0, failures = 0;

  aca_alu dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s: a=%h b=%h sub=%0d sum=%h cout=%0d inc=%h/%0d->%h dec=%0d->%0d all0=%0d",
               what, add_a, add_b, add_sub, add_sum, cout, inc_in, inc_en, inc_out, dec_in, dec_out, all0);
    end
  endtask

  initial begin
    int unsigned ia, ib, exp_sum;
    for (int n = 0; n < 3000; n++) begin
      add_a   = 13'($urandom);
      add_b   = 13'($urandom);
      add_sub = 1'($urandom);
      inc_in  = (n % 7 == 0) ? 12'hFFF : 12'($urandom);
      inc_en  = 1'($urandom);
      dec_in  = (n % 5 == 0) ? 5'd0 : 5'($urandom);
      #1;
      ia = add_a; ib = add_b;
      exp_sum = add_sub ? (ia + (ib ^ 32'h1FFF) + 1) : (ia + ib);
      check(add_sum == 13'(exp_sum), "sum");
      check(cout == exp_sum[13], "cout");
      if (add_sub) check(cout == (ia >= ib), "borrow");
      check(inc_out == 13'(32'(inc_in) + 32'(inc_en)), "incr");
      check(dec_out == 5'((32'(dec_in) + 31) % 32), "decr");
      check(all0 == (dec_in == 0), "all0");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
