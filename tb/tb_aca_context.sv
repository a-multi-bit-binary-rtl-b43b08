// Self-checking testbench for aca_context: random shift/clear traffic
// compared with an integer model of a 10-bit history register.
module tb_aca_context;
  logic       clk = 0, rst_n = 0, clear = 0, shift_en = 0, sym = 0;
  logic [9:0] ctx;
  int unsigned model = 0;
  int checks = 0, failures = 0;

  aca_context dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      checks++;
      if (ctx != 10'(model)) begin
        failures++;
        $display("FAIL cycle %0d: ctx=%b expected %b", n, ctx, 10'(model));
      end
      shift_en = ($urandom % 3) != 0;
      sym      = 1'($urandom);
      clear    = ($urandom % 200) == 0;
      if (clear)         model = 0;
      else if (shift_en) model = ((model << 1) | 32'(sym)) & 32'h3FF;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
