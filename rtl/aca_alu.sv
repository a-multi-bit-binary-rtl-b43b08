// ALU of the ACA coder: a 13-bit adder, a 12-bit incrementer, a 5-bit
// decrementer and a 5-bit all-zeros detector, all purely combinational.
//
// The adder computes add_a + add_b, or add_a - add_b when add_sub is 1 (two's
// complement: inverted operand plus carry-in). It serves both A = A - Q and
// the low 13 bits of C = C + A; its carry out (cout) then tells the
// incrementer whether the upper 12 bits of C must be bumped. The incrementer
// returns 13 bits so its carry out, incr(12), is visible. The decrementer
// and the all-zeros detector count down the shifts still owed by a
// renormalisation. The set of units and their widths follow the published
// coder; the operand interface is this design's own.
module aca_alu
  import aca_pkg::*;
(
  input  logic [A_W-1:0]  add_a,
  input  logic [A_W-1:0]  add_b,
  input  logic            add_sub,   // 1: add_a - add_b, 0: add_a + add_b
  output logic [A_W-1:0]  add_sum,
  output logic            cout,      // carry out of the 13-bit adder
  input  logic [11:0]     inc_in,
  input  logic            inc_en,    // add 1 to inc_in when set
  output logic [12:0]     inc_out,   // inc_out[12] is incr(12), the carry out
  input  logic [SC_W-1:0] dec_in,
  output logic [SC_W-1:0] dec_out,   // dec_in - 1
  output logic            all0       // dec_in == 0
);

  logic [A_W:0] sum_full;

  always_comb begin
    sum_full = {1'b0, add_a} + {1'b0, (add_sub ? ~add_b : add_b)} + {{A_W{1'b0}}, add_sub};
    add_sum  = sum_full[A_W-1:0];
    cout     = sum_full[A_W];
    inc_out  = {1'b0, inc_in} + {12'd0, inc_en};
    dec_out  = dec_in - 1'b1;
    all0     = (dec_in == '0);
  end

endmodule
