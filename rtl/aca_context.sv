// Context register: the last CTX_W coded symbols, kept in a shift register.
//
// On every cycle with shift_en the coded symbol sym enters at bit 0 and the
// oldest symbol drops out of the top, so ctx[0] is always the most recent
// coded symbol. The 10-bit length follows the published design; the bit
// order and the all-zeros reset value are this design's own choices. A
// second MPS that the encoder drops from a window is never coded and so
// never shifted in.
module aca_context
  import aca_pkg::*;
#(
  parameter int unsigned W = CTX_W
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clear,     // synchronous return to all zeros
  input  logic         shift_en,
  input  logic         sym,
  output logic [W-1:0] ctx
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        ctx <= '0;
    else if (clear)    ctx <= '0;
    else if (shift_en) ctx <= {ctx[W-2:0], sym};
  end

endmodule
