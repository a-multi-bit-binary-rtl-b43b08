// Shared constants and types of the ACA1 multi-bit binary arithmetic encoder.
//
// The coder keeps the interval width A in a 13-bit register whose top bit
// (bit 12) marks "unity"; renormalisation is due whenever that bit is 0, so
// the minimum normalised A is 13'h1000. Probability estimates are 12-bit Q
// values picked by a 5-bit index out of a 30-entry table. Each context holds
// a 6-bit state word: the MPS sense and the Q index. There are 2^10 regular
// contexts (the last ten coded symbols) and two extra contexts for the flag
// bits. The register widths (A 13, Q 12, B 8, bufout 8), the context length
// (10), the table sizes (30 x 12, 6-bit state word) and the adder, incrementer
// and decrementer widths follow the published architecture; the code-register
// layout and the Q values are this design's own choices (see aca_lut and
// aca_coder).
package aca_pkg;

  localparam int unsigned A_W    = 13;  // interval register A
  localparam int unsigned Q_W    = 12;  // probability estimate Q
  localparam int unsigned C_W    = 25;  // arithmetic part of the code register C
  localparam int unsigned CTX_W  = 10;  // context length (previous coded symbols)
  localparam int unsigned QIDX_W = 5;   // Q-table index
  localparam int unsigned NQ     = 30;  // Q-table entries
  localparam int unsigned SC_W   = 5;   // renormalisation shift counter

  localparam logic [A_W-1:0] A_INIT = 13'h1000;  // initial and minimum A

  // Contents of one context entry (one 6-bit word of the state memory).
  typedef struct packed {
    logic              mps;   // sense of the more probable symbol
    logic [QIDX_W-1:0] qidx;  // index into the Q table
  } ctx_state_t;

  // One code byte on the output side, used by the testbenches' scoreboards.
  typedef logic [7:0] code_byte_t;

endpackage
