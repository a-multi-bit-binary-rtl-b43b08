// Reference models for the testbenches of the ACA1 encoder and decoder.
//
// AcaModel holds a behavioural copy of the adaptive probability model: the
// 1026 context words ({mps, qidx}), the 10-bit context history, the sense of
// the last flag bit, and the Q table, written out here as numbers
// (Q[0] = 12'hAC0, Q[i] = max(1, round-half-up(Q[i-1] * 25/32))).
//
// AcaRefDecoder decodes an ACA1 byte stream back into symbols with the
// decoding rules of the method: it decodes one binary decision at a time
// (A = A - Q; LPS when the code offset is at least A), and turns decisions
// into symbols with the window rules: an MPS at the start of a window stands
// for two symbols (the second being the MPS of the context that includes the
// first) until an LPS follows, in which case a flag decision says whether
// the MPS stood for one symbol (flag coded as LPS) or two (flag coded as
// MPS). A stream whose last window was dropped ends with one more MPS
// decision that confirms the pair. Bytes are read MSB first; a byte after 8'hFF overlaps it by one bit.
// Past the end of the stream it reads zeros.
package aca_ref_pkg;

  localparam logic [11:0] QTAB [30] = '{
    12'hAC0, 12'h866, 12'h690, 12'h521, 12'h402, 12'h322, 12'h273, 12'h1EA,
    12'h17F, 12'h12B, 12'h0EA, 12'h0B7, 12'h08F, 12'h070, 12'h058, 12'h045,
    12'h036, 12'h02A, 12'h021, 12'h01A, 12'h014, 12'h010, 12'h00D, 12'h00A,
    12'h008, 12'h006, 12'h005, 12'h004, 12'h003, 12'h002};

  class AcaModel;
    bit          mps [1026];
    int unsigned idx [1026];
    int unsigned ctx;
    bit          fprev;

    function new();
      foreach (mps[i]) begin mps[i] = 0; idx[i] = 0; end
      ctx = 0;
      fprev = 0;
    endfunction

    function void adapt(int unsigned addr, bit lps);
      if (lps) begin
        if (idx[addr] == 0) mps[addr] = !mps[addr];
        else idx[addr]--;
      end else if (idx[addr] < 29) idx[addr]++;
    endfunction

    function void shift(bit s);
      ctx = ((ctx << 1) | 32'(s)) & 32'h3FF;
    endfunction
  endclass

  class AcaRefDecoder;
    AcaModel        m;
    byte unsigned   bytes [$];
    int unsigned    bp;
    bit             prevff;
    longint         d;       // code offset, with nb extra fraction bits
    int             nb;
    int unsigned    a;
    int unsigned    decisions;
    bit             last_lps;

    function new(byte unsigned code [$]);
      m = new();
      bytes = code;
      bp = 0; prevff = 0; d = 0; nb = -12; a = 32'h1000; decisions = 0; last_lps = 0;
      fetch();
    endfunction

    function void fetch();
      int unsigned b, sh;
      while (nb < 16) begin
        b = (bp < bytes.size()) ? 32'(bytes[bp]) : 0;
        bp++;
        sh = prevff ? 7 : 8;
        d = (d << sh) + longint'(b);
        nb += sh;
        prevff = (b == 32'hFF);
      end
    endfunction

    // Decode one decision with context word addr; returns 1 for LPS.
    function bit decide(int unsigned addr);
      int unsigned q;
      bit lps, renorm;
      q = QTAB[m.idx[addr]];
      a = a - q;
      lps = ((d >>> nb) >= longint'(a));
      if (lps) begin
        d = d - (longint'(a) <<< nb);
        a = q;
      end
      renorm = (a < 32'h1000);
      while (a < 32'h1000) begin
        a = a << 1;
        nb--;
      end
      fetch();
      if (renorm) m.adapt(addr, lps);
      decisions++;
      return lps;
    endfunction

    // Symbol of a regular decision (the MPS sense is taken before adapting).
    function bit dec_sym();
      bit mps0;
      mps0 = m.mps[m.ctx];
      last_lps = decide(m.ctx);
      return mps0 ^ last_lps;
    endfunction

    function void decode(int unsigned nwin, ref bit out [$]);
      bit pending, s1, mps2, sym, f, s2;
      pending = 0; s1 = 0; mps2 = 0;
      out.delete();
      while (out.size() < 2 * nwin) begin
        sym = dec_sym();
        if (!pending) begin
          if (!last_lps) begin
            s1 = sym; m.shift(s1); mps2 = m.mps[m.ctx]; pending = 1;
          end else begin
            out.push_back(sym); m.shift(sym);
            s2 = dec_sym(); out.push_back(s2); m.shift(s2);
          end
        end else begin
          if (!last_lps) begin
            out.push_back(s1); out.push_back(mps2);
            s1 = sym; m.shift(s1); mps2 = m.mps[m.ctx];
          end else begin
            f = decide(1024 + 32'(m.fprev));
            if (f) begin
              out.push_back(s1); out.push_back(sym); m.shift(sym);
              m.fprev = 1; pending = 0;
            end else begin
              out.push_back(s1); out.push_back(mps2);
              m.fprev = 0;
              out.push_back(sym); m.shift(sym);
              s2 = dec_sym(); out.push_back(s2); m.shift(s2);
              pending = 0;
            end
          end
        end
      end
    endfunction
  endclass

endpackage
