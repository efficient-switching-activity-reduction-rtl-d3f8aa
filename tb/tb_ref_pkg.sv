// tb_ref_pkg: reference models used by the testbenches of the fault tolerant
// BRG-HD bus. They work on 128-bit vectors with an explicit width and are
// written independently of the RTL:
//  - ref_hamming_encode places the data bits, then takes the check bits from
//    the syndrome of that partial word (the bits at position 2**j are the
//    syndrome bits);
//  - ref_ct scores adjacent wire pairs by looking the previous and present
//    two-bit patterns up in the coupling-transition table itself;
//  - ref_brg_encode applies the BRG-HD rules and returns the coded bus
//    (bit 0 left control, bits 1..w the word, bit w+1 right control).
package tb_ref_pkg;

  typedef logic [127:0] vec_t;

  // coupling-transition table: [previous pattern][present pattern], pattern
  // = {wire i, wire i+1}
  localparam int CT_TABLE [4][4] = '{
    '{0, 1, 1, 0},   // from 00
    '{0, 0, 2, 0},   // from 01
    '{0, 2, 0, 0},   // from 10
    '{0, 1, 1, 0}    // from 11
  };

  function automatic int ref_k(int dw);
    int k = 0;
    while ((2 ** k) < dw + k + 1) k++;
    return k;
  endfunction

  function automatic vec_t ref_hamming_encode(vec_t data, int dw);
    vec_t w = '0;
    int   k = ref_k(dw);
    int   n = dw + k;
    int   d = 0;
    int   syn = 0;
    for (int p = 1; p <= n; p++) begin
      if (!(p == 1 || p == 2 || p == 4 || p == 8 || p == 16 || p == 32 || p == 64)) begin
        w[p-1] = data[d];
        d++;
      end
    end
    for (int p = 1; p <= n; p++) if (w[p-1]) syn ^= p;
    for (int j = 0; j < k; j++) w[(2 ** j) - 1] = syn[j];
    return w;
  endfunction

  function automatic vec_t ref_extract(vec_t cw, int dw);
    vec_t d = '0;
    int   n = dw + ref_k(dw);
    int   i = 0;
    for (int p = 1; p <= n; p++) begin
      if (!(p == 1 || p == 2 || p == 4 || p == 8 || p == 16 || p == 32 || p == 64)) begin
        d[i] = cw[p-1];
        i++;
      end
    end
    return d;
  endfunction

  function automatic int ref_st(vec_t prev, vec_t cur, int w);
    int s = 0;
    for (int i = 0; i < w; i++) s += (prev[i] != cur[i]) ? 1 : 0;
    return s;
  endfunction

  function automatic int ref_ct(vec_t prev, vec_t cur, int w);
    int c = 0;
    for (int i = 0; i + 1 < w; i++)
      c += CT_TABLE[{prev[i], prev[i+1]}][{cur[i], cur[i+1]}];
    return c;
  endfunction

  // returns the coded bus; mode gets {left, right}
  function automatic vec_t ref_brg_encode(vec_t prev_word, vec_t cw, int w,
                                          output logic [1:0] mode);
    int   ct  = ref_ct(prev_word, cw, w);
    int   ohd = 0;
    int   ehd = 0;
    vec_t out = '0;
    vec_t x   = cw;
    for (int i = 0; i < w; i += 2) ohd += (prev_word[i] != cw[i]) ? 1 : 0;
    for (int i = 1; i < w; i += 2) ehd += (prev_word[i] != cw[i]) ? 1 : 0;
    if (real'(ct) >= real'(w) / 2.0) begin
      if (ohd > ehd) begin
        mode = 2'b10;
        for (int i = 0; i < w; i += 2) x[i] = ~x[i];
      end else if (ehd > ohd) begin
        mode = 2'b01;
        for (int i = 1; i < w; i += 2) x[i] = ~x[i];
      end else begin
        mode = 2'b11;
        for (int i = 0; i < w; i++) x[i] = ~x[i];
      end
    end else begin
      mode = 2'b00;
    end
    out[0] = mode[1];
    for (int i = 0; i < w; i++) out[i+1] = x[i];
    out[w+1] = mode[0];
    return out;
  endfunction

endpackage
