// brg_pkg: types and constants shared by the fault tolerant bus with
// bus-regrouping / Hamming-distance (BRG-HD) transition reduction.
//
// The BRG-HD encoder puts two control wires around the protected word: one
// on the "left" (next to codeword bit a0) and one on the "right" (next to
// the last codeword bit). Their values select the inversion applied to the
// word. The left/right values for each case follow the encoding rules of the
// scheme; packing them as {left, right} into one 2-bit mode is this design's
// own convention.
//
// Wire order on the coded bus (index = physical wire position, so adjacent
// indices are adjacent wires): wire 0 is the left control bit, wires 1..W
// carry a0..a(W-1), wire W+1 is the right control bit.
package brg_pkg;

  // {left control bit, right control bit}
  typedef enum logic [1:0] {
    MODE_PASS = 2'b00,  // word sent as it is
    MODE_EVEN = 2'b01,  // a1, a3, a5, ... inverted ("even group")
    MODE_ODD  = 2'b10,  // a0, a2, a4, ... inverted ("odd group")
    MODE_ALL  = 2'b11   // whole word inverted
  } brg_mode_e;

  // Number of Hamming check bits K for DATA_W information bits: the smallest
  // K with 2**K >= DATA_W + K + 1 (single error correction).
  function automatic int unsigned hamming_k(int unsigned data_w);
    int unsigned k;
    k = 1;
    while ((1 << k) < data_w + k + 1) k++;
    return k;
  endfunction

  // Mask of codeword bits a0, a2, a4, ... (the "odd group": first, third,
  // fifth ... wire counted from 1).
  function automatic logic [255:0] odd_group_mask(int unsigned w);
    logic [255:0] m;
    m = '0;
    for (int unsigned i = 0; i < w; i += 2) m[i] = 1'b1;
    return m;
  endfunction

endpackage
