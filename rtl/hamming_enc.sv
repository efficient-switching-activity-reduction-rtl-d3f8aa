// hamming_enc: Hamming single-error-correcting encoder for the fault
// tolerant data bus.
//
// DATA_W information bits become a codeword of CW_W = DATA_W + K bits, K being
// the smallest count with 2**K >= DATA_W + K + 1. With the default DATA_W = 32
// this gives the 38-wire (32 + 6) fault tolerant bus the scheme is worked out
// for; DATA_W = 8, 16 and 64 give the 12, 21 and 71-wire buses it is also
// evaluated on.
//
// Layout (classic Hamming, this design's choice): codeword bit cw[i] sits at
// position p = i + 1. Positions that are powers of two hold check bits; the
// others hold the information bits in increasing order (data[0] at position 3).
// Check bit at position 2**j is the XOR of every other position whose index
// has bit j set, so the syndrome of a received word is the position of a
// single flipped bit.
//
// Purely combinational: cw follows data in the same cycle.
module hamming_enc
  import brg_pkg::*;
#(
  parameter int unsigned DATA_W = 32,
  parameter int unsigned K      = hamming_k(DATA_W),
  parameter int unsigned CW_W   = DATA_W + K
) (
  input  logic [DATA_W-1:0] data,
  output logic [CW_W-1:0]   cw
);

  always_comb begin
    int unsigned d;
    logic [CW_W-1:0] word;
    word = '0;
    d    = 0;
    // place information bits at non power-of-two positions
    for (int unsigned p = 1; p <= CW_W; p++) begin
      if ((p & (p - 1)) != 0) begin
        word[p-1] = data[d];
        d++;
      end
    end
    // check bits
    for (int unsigned j = 0; j < K; j++) begin
      logic parity;
      parity = 1'b0;
      for (int unsigned p = 1; p <= CW_W; p++)
        if (((p >> j) & 1) == 1 && p != (1 << j)) parity ^= word[p-1];
      word[(1 << j) - 1] = parity;
    end
    cw = word;
  end

endmodule
