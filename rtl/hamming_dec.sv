// hamming_dec: Hamming single-error-correcting decoder at the receiving end
// of the fault tolerant data bus.
//
// The syndrome is the XOR of the positions (1-based, cw[i] at position i+1)
// of all bits that are 1 in the received codeword. Zero means no error. A
// value between 1 and CW_W names the flipped bit, which is inverted before the
// information bits are taken out of the non power-of-two positions. A value
// above CW_W cannot come from a single error and is reported as uncorrectable
// (data is then passed uncorrected). The code has distance 3, so two flipped
// bits are in general miscorrected, not detected. Codeword layout matches
// hamming_enc.
//
// Purely combinational.
module hamming_dec
  import brg_pkg::*;
#(
  parameter int unsigned DATA_W = 32,
  parameter int unsigned K      = hamming_k(DATA_W),
  parameter int unsigned CW_W   = DATA_W + K
) (
  input  logic [CW_W-1:0]   cw,
  output logic [DATA_W-1:0] data,
  output logic [K-1:0]      syndrome,
  output logic              corrected,      // single error found and fixed
  output logic              uncorrectable   // syndrome points past the word
);

  always_comb begin
    logic [K-1:0]    syn;
    logic [CW_W-1:0] fixed;
    int unsigned     d;
    syn = '0;
    for (int unsigned p = 1; p <= CW_W; p++)
      if (cw[p-1]) syn ^= K'(p);
    syndrome      = syn;
    corrected     = 1'b0;
    uncorrectable = 1'b0;
    fixed         = cw;
    if (syn != '0) begin
      if (int'(syn) <= int'(CW_W)) begin
        fixed[int'(syn) - 1] = ~cw[int'(syn) - 1];
        corrected = 1'b1;
      end else begin
        uncorrectable = 1'b1;
      end
    end
    data = '0;
    d    = 0;
    for (int unsigned p = 1; p <= CW_W; p++) begin
      if ((p & (p - 1)) != 0) begin
        data[d] = fixed[p-1];
        d++;
      end
    end
  end

endmodule
