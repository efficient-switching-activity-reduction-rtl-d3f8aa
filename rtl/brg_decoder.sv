// brg_decoder: receiver side of the BRG-HD transition reduction code.
//
// Reads the two control wires of the coded bus (bus[0] = left, bus[W+1] =
// right) and undoes the inversion the encoder applied to the W data wires:
//   left=0 right=0 : word unchanged
//   left=1 right=0 : a0, a2, a4, ... inverted back
//   left=0 right=1 : a1, a3, a5, ... inverted back
//   left=1 right=1 : whole word inverted back
// The mapping follows the encoder's control-bit rules; the decoder's
// structure (an XOR with a mask chosen by the two bits) is this design's.
// A single faulty data wire stays a single faulty codeword bit, which the
// Hamming decoder then corrects; a faulty control wire is not covered.
//
// Purely combinational.
module brg_decoder
  import brg_pkg::*;
#(
  parameter int unsigned W = 38
) (
  input  logic [W+1:0] bus,
  output logic [W-1:0] cw,
  output brg_mode_e    mode
);

  logic [W-1:0] odd_mask, flip_mask;

  always_comb begin
    for (int unsigned i = 0; i < W; i++) odd_mask[i] = (i % 2 == 0);
    mode = brg_mode_e'({bus[0], bus[W+1]});
    unique case (mode)
      MODE_PASS: flip_mask = '0;
      MODE_ODD:  flip_mask = odd_mask;
      MODE_EVEN: flip_mask = ~odd_mask;
      MODE_ALL:  flip_mask = '1;
    endcase
    cw = bus[W:1] ^ flip_mask;
  end

endmodule
