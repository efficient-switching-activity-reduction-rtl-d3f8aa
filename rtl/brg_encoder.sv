// brg_encoder: bus-regrouping / Hamming-distance (BRG-HD) transition
// reduction encoder and bus driver register for a W-wire fault tolerant bus.
//
// Each new codeword a0..a(W-1) is compared with the W data wires now on the
// bus (the previously transmitted, already encoded word):
//   1. CT = power-consuming coupling transitions the raw word would cause
//      (adjacent-pair table, see coupling_count);
//   2. ST = self transitions it would cause (reported, not used to decide);
//   3. if CT >= W/2 (evaluated as 2*CT >= W):
//        OHD = Hamming distance over a0, a2, a4, ... ("odd group"),
//        EHD = Hamming distance over a1, a3, a5, ... ("even group");
//        OHD > EHD : invert the odd group,  control bits left=1 right=0
//        EHD > OHD : invert the even group, control bits left=0 right=1
//        OHD = EHD : invert the whole word, control bits left=1 right=1
//   4. otherwise send the word as it is,    control bits left=0 right=0.
// The decision rules and control-bit values follow the BRG-HD scheme.
// Comparing against the encoded word on the wires (rather than the previous
// raw codeword), counting CT over the W data wires only, and the wire order
// below are this design's choices.
//
// Coded bus: bus[0] = left control bit, bus[i+1] = encoded a_i,
// bus[W+1] = right control bit. Adjacent indices are adjacent wires.
//
// Timing: when valid is high at a rising clock edge the encoded word is
// loaded into the bus register and appears on bus one cycle later; with
// valid low the bus holds its value (no transitions). Reset (active low,
// synchronous) clears the bus to all zeros. mode, ct, st, ohd and ehd are
// the combinational decision for the present cw input.
module brg_encoder
  import brg_pkg::*;
#(
  parameter int unsigned W    = 38,
  parameter int unsigned CT_W = $clog2(2 * W + 1),
  parameter int unsigned ST_W = $clog2(W + 1)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            valid,
  input  logic [W-1:0]    cw,
  output logic [W+1:0]    bus,
  output brg_mode_e       mode,
  output logic [CT_W-1:0] ct,
  output logic [ST_W-1:0] st,
  output logic [ST_W-1:0] ohd,
  output logic [ST_W-1:0] ehd
);

  logic [W-1:0] prev;
  logic [W-1:0] odd_mask, flip_mask, enc;
  logic [W+1:0] bus_q;

  assign prev = bus_q[W:1];

  coupling_count #(.W(W), .CT_W(CT_W), .ST_W(ST_W)) u_ct (
    .prev (prev),
    .cur  (cw),
    .ct   (ct),
    .st   (st)
  );

  always_comb begin
    for (int unsigned i = 0; i < W; i++) odd_mask[i] = (i % 2 == 0);
    ohd = '0;
    ehd = '0;
    for (int unsigned i = 0; i < W; i++) begin
      if (prev[i] != cw[i]) begin
        if (odd_mask[i]) ohd++;
        else             ehd++;
      end
    end
    if (2 * int'(ct) >= int'(W)) begin
      if (ohd > ehd)      mode = MODE_ODD;
      else if (ehd > ohd) mode = MODE_EVEN;
      else                mode = MODE_ALL;
    end else begin
      mode = MODE_PASS;
    end
    unique case (mode)
      MODE_PASS: flip_mask = '0;
      MODE_ODD:  flip_mask = odd_mask;
      MODE_EVEN: flip_mask = ~odd_mask;
      MODE_ALL:  flip_mask = '1;
    endcase
    enc = cw ^ flip_mask;
  end

  always_ff @(posedge clk) begin
    if (!rst_n)     bus_q <= '0;
    else if (valid) bus_q <= {mode[0], enc, mode[1]};
  end

  assign bus = bus_q;

endmodule
