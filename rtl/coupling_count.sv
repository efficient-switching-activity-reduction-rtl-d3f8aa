// coupling_count: number of power-consuming coupling transitions between two
// successive words on a W-wire bus, plus the number of self transitions.
//
// For each pair of adjacent wires (i, i+1) the previous and present two-bit
// patterns are scored with the coupling-transition table:
//   previous 00 or 11 -> present 01 or 10 : 1   (one wire moves away from its
//                                               neighbour)
//   previous 01 -> present 10, 10 -> 01    : 2   (both wires move opposite)
//   every other change                     : 0   (present pair equal, or
//                                               pattern unchanged)
// Self transitions are the wires whose value changed (Hamming distance).
// Purely combinational helper, shared by the BRG-HD encoder and the
// transition monitor.
module coupling_count #(
  parameter int unsigned W    = 38,
  parameter int unsigned CT_W = $clog2(2 * W + 1),
  parameter int unsigned ST_W = $clog2(W + 1)
) (
  input  logic [W-1:0]    prev,
  input  logic [W-1:0]    cur,
  output logic [CT_W-1:0] ct,
  output logic [ST_W-1:0] st
);

  always_comb begin
    ct = '0;
    st = '0;
    for (int unsigned i = 0; i < W; i++)
      if (prev[i] != cur[i]) st++;
    for (int unsigned i = 0; i + 1 < W; i++) begin
      // present pair differs; score depends on the previous pair
      if (cur[i] != cur[i+1]) begin
        if (prev[i] == prev[i+1])           ct += CT_W'(1);
        else if (prev[i] != cur[i])         ct += CT_W'(2);
      end
    end
  end

endmodule
