// transition_monitor: counts the switching activity on a W-wire bus.
//
// On every cycle with sample high it compares word with the word sampled
// before (all zeros after reset, matching a bus register that resets to
// zero) and adds the self transitions (wires that changed) and the
// power-consuming coupling transitions (adjacent-pair table, see
// coupling_count) to running totals. Total transitions TT = ST + CT are the
// figure of merit the scheme is judged by; efficiency of an encoding is
// (TT_uncoded - TT_coded) / TT_uncoded.
//
// Timing: last_st/last_ct and the totals update one cycle after the sample.
// Totals are CNT_W-bit counters that wrap. Synchronous active-low reset.
module transition_monitor #(
  parameter int unsigned W     = 40,
  parameter int unsigned CNT_W = 32,
  parameter int unsigned CT_W  = $clog2(2 * W + 1),
  parameter int unsigned ST_W  = $clog2(W + 1)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             sample,
  input  logic [W-1:0]     word,
  output logic [ST_W-1:0]  last_st,
  output logic [CT_W-1:0]  last_ct,
  output logic [CNT_W-1:0] words,
  output logic [CNT_W-1:0] st_total,
  output logic [CNT_W-1:0] ct_total,
  output logic [CNT_W-1:0] tt_total
);

  logic [W-1:0]    prev_q;
  logic [CT_W-1:0] ct;
  logic [ST_W-1:0] st;

  coupling_count #(.W(W), .CT_W(CT_W), .ST_W(ST_W)) u_ct (
    .prev (prev_q),
    .cur  (word),
    .ct   (ct),
    .st   (st)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      prev_q   <= '0;
      last_st  <= '0;
      last_ct  <= '0;
      words    <= '0;
      st_total <= '0;
      ct_total <= '0;
    end else if (sample) begin
      prev_q   <= word;
      last_st  <= st;
      last_ct  <= ct;
      words    <= words + 1'b1;
      st_total <= st_total + CNT_W'(st);
      ct_total <= ct_total + CNT_W'(ct);
    end
  end

  assign tt_total = st_total + ct_total;

endmodule
