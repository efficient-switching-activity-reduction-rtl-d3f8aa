// ft_bus_top: fault tolerant on-chip data bus with BRG-HD switching activity
// reduction.
//
// Transmitter: DATA_W information bits are Hamming encoded into a CW_W-bit
// codeword (38 wires for the default 32 bits), and the BRG-HD encoder decides
// per word whether to send it as it is or to invert its odd bits, its even
// bits or all of it, adding two control wires (CW_W + 2 = 40 wires). The bus
// register drives those wires.
// Channel: fault_mask is XORed onto the wires between driver and receiver;
// it models crosstalk or delay faults (all zeros for a clean bus).
// Receiver: the BRG-HD decoder removes the inversion, the Hamming decoder
// corrects a single faulty data wire, and the result is registered.
// Monitors: one transition monitor watches the plain Hamming codeword stream
// (the bus as it would be without BRG-HD), the other the coded wires, so
// their totals give the saving of the scheme.
//
// Timing: a word presented with valid_in at clock edge t is on the bus after
// edge t (bus_valid high) and on data_out after edge t+1 (valid_out high):
// latency 2 cycles, one word per cycle. Synchronous active-low reset clears
// the bus and all counters. The two-stage structure, the fault_mask port
// and the monitors are this design's choices; the encoding chain follows
// the BRG-HD fault tolerant bus.
module ft_bus_top
  import brg_pkg::*;
#(
  parameter int unsigned DATA_W = 32,
  parameter int unsigned K      = hamming_k(DATA_W),
  parameter int unsigned CW_W   = DATA_W + K,
  parameter int unsigned BUS_W  = CW_W + 2,
  parameter int unsigned CNT_W  = 32
) (
  input  logic              clk,
  input  logic              rst_n,
  // transmitter side
  input  logic              valid_in,
  input  logic [DATA_W-1:0] data_in,
  // channel fault injection
  input  logic [BUS_W-1:0]  fault_mask,
  // bus wires and encoder decision
  output logic [BUS_W-1:0]  bus_wires,
  output logic              bus_valid,
  output brg_mode_e         tx_mode,
  // receiver side
  output logic              valid_out,
  output logic [DATA_W-1:0] data_out,
  output logic              err_corrected,
  output logic              err_uncorrectable,
  output logic [K-1:0]      err_syndrome,
  // switching activity totals (words counted, ST, CT, TT = ST + CT)
  output logic [CNT_W-1:0]  uncoded_words,
  output logic [CNT_W-1:0]  coded_words,
  output logic [CNT_W-1:0]  uncoded_st,
  output logic [CNT_W-1:0]  uncoded_ct,
  output logic [CNT_W-1:0]  uncoded_tt,
  output logic [CNT_W-1:0]  coded_st,
  output logic [CNT_W-1:0]  coded_ct,
  output logic [CNT_W-1:0]  coded_tt
);

  localparam int unsigned CT_W = $clog2(2 * CW_W + 1);
  localparam int unsigned ST_W = $clog2(CW_W + 1);

  logic [CW_W-1:0]   tx_cw, rx_cw;
  logic [BUS_W-1:0]  bus_q, rx_bus;
  logic [DATA_W-1:0] rx_data;
  logic [K-1:0]      rx_syndrome;
  logic              rx_corr, rx_unc;
  brg_mode_e         rx_mode;
  logic [CT_W-1:0]   enc_ct;
  logic [ST_W-1:0]   enc_st, enc_ohd, enc_ehd;

  // ---------------- transmitter ----------------
  hamming_enc #(.DATA_W(DATA_W)) u_henc (
    .data (data_in),
    .cw   (tx_cw)
  );

  brg_encoder #(.W(CW_W)) u_benc (
    .clk   (clk),
    .rst_n (rst_n),
    .valid (valid_in),
    .cw    (tx_cw),
    .bus   (bus_q),
    .mode  (tx_mode),
    .ct    (enc_ct),
    .st    (enc_st),
    .ohd   (enc_ohd),
    .ehd   (enc_ehd)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) bus_valid <= 1'b0;
    else        bus_valid <= valid_in;
  end

  assign bus_wires = bus_q;

  // ---------------- channel ----------------
  assign rx_bus = bus_q ^ fault_mask;

  // ---------------- receiver ----------------
  brg_decoder #(.W(CW_W)) u_bdec (
    .bus  (rx_bus),
    .cw   (rx_cw),
    .mode (rx_mode)
  );

  hamming_dec #(.DATA_W(DATA_W)) u_hdec (
    .cw            (rx_cw),
    .data          (rx_data),
    .syndrome      (rx_syndrome),
    .corrected     (rx_corr),
    .uncorrectable (rx_unc)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      valid_out         <= 1'b0;
      data_out          <= '0;
      err_corrected     <= 1'b0;
      err_uncorrectable <= 1'b0;
      err_syndrome      <= '0;
    end else begin
      valid_out <= bus_valid;
      if (bus_valid) begin
        data_out          <= rx_data;
        err_corrected     <= rx_corr;
        err_uncorrectable <= rx_unc;
        err_syndrome      <= rx_syndrome;
      end
    end
  end

  // ---------------- switching activity ----------------
  transition_monitor #(.W(CW_W), .CNT_W(CNT_W)) u_mon_uncoded (
    .clk      (clk),
    .rst_n    (rst_n),
    .sample   (valid_in),
    .word     (tx_cw),
    .last_st  (),
    .last_ct  (),
    .words    (uncoded_words),
    .st_total (uncoded_st),
    .ct_total (uncoded_ct),
    .tt_total (uncoded_tt)
  );

  transition_monitor #(.W(BUS_W), .CNT_W(CNT_W)) u_mon_coded (
    .clk      (clk),
    .rst_n    (rst_n),
    .sample   (bus_valid),
    .word     (bus_q),
    .last_st  (),
    .last_ct  (),
    .words    (coded_words),
    .st_total (coded_st),
    .ct_total (coded_ct),
    .tt_total (coded_tt)
  );

  // With a clean channel the receiver sees the codeword that was sent.
  logic [CW_W-1:0] sent_cw_q;
  always_ff @(posedge clk) begin
    if (!rst_n)        sent_cw_q <= '0;
    else if (valid_in) sent_cw_q <= tx_cw;
  end

  a_clean_roundtrip : assert property (@(posedge clk) disable iff (!rst_n)
    (bus_valid && fault_mask == '0) |-> (rx_cw == sent_cw_q && rx_mode == brg_mode_e'({bus_q[0], bus_q[BUS_W-1]})));

endmodule
