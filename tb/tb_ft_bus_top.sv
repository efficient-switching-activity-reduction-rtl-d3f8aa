// tb_ft_bus_top: end-to-end test of the fault tolerant BRG-HD bus with every
// parameter at its default (32 data bits, 38-bit codeword, 40 wires).
//
// Random words are sent with valid dropped on some cycles. Each word is
// given one of: a clean channel, one faulty data wire, or two faulty data
// wires whose positions cannot be taken for a single error. The channel
// fault is applied in the cycle the word is on the wires. Checked:
//  - every word leaves data_out exactly 2 cycles after it was presented,
//    with the sent data (clean or single fault), the correction flag and the
//    syndrome naming the faulty wire, or the uncorrectable flag;
//  - the wires match a reference BRG-HD encoder, and tx_mode its decision;
//  - the switching activity totals of both monitors match the reference.
// Mechanisms counted, each must occur: the four encoder modes, a held bus
// (valid low), a corrected single error, a flagged uncorrectable error.
// Finally the switching activity saving of the scheme is printed.
module tb_ft_bus_top;
  import tb_ref_pkg::*;
  import brg_pkg::*;

  localparam int DW = 32;
  localparam int CW = 38;
  localparam int BW = 40;
  localparam int NWORDS = 4000;

  int checks = 0, failures = 0;

  logic          clk = 0, rst_n = 0, valid_in = 0;
  logic [DW-1:0] data_in = '0;
  logic [BW-1:0] fault_mask = '0;
  logic [BW-1:0] bus_wires;
  logic          bus_valid, valid_out, err_corrected, err_uncorrectable;
  brg_mode_e     tx_mode;
  logic [DW-1:0] data_out;
  logic [5:0]    err_syndrome;
  logic [31:0]   uncoded_words, coded_words;
  logic [31:0]   uncoded_st, uncoded_ct, uncoded_tt, coded_st, coded_ct, coded_tt;

  ft_bus_top dut (
    .clk, .rst_n, .valid_in, .data_in, .fault_mask, .bus_wires, .bus_valid, .tx_mode,
    .valid_out, .data_out, .err_corrected, .err_uncorrectable, .err_syndrome,
    .uncoded_words, .coded_words, .uncoded_st, .uncoded_ct, .uncoded_tt,
    .coded_st, .coded_ct, .coded_tt
  );

  always #5 clk = ~clk;

  typedef struct {
    logic [DW-1:0] data;
    int            sent_cycle;
    int            kind;      // 0 clean, 1 single fault, 2 uncorrectable pair
    int            pos;       // faulty position for kind 1
  } item_t;

  item_t expq[$];
  int cyc = 0;
  int n_mode [4] = '{0, 0, 0, 0};
  int n_hold = 0, n_corr = 0, n_unc = 0, n_recv = 0;

  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // receiver scoreboard
  always @(posedge clk) begin
    if (rst_n && valid_out) begin
      item_t it;
      checks++;
      if (expq.size() == 0) begin
        failures++;
        $display("FAIL: unexpected output");
      end else begin
        it = expq.pop_front();
        n_recv++;
        if (cyc != it.sent_cycle + 2) begin
          failures++;
          $display("FAIL: latency %0d cycles", cyc - it.sent_cycle);
        end
        case (it.kind)
          0: if (data_out !== it.data || err_corrected || err_uncorrectable) begin
               failures++;
               $display("FAIL clean: got %h exp %h", data_out, it.data);
             end
          1: begin
               if (data_out !== it.data || !err_corrected || err_uncorrectable ||
                   int'(err_syndrome) != it.pos) begin
                 failures++;
                 $display("FAIL single at %0d: got %h exp %h syn %0d", it.pos, data_out,
                          it.data, err_syndrome);
               end else n_corr++;
             end
          default: begin
               if (!err_uncorrectable || err_corrected) begin
                 failures++;
                 $display("FAIL pair: uncorrectable not flagged");
               end else n_unc++;
             end
        endcase
      end
    end
  end

  initial begin
    vec_t model_bus, prev_cw, cw, coded;
    logic [BW-1:0] pending_fault;
    int ref_ust, ref_uct, ref_cst, ref_cct;
    logic [1:0] m;
    model_bus = '0;
    prev_cw   = '0;
    ref_ust = 0; ref_uct = 0; ref_cst = 0; ref_cct = 0;
    pending_fault = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    checks++;
    if (bus_wires !== '0) begin failures++; $display("FAIL: bus not reset"); end
    for (int n = 0; n < NWORDS; n++) begin
      item_t it;
      // wires now carry the word sent last cycle: check them, apply its fault
      fault_mask    = pending_fault;
      pending_fault = '0;
      if (bus_valid) begin
        checks++;
        if (bus_wires !== model_bus[BW-1:0]) begin
          failures++;
          $display("FAIL wires: %h exp %h", bus_wires, model_bus[BW-1:0]);
        end
      end
      valid_in = ($urandom % 6) != 0;
      data_in  = $urandom;
      if ($urandom % 4 == 0) data_in = data_in & 32'h0000_00ff;  // correlated words
      #1;
      if (valid_in) begin
        cw    = ref_hamming_encode(vec_t'(data_in), DW);
        ref_ust += ref_st(prev_cw, cw, CW);
        ref_uct += ref_ct(prev_cw, cw, CW);
        prev_cw = cw;
        coded = ref_brg_encode(vec_t'(model_bus[CW:1]), cw, CW, m);
        ref_cst += ref_st(model_bus, coded, BW);
        ref_cct += ref_ct(model_bus, coded, BW);
        model_bus = coded;
        n_mode[m]++;
        checks++;
        if (tx_mode !== brg_mode_e'(m)) begin
          failures++;
          $display("FAIL mode: %b exp %b", tx_mode, m);
        end
        it.data       = data_in;
        it.sent_cycle = cyc;
        it.pos        = 0;
        case ($urandom % 10)
          0, 1, 2: begin
            it.kind = 1;
            it.pos  = 1 + ($urandom % CW);       // data wire it.pos carries a(it.pos-1)
            pending_fault[it.pos] = 1'b1;
          end
          3: begin
            int a, b;
            it.kind = 2;
            do begin
              a = 1 + ($urandom % CW);
              b = 1 + ($urandom % CW);
            end while (a == b || (a ^ b) <= CW);
            pending_fault[a] = 1'b1;
            pending_fault[b] = 1'b1;
          end
          default: it.kind = 0;
        endcase
        expq.push_back(it);
      end else begin
        n_hold++;
      end
      @(posedge clk);
      #1;
    end
    valid_in   = 0;
    fault_mask = pending_fault;
    repeat (4) @(posedge clk);
    #1;
    checks++;
    if (expq.size() != 0) begin failures++; $display("FAIL: %0d words lost", expq.size()); end
    checks++;
    if (int'(uncoded_st) != ref_ust || int'(uncoded_ct) != ref_uct ||
        int'(coded_st) != ref_cst || int'(coded_ct) != ref_cct ||
        int'(uncoded_tt) != ref_ust + ref_uct || int'(coded_tt) != ref_cst + ref_cct ||
        uncoded_words != coded_words) begin
      failures++;
      $display("FAIL totals: ust %0d/%0d uct %0d/%0d cst %0d/%0d cct %0d/%0d", uncoded_st,
               ref_ust, uncoded_ct, ref_uct, coded_st, ref_cst, coded_ct, ref_cct);
    end
    for (int i = 0; i < 4; i++) begin
      checks++;
      if (n_mode[i] == 0) begin failures++; $display("FAIL: mode %0d never used", i); end
    end
    checks += 3;
    if (n_hold == 0) begin failures++; $display("FAIL: bus never held"); end
    if (n_corr == 0) begin failures++; $display("FAIL: no corrected error"); end
    if (n_unc == 0)  begin failures++; $display("FAIL: no uncorrectable error"); end
    $display("words=%0d held=%0d modes pass=%0d even=%0d odd=%0d all=%0d corrected=%0d uncorrectable=%0d",
             n_recv, n_hold, n_mode[0], n_mode[1], n_mode[2], n_mode[3], n_corr, n_unc);
    $display("uncoded ST=%0d CT=%0d TT=%0d  coded ST=%0d CT=%0d TT=%0d  saving=%0.2f%%",
             uncoded_st, uncoded_ct, uncoded_tt, coded_st, coded_ct, coded_tt,
             100.0 * (real'(uncoded_tt) - real'(coded_tt)) / real'(uncoded_tt));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
