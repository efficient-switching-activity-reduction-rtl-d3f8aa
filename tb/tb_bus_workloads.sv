// tb_bus_workloads: switching activity of the fault tolerant BRG-HD bus on
// the four bus widths the scheme is evaluated on: 12, 21, 38 and 71 wires of
// Hamming codeword (8, 16, 32 and 64 data bits), each with 10000 uniformly
// random data vectors on a clean channel. After 1000, 2000, 5000 and 10000
// vectors it prints uncoded and coded self, coupling and total transitions
// and the saving (TT_uncoded - TT_coded) / TT_uncoded. Checked: every word
// arrives intact 2 cycles later, and the monitor totals equal those of the
// reference model at every report point.
module tb_bus_workloads;
  import tb_ref_pkg::*;

  localparam int NVEC = 10000;
  localparam int NW   = 4;
  localparam int DWS [NW] = '{8, 16, 32, 64};

  int checks = 0, failures = 0;
  int done_cnt = 0;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  for (genvar g = 0; g < NW; g++) begin : g_bus
    localparam int DW = DWS[g];
    localparam int K  = ref_k(DW);
    localparam int CW = DW + K;
    localparam int BW = CW + 2;

    logic          valid_in = 0;
    logic [DW-1:0] data_in = '0;
    logic [BW-1:0] bus_wires;
    logic          bus_valid, valid_out, err_corrected, err_uncorrectable;
    brg_pkg::brg_mode_e tx_mode;
    logic [DW-1:0] data_out;
    logic [K-1:0]  err_syndrome;
    logic [31:0]   uw, cwd, ust, uct, utt, cst, cct, ctt;

    ft_bus_top #(.DATA_W(DW)) dut (
      .clk, .rst_n, .valid_in, .data_in, .fault_mask('0), .bus_wires, .bus_valid,
      .tx_mode, .valid_out, .data_out, .err_corrected, .err_uncorrectable, .err_syndrome,
      .uncoded_words(uw), .coded_words(cwd), .uncoded_st(ust), .uncoded_ct(uct),
      .uncoded_tt(utt), .coded_st(cst), .coded_ct(cct), .coded_tt(ctt)
    );

    logic [DW-1:0] sent [$];

    always @(posedge clk) begin
      if (rst_n && valid_out) begin
        logic [DW-1:0] e;
        e = sent.pop_front();
        checks++;
        if (data_out !== e || err_corrected || err_uncorrectable) begin
          failures++;
          $display("FAIL %0d-wire: got %h exp %h", CW, data_out, e);
        end
      end
    end

    initial begin
      vec_t model_bus, prev_cw, cwv, coded;
      logic [1:0] m;
      int rust, ruct, rcst, rcct;
      model_bus = '0;
      prev_cw   = '0;
      rust = 0; ruct = 0; rcst = 0; rcct = 0;
      wait (rst_n);
      #1;
      for (int n = 1; n <= NVEC; n++) begin
        logic [63:0] r;
        r = {$urandom, $urandom};
        valid_in = 1;
        data_in  = r[DW-1:0];
        sent.push_back(data_in);
        cwv   = ref_hamming_encode(vec_t'(data_in), DW);
        rust += ref_st(prev_cw, cwv, CW);
        ruct += ref_ct(prev_cw, cwv, CW);
        prev_cw = cwv;
        coded = ref_brg_encode(vec_t'(model_bus[CW:1]), cwv, CW, m);
        rcst += ref_st(model_bus, coded, BW);
        rcct += ref_ct(model_bus, coded, BW);
        model_bus = coded;
        @(posedge clk);
        #1;
        if (n == 1000 || n == 2000 || n == 5000 || n == 10000) begin
          valid_in = 0;
          @(posedge clk);   // let the last word reach the coded monitor
          #1;
          checks++;
          if (int'(ust) != rust || int'(uct) != ruct || int'(cst) != rcst || int'(cct) != rcct) begin
            failures++;
            $display("FAIL %0d-wire totals: %0d/%0d %0d/%0d %0d/%0d %0d/%0d", CW, ust, rust,
                     uct, ruct, cst, rcst, cct, rcct);
          end
          $display("%2d-wire bus, %5d vectors: uncoded ST=%0d CT=%0d TT=%0d | coded ST=%0d CT=%0d TT=%0d | saving %0.2f%%",
                   CW, n, ust, uct, utt, cst, cct, ctt,
                   100.0 * (real'(utt) - real'(ctt)) / real'(utt));
        end
      end
      valid_in = 0;
      repeat (3) @(posedge clk);
      checks++;
      if (sent.size() != 0) begin failures++; $display("FAIL: words lost"); end
      done_cnt++;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    wait (done_cnt == NW);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
