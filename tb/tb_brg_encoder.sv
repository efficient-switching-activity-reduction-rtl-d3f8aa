// tb_brg_encoder: self-checking test of the BRG-HD encoder and bus register
// (38-bit codeword, 40 wires). A clocked reference keeps its own copy of the
// wires, encodes each new word with the reference rules and compares the
// combinational decision (mode, CT, ST, OHD, EHD) before the edge and the
// wires after it. valid is dropped at random to check that the bus holds.
// Words are drawn either at random or as small changes of the present bus,
// so that all four modes occur; each must occur at least once. The new word
// must be on the wires exactly one edge after it is presented.
module tb_brg_encoder;
  import tb_ref_pkg::*;
  import brg_pkg::*;

  localparam int W = 38;

  int checks = 0, failures = 0;
  int seen [4] = '{0, 0, 0, 0};
  int holds = 0;

  logic         clk = 0, rst_n = 0, valid = 0;
  logic [W-1:0] cw = '0;
  logic [W+1:0] bus;
  brg_mode_e    mode;
  logic [6:0]   ct;
  logic [5:0]   st, ohd, ehd;

  brg_encoder dut (.clk(clk), .rst_n(rst_n), .valid(valid), .cw(cw), .bus(bus),
                   .mode(mode), .ct(ct), .st(st), .ohd(ohd), .ehd(ehd));

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  vec_t model_bus;

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    checks++;
    if (bus !== '0) begin
      failures++;
      $display("FAIL: bus not cleared by reset: %h", bus);
    end
    model_bus = '0;
    for (int n = 0; n < 5000; n++) begin
      vec_t word, exp, prev;
      logic [1:0] m;
      int eo, ee;
      word = {$urandom, $urandom, $urandom, $urandom};
      if ($urandom % 3 == 0) word = vec_t'(model_bus[W:1]) ^ (vec_t'(1) << ($urandom % W));
      word[127:W] = '0;
      cw    = word[W-1:0];
      valid = ($urandom % 8) != 0;
      #1;
      prev = vec_t'(model_bus[W:1]);
      exp  = ref_brg_encode(prev, word, W, m);
      eo = 0;
      ee = 0;
      for (int i = 0; i < W; i += 2) eo += (prev[i] != word[i]) ? 1 : 0;
      for (int i = 1; i < W; i += 2) ee += (prev[i] != word[i]) ? 1 : 0;
      checks++;
      if (mode !== brg_mode_e'(m) || int'(ct) != ref_ct(prev, word, W) ||
          int'(st) != ref_st(prev, word, W) || int'(ohd) != eo || int'(ehd) != ee) begin
        failures++;
        $display("FAIL decision n=%0d: mode=%b exp=%b ct=%0d exp=%0d st=%0d ohd=%0d ehd=%0d",
                 n, mode, m, ct, ref_ct(prev, word, W), st, ohd, ehd);
      end
      if (valid) begin
        seen[m]++;
        model_bus = exp;
      end else begin
        holds++;
      end
      @(posedge clk);
      #1;
      checks++;
      if (bus !== model_bus[W+1:0]) begin
        failures++;
        $display("FAIL wires n=%0d: bus=%h exp=%h", n, bus, model_bus[W+1:0]);
      end
    end
    for (int m = 0; m < 4; m++) begin
      checks++;
      if (seen[m] == 0) begin
        failures++;
        $display("FAIL: mode %0d never exercised", m);
      end
    end
    checks++;
    if (holds == 0) failures++;
    $display("modes: pass=%0d even=%0d odd=%0d all=%0d holds=%0d", seen[0], seen[1], seen[2], seen[3], holds);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
