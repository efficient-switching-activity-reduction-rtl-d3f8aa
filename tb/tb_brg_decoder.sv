// tb_brg_decoder: self-checking test of the BRG-HD decoder (38-bit word,
// 40 wires). Random words are encoded by the reference encoder against a
// random previous bus word, which exercises all four control-bit
// combinations, and the decoder must give back the word and the mode.
module tb_brg_decoder;
  import tb_ref_pkg::*;
  import brg_pkg::*;

  localparam int W = 38;

  int checks = 0, failures = 0;
  int seen [4] = '{0, 0, 0, 0};

  logic [W+1:0] bus;
  logic [W-1:0] cw;
  brg_mode_e    mode;

  brg_decoder dut (.bus(bus), .cw(cw), .mode(mode));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 4000; n++) begin
      vec_t prev, word, coded;
      logic [1:0] m;
      prev  = {$urandom, $urandom, $urandom, $urandom};
      word  = {$urandom, $urandom, $urandom, $urandom};
      prev[127:W] = '0;
      word[127:W] = '0;
      coded = ref_brg_encode(prev, word, W, m);
      bus = coded[W+1:0];
      #1;
      seen[m]++;
      checks++;
      if (cw !== word[W-1:0] || mode !== brg_mode_e'(m)) begin
        failures++;
        $display("FAIL: word=%h bus=%h cw=%h mode=%b exp=%b", word[W-1:0], bus, cw, mode, m);
      end
    end
    for (int m = 0; m < 4; m++) begin
      checks++;
      if (seen[m] == 0) begin
        failures++;
        $display("FAIL: mode %0d never exercised", m);
      end
    end
    $display("modes seen: pass=%0d even=%0d odd=%0d all=%0d", seen[0], seen[1], seen[2], seen[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
