// tb_hamming_dec: self-checking test of the Hamming SEC decoder (32 data
// bits, 38-bit codeword). Reference codewords get no error or one flipped bit
// at every position; the decoder must return the original data, flag the
// correction and give the flipped position as syndrome. Pairs of flipped bits
// whose positions XOR to more than 38 must be flagged uncorrectable.
module tb_hamming_dec;
  import tb_ref_pkg::*;

  int checks = 0, failures = 0;

  logic [37:0] cw;
  logic [31:0] data;
  logic [5:0]  syn;
  logic        corr, unc;

  hamming_dec dut (.cw(cw), .data(data), .syndrome(syn), .corrected(corr),
                   .uncorrectable(unc));

  task automatic expect_ok(logic [31:0] d, int pos);  // pos 0 = no error
    vec_t c;
    c = ref_hamming_encode(vec_t'(d), 32);
    if (pos > 0) c[pos-1] = ~c[pos-1];
    cw = c[37:0];
    #1;
    checks++;
    if (data !== d || int'(syn) != pos || corr !== (pos > 0) || unc !== 1'b0) begin
      failures++;
      $display("FAIL: d=%h pos=%0d got data=%h syn=%0d corr=%b unc=%b", d, pos, data, syn, corr, unc);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 200; n++) begin
      logic [31:0] d;
      d = $urandom;
      for (int pos = 0; pos <= 38; pos++) expect_ok(d, pos);
    end
    // double errors that cannot be a single error: syndrome above 38
    for (int n = 0; n < 200; n++) begin
      vec_t c;
      int a, b;
      do begin
        a = 1 + ($urandom % 38);
        b = 1 + ($urandom % 38);
      end while (a == b || (a ^ b) <= 38);
      c = ref_hamming_encode(vec_t'($urandom), 32);
      c[a-1] = ~c[a-1];
      c[b-1] = ~c[b-1];
      cw = c[37:0];
      #1;
      checks++;
      if (unc !== 1'b1 || corr !== 1'b0 || int'(syn) != (a ^ b)) begin
        failures++;
        $display("FAIL double: a=%0d b=%0d syn=%0d unc=%b", a, b, syn, unc);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
