// tb_hamming_enc: self-checking test of the Hamming encoder at the default
// 32-bit width (38-bit codeword) and at 8 bits (12-bit codeword). Walking
// ones and random words are compared with a reference that derives the check
// bits from the syndrome of the data-only word. Combinational block: each
// vector is checked after a 1 ns settle time.
module tb_hamming_enc;
  import tb_ref_pkg::*;

  int checks = 0, failures = 0;

  logic [31:0] d32;
  logic [37:0] c32;
  logic [7:0]  d8;
  logic [11:0] c8;

  hamming_enc dut32 (.data(d32), .cw(c32));
  hamming_enc #(.DATA_W(8)) dut8 (.data(d8), .cw(c8));

  task automatic check32(logic [31:0] d);
    vec_t exp;
    d32 = d;
    #1;
    exp = ref_hamming_encode(vec_t'(d), 32);
    checks++;
    if (c32 !== exp[37:0]) begin
      failures++;
      $display("FAIL 32: data=%h cw=%h exp=%h", d, c32, exp[37:0]);
    end
  endtask

  task automatic check8(logic [7:0] d);
    vec_t exp;
    d8 = d;
    #1;
    exp = ref_hamming_encode(vec_t'(d), 8);
    checks++;
    if (c8 !== exp[11:0]) begin
      failures++;
      $display("FAIL 8: data=%h cw=%h exp=%h", d, c8, exp[11:0]);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check32('0);
    for (int i = 0; i < 32; i++) check32(32'(1) << i);
    for (int i = 0; i < 2000; i++) check32($urandom);
    for (int i = 0; i < 256; i++) check8(8'(i));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
