// tb_transition_monitor: self-checking test of the switching activity
// monitor on a 40-wire bus. Random words, sampled on random cycles, are
// scored by the reference (table lookup per adjacent pair, Hamming distance
// for self transitions); per-word counts and running totals must match one
// cycle after each sample. A hand-worked case checks the table itself.
module tb_transition_monitor;
  import tb_ref_pkg::*;

  localparam int W = 40;

  int checks = 0, failures = 0;

  logic         clk = 0, rst_n = 0, sample = 0;
  logic [W-1:0] word = '0;
  logic [5:0]   last_st;
  logic [6:0]   last_ct;
  logic [31:0]  words, st_total, ct_total, tt_total;

  transition_monitor dut (.clk(clk), .rst_n(rst_n), .sample(sample), .word(word),
                          .last_st(last_st), .last_ct(last_ct), .words(words),
                          .st_total(st_total), .ct_total(ct_total), .tt_total(tt_total));

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    vec_t prev;
    int est, ect, nw;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    prev = '0;
    est  = 0;
    ect  = 0;
    nw   = 0;
    // hand-worked: 0 -> 01 on wires 1:0 gives ST 1, CT 1 (00 -> 01)
    // then 01 -> 10 on wires 1:0 gives ST 2, CT 2 on that pair plus CT 1 on
    // wires 2:1 (00 -> 10), 3 in all
    word = 40'h1; sample = 1;
    @(posedge clk); #1;
    checks++;
    if (last_st != 1 || last_ct != 1) begin failures++; $display("FAIL hand 1: %0d %0d", last_st, last_ct); end
    word = 40'h2;
    @(posedge clk); #1;
    checks++;
    if (last_st != 2 || last_ct != 3) begin failures++; $display("FAIL hand 2: %0d %0d", last_st, last_ct); end
    // 10 -> 11: ST 1, CT 0
    word = 40'h3;
    @(posedge clk); #1;
    checks++;
    if (last_st != 1 || last_ct != 0) begin failures++; $display("FAIL hand 3: %0d %0d", last_st, last_ct); end
    prev = vec_t'(40'h3);
    est = 4; ect = 4; nw = 3;
    for (int n = 0; n < 3000; n++) begin
      vec_t x;
      x = {$urandom, $urandom, $urandom, $urandom};
      x[127:W] = '0;
      word   = x[W-1:0];
      sample = ($urandom % 4) != 0;
      @(posedge clk); #1;
      if (sample) begin
        int s, c;
        s = ref_st(prev, x, W);
        c = ref_ct(prev, x, W);
        est += s;
        ect += c;
        nw++;
        prev = x;
        checks++;
        if (int'(last_st) != s || int'(last_ct) != c) begin
          failures++;
          $display("FAIL word %0d: st=%0d/%0d ct=%0d/%0d", n, last_st, s, last_ct, c);
        end
      end
      checks++;
      if (int'(st_total) != est || int'(ct_total) != ect || int'(tt_total) != est + ect ||
          int'(words) != nw) begin
        failures++;
        $display("FAIL totals %0d: st=%0d/%0d ct=%0d/%0d words=%0d/%0d", n, st_total, est,
                 ct_total, ect, words, nw);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
