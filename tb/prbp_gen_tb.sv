// prbp_gen_tb - checks the parallel pattern generator against a bit-serial
// model of the x^15 + x^14 + 1 sequence: word contents and bit order, the
// seed load used by a checker to lock on, and the 32767-word repeat period.
`timescale 1ns / 1ps
module prbp_gen_tb;
  logic clk = 1'b0;
  logic rst_n;
  logic load, advance;
  logic [14:0] seed;
  logic [19:0] word;
  int checks = 0, failures = 0;

  always #5 clk = !clk;

  prbp_gen dut (.clk, .rst_n, .load, .seed, .advance, .word);

  // serial reference: history of bits, b[n] = b[n-15] ^ b[n-14]
  bit ref_hist[$];
  function automatic logic [19:0] ref_word();
    logic [19:0] w;
    for (int i = 19; i >= 0; i--) begin
      bit b = ref_hist[ref_hist.size()-15] ^ ref_hist[ref_hist.size()-14];
      ref_hist.push_back(b);
      w[i] = b;
    end
    while (ref_hist.size() > 64) void'(ref_hist.pop_front());
    return w;
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [19:0] first, w;
    rst_n = 0; load = 0; advance = 0; seed = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 15; i++) ref_hist.push_back(1'b1);   // reset state: all ones
    // 1. stream after reset
    for (int n = 0; n < 300; n++) begin
      w = ref_word();
      check(word === w, $sformatf("word %0d got %h exp %h", n, word, w));
      advance = 1; @(negedge clk); advance = 0;
    end
    // 2. hold without advance
    w = word; @(negedge clk); check(word === w, "word changes without advance");
    // 3. load an arbitrary seed, the stream continues from it
    seed = 15'h1234; load = 1; @(negedge clk); load = 0;
    ref_hist.delete();
    for (int i = 14; i >= 0; i--) ref_hist.push_back(seed[i]);
    for (int n = 0; n < 100; n++) begin
      w = ref_word();
      check(word === w, $sformatf("seeded word %0d got %h exp %h", n, word, w));
      advance = 1; @(negedge clk); advance = 0;
    end
    // 4. locking: loading the low 15 bits of a word predicts the next word
    w = word; seed = w[14:0];
    advance = 1; @(negedge clk); advance = 0;
    first = word;
    load = 1; @(negedge clk); load = 0;
    check(word === first, "seed from previous word does not predict the next");
    // 5. period: the word sequence repeats after 32767 words
    first = word;
    advance = 1;
    repeat (32767) @(negedge clk);
    advance = 0;
    check(word === first, "sequence does not repeat after 32767 words");
    @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
