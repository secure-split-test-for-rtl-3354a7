// tb_sst_ro_trng: self-checking test of the ring oscillator random number
// generator model: sampling period, word assembly, hold while disabled,
// balance of ones and zeros, run lengths, serial correlation, and that two
// generators with different noise seeds give different words.
module tb_sst_ro_trng;
  localparam int W = 16, DIV = 16, NBITS = 4096;
  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0;
  logic bit_out, bit_valid, word_valid, word_valid_b;
  logic [W-1:0] word, word_b;

  sst_ro_trng #(.W(W), .SAMPLE_DIV(DIV)) dut (.clk, .rst_n, .en, .bit_out, .bit_valid, .word, .word_valid);
  sst_ro_trng #(.W(W), .SAMPLE_DIV(DIV), .NOISE_SEED(16'h1234)) dut_b (.clk, .rst_n, .en,
    .bit_out(), .bit_valid(), .word(word_b), .word_valid(word_valid_b));

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #10_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bit          bits [NBITS];
  logic [W-1:0] words_a [NBITS/W], words_b [NBITS/W];
  int nb = 0, nw = 0, nwb = 0, last_bit_cyc = -1, cyc = 0, gap_bad = 0, word_bad = 0;
  logic [W-1:0] shadow = '0;

  always @(posedge clk) begin
    cyc++;
    if (bit_valid && nb < NBITS) begin
      if (last_bit_cyc >= 0 && cyc - last_bit_cyc != DIV) gap_bad++;
      last_bit_cyc = cyc;
      bits[nb] = bit_out;
      nb++;
      shadow = {shadow[W-2:0], bit_out};
    end
    if (word_valid && nw < NBITS/W) begin
      if (word != shadow || nb % W != 0) word_bad++;
      words_a[nw] = word;
      nw++;
    end
    if (word_valid_b && nwb < NBITS/W) begin
      words_b[nwb] = word_b;
      nwb++;
    end
  end

  initial begin
    int ones, run, maxrun, agree, same_words, n_bv;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    // disabled: nothing is produced
    n_bv = 0;
    repeat (200) begin @(posedge clk); if (bit_valid || word_valid) n_bv++; end
    check(n_bv == 0, "no output while disabled");
    en = 1'b1;
    wait (nb == NBITS && nw == NBITS/W && nwb == NBITS/W);
    en = 1'b0;
    check(gap_bad == 0, $sformatf("bit period is SAMPLE_DIV clocks (%0d bad gaps)", gap_bad));
    check(word_bad == 0, $sformatf("word holds the last W bits (%0d bad words)", word_bad));
    // hold while disabled again
    begin
      logic [W-1:0] w0;
      repeat (2) @(posedge clk);
      w0 = word;
      n_bv = 0;
      repeat (100) begin @(posedge clk); if (bit_valid || word_valid) n_bv++; end
      check(n_bv == 0 && word == w0, "holds while disabled");
    end
    // balance
    ones = 0;
    foreach (bits[i]) ones += bits[i];
    $display("ones: %0d of %0d (%0.1f%%)", ones, NBITS, 100.0 * ones / NBITS);
    check(ones > NBITS * 45 / 100 && ones < NBITS * 55 / 100, "ones between 45% and 55%");
    // longest run of equal bits
    run = 1; maxrun = 1;
    for (int i = 1; i < NBITS; i++) begin
      run = (bits[i] == bits[i-1]) ? run + 1 : 1;
      if (run > maxrun) maxrun = run;
    end
    $display("longest run: %0d", maxrun);
    check(maxrun >= 4 && maxrun <= 20, "longest run plausible for 4096 fair bits");
    // serial correlation: neighbouring bits agree about half the time
    agree = 0;
    for (int i = 1; i < NBITS; i++) agree += (bits[i] == bits[i-1]);
    $display("neighbour agreement: %0.1f%%", 100.0 * agree / (NBITS - 1));
    check(agree > (NBITS - 1) * 45 / 100 && agree < (NBITS - 1) * 55 / 100, "no strong serial correlation");
    // every bit position of the word carries both values
    for (int b = 0; b < W; b++) begin
      automatic int c1 = 0;
      foreach (words_a[i]) c1 += words_a[i][b];
      check(c1 > (NBITS / W) / 4 && c1 < (NBITS / W) * 3 / 4, $sformatf("word bit %0d balanced", b));
    end
    // distinct words, and a differently seeded generator disagrees
    same_words = 0;
    foreach (words_a[i]) same_words += (words_a[i] == words_b[i]);
    check(same_words < 4, $sformatf("other noise seed gives other words (%0d equal)", same_words));
    begin
      automatic int hd = 0;
      foreach (words_a[i]) hd += $countones(words_a[i] ^ words_b[i]);
      $display("HD between generators: %0.1f%%", 100.0 * hd / NBITS);
      check(hd > NBITS * 40 / 100 && hd < NBITS * 60 / 100, "generators about half different");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
