// tb_sst_puf_metrics: quality figures of the arbiter PUF model over K = 8
// dies (eight DEVICE_SEED values), each answering the same 16 challenges
// with 16 bits, so every die yields an M = 256-bit identifier.
//   uniqueness   = 2/(K(K-1)) * sum over die pairs of HD(Ri, Rj)/M  (ideal 50%)
//   uniformity   = share of ones in a die's identifier, averaged     (ideal 50%)
//   bit-aliasing = share of ones of one bit position across the dies,
//                  averaged over positions                           (ideal 50%)
//   reliability  = 100% - share of bits that change when a noisy die
//                  is evaluated again                                (ideal 100%)
// The figures are printed and checked against loose bounds around the
// ideal values (uniqueness and uniformity 35..65%, bit-aliasing 30..70%,
// reliability above 95%).
module tb_sst_puf_metrics;
  localparam int K = 8, NCH = 16, RW = 16, M = NCH * RW, REPS = 10;
  localparam logic [31:0] SEEDS [K] = '{32'h1F2E_3D4C, 32'h0BAD_F00D, 32'h1234_5678, 32'hCAFE_BABE,
                                        32'h0DDB_A11, 32'h7777_0001, 32'h3141_5926, 32'h2718_2818};
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic          eval;
  logic [31:0]   challenge;
  logic [RW-1:0] resp  [K];
  logic [RW-1:0] noisy [K];

  for (genvar d = 0; d < K; d++) begin : g_die
    sst_arbiter_puf #(.DEVICE_SEED(SEEDS[d]), .NOISE(0)) u_clean (
      .clk, .rst_n, .eval, .challenge, .response(resp[d]), .valid());
    sst_arbiter_puf #(.DEVICE_SEED(SEEDS[d]), .NOISE(64)) u_noisy (
      .clk, .rst_n, .eval, .challenge, .response(noisy[d]), .valid());
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [M-1:0] id [K];
    real uniq, unif, alias_avg, rel;
    int  pair_hd, ones, flips, col;
    eval = 0; challenge = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    flips = 0;
    for (int c = 0; c < NCH; c++) begin
      @(negedge clk);
      challenge = 32'h9E37_79B9 * (c + 1);
      eval = 1; @(negedge clk); eval = 0;
      for (int d = 0; d < K; d++) id[d][c*RW +: RW] = resp[d];
      for (int r = 0; r < REPS; r++) begin
        eval = 1; @(negedge clk); eval = 0;
        for (int d = 0; d < K; d++) flips += $countones(noisy[d] ^ id[d][c*RW +: RW]);
      end
    end
    pair_hd = 0;
    for (int i = 0; i < K - 1; i++)
      for (int j = i + 1; j < K; j++) pair_hd += $countones(id[i] ^ id[j]);
    uniq = 100.0 * 2.0 * pair_hd / (K * (K - 1) * M);
    ones = 0;
    for (int d = 0; d < K; d++) ones += $countones(id[d]);
    unif = 100.0 * ones / (K * M);
    alias_avg = 0.0;
    for (int b = 0; b < M; b++) begin
      col = 0;
      for (int d = 0; d < K; d++) col += int'(id[d][b]);
      alias_avg += 100.0 * col / K;
    end
    alias_avg = alias_avg / M;
    rel = 100.0 - 100.0 * flips / (K * M * REPS);
    $display("uniqueness %5.2f%%  uniformity %5.2f%%  bit-aliasing %5.2f%%  reliability %6.2f%%",
             uniq, unif, alias_avg, rel);
    check(uniq > 35.0 && uniq < 65.0, "uniqueness");
    check(unif > 35.0 && unif < 65.0, "uniformity");
    check(alias_avg > 30.0 && alias_avg < 70.0, "bit-aliasing");
    check(rel > 95.0 && rel < 100.0, "reliability");
    for (int i = 0; i < K - 1; i++)
      for (int j = i + 1; j < K; j++) check(id[i] != id[j], "dies differ");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
