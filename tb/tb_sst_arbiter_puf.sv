// tb_sst_arbiter_puf: self-checking test of the arbiter PUF model.  With no
// noise the response must match an independent evaluation of the additive
// delay model (each stage's delay difference counted with the sign given
// by the parity of the crossed stages behind it) and repeat
// exactly; two dies must differ (inter-die Hamming distance in 20..80%);
// responses must be roughly balanced (uniformity 30..70%); with noise the
// reliability must stay above 90%.  'valid' must follow 'eval' by one clock.
module tb_sst_arbiter_puf;
  localparam int CW = 32, RW = 16;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic          eval;
  logic [CW-1:0] challenge;
  logic [RW-1:0] ra, rb, rn;
  logic          va, vb, vn;

  sst_arbiter_puf #(.DEVICE_SEED(32'h1F2E_3D4C), .NOISE(0)) die_a (
    .clk, .rst_n, .eval, .challenge, .response(ra), .valid(va));
  sst_arbiter_puf #(.DEVICE_SEED(32'h0BAD_F00D), .NOISE(0)) die_b (
    .clk, .rst_n, .eval, .challenge, .response(rb), .valid(vb));
  sst_arbiter_puf #(.DEVICE_SEED(32'h1F2E_3D4C), .NOISE(300)) die_a_noisy (
    .clk, .rst_n, .eval, .challenge, .response(rn), .valid(vn));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic logic [31:0] h32(logic [31:0] x);
    x = x ^ (x >> 16); x = x * 32'h7FEB_352D;
    x = x ^ (x >> 15); x = x * 32'h846C_A68B;
    return x ^ (x >> 16);
  endfunction

  // Die weight: delay difference added by stage s of chain a.
  function automatic int w(logic [31:0] seed, int a, int s);
    logic [31:0] h;
    h = h32(seed ^ (32'(a) << 8) ^ 32'(s) ^ 32'h9E37_79B9);
    return int'(h[11:0]) - 2048;
  endfunction

  // Race outcome per chain from the stage delay differences.
  function automatic logic [RW-1:0] race(logic [31:0] seed, logic [CW-1:0] c);
    logic [RW-1:0] r;
    for (int a = 0; a < RW; a++) begin
      // the sign of stage s seen at the end flips with every later crossing
      begin
        int delta;
        delta = 0;
        for (int s = 0; s < CW; s++) begin
          int par;
          par = 0;
          for (int t = s; t < CW; t++) par ^= int'(c[t]);
          delta += (par != 0) ? -w(seed, a, s) : w(seed, a, s);
        end
        r[a] = delta > 0;
      end
    end
    return r;
  endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int hd, ones, flips;
    logic [RW-1:0] first;
    eval = 0; challenge = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    hd = 0; ones = 0; flips = 0;
    for (int t = 0; t < 200; t++) begin
      @(negedge clk);
      challenge = {$urandom};
      eval = 1;
      @(negedge clk);
      eval = 0;
      check(va && vb && vn, "valid one clock after eval");
      check(ra == race(32'h1F2E_3D4C, challenge), "die A matches delay model");
      check(rb == race(32'h0BAD_F00D, challenge), "die B matches delay model");
      first = ra;
      hd += $countones(ra ^ rb);
      ones += $countones(ra);
      flips += $countones(rn ^ ra);
      @(negedge clk);
      check(!va, "valid is a pulse");
      eval = 1; @(negedge clk); eval = 0;
      check(ra == first, "noise-free die repeats");
      flips += $countones(rn ^ ra);
    end
    $display("inter-die HD %0d/%0d, ones %0d/%0d, noisy flips %0d/%0d",
             hd, 200 * RW, ones, 200 * RW, flips, 400 * RW);
    check(hd > 200 * RW / 5 && hd < 200 * RW * 4 / 5, "uniqueness");
    check(ones > 200 * RW * 3 / 10 && ones < 200 * RW * 7 / 10, "uniformity");
    check(flips > 0 && flips < 400 * RW / 10, "reliability with noise");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
