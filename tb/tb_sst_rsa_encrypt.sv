// tb_sst_rsa_encrypt: self-checking test of the RSA engine with the 64-bit
// key used by the top (n = 4294967291 * 4294967279, e = 65537).  Every
// ciphertext is compared with a reference square-and-multiply in 128-bit
// arithmetic, decrypted with the private exponent d back to the message,
// and the latency is checked against (W + popcount(e)) * (W + 2) + 1.  The
// engine itself also decrypts with d (m = c^d mod n).  A third case uses a
// small textbook key (p = 61, q = 53, e = 17).
module tb_sst_rsa_encrypt;
  localparam int W = 64;
  localparam logic [63:0] N = 64'hFFFF_FFEA_0000_0055;
  localparam logic [63:0] E = 64'd65537;
  localparam logic [63:0] D = 64'd9331878932546167513;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic         start, busy, done;
  logic [W-1:0] msg, e, n, cipher;

  sst_rsa_encrypt #(.W(W)) dut (.clk, .rst_n, .start, .msg, .e, .n, .busy, .done, .cipher);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic logic [63:0] ref_modexp(logic [63:0] b, logic [63:0] x, logic [63:0] m);
    logic [127:0] r, bb;
    r = 1; bb = 128'(b) % 128'(m);
    for (int i = 0; i < 64; i++) begin
      if (x[i]) r = (r * bb) % 128'(m);
      bb = (bb * bb) % 128'(m);
    end
    return r[63:0];
  endfunction

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic encrypt(input logic [63:0] mm, ee, nn, output logic [63:0] c);
    int cyc;
    @(negedge clk);
    msg = mm; e = ee; n = nn; start = 1;
    @(negedge clk);
    start = 0; cyc = 1;
    while (!done && cyc < 20000) begin @(negedge clk); cyc++; end
    // cyc counts the start edge too
    check(cyc == (W + $countones(ee)) * (W + 2) + 2, $sformatf("latency %0d", cyc));
    c = cipher;
  endtask

  initial begin
    logic [63:0] c, m, plain_hw;
    start = 0; msg = 0; e = 0; n = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    check(ref_modexp(ref_modexp(64'd12345, E, N), D, N) == 64'd12345, "reference key pair");
    for (int t = 0; t < 6; t++) begin
      m = (t == 0) ? 64'd0 : (t == 1) ? 64'd1 : {16'h0, $urandom, 16'($urandom)};
      encrypt(m, E, N, c);
      check(c == ref_modexp(m, E, N), $sformatf("ciphertext t=%0d", t));
      check(ref_modexp(c, D, N) == m, "decrypts to message");
      check(!busy, "idle after done");
    end
    // the same engine decrypts with the private exponent
    for (int t = 0; t < 2; t++) begin
      m = {16'h0, $urandom, 16'($urandom)};
      encrypt(m, E, N, c);
      encrypt(c, D, N, plain_hw);
      check(plain_hw == m, "hardware decryption with d");
    end
    // textbook key: n = 3233, e = 17, d = 2753; 65 -> 2790
    encrypt(64'd65, 64'd17, 64'd3233, c);
    check(c == 64'd2790, "textbook example 65 -> 2790");
    check(ref_modexp(c, 64'd2753, 64'd3233) == 64'd65, "textbook decrypt");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
