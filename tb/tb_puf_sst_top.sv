// tb_puf_sst_top: end-to-end test of the PUF-SST wrapper at its default
// parameters, playing three parties:
//   * the test house drives commands and the scan port of a small stand-in
//     core (ten scan chains, sixteen locked nets stored inverted at a lock
//     pattern) and forwards ciphertexts and signatures;
//   * the design house decrypts every ciphertext with the private exponent,
//     rebuilds the scan-lock control word from the decrypted PUF answers,
//     predicts the signature of a good die and derives the end-user KEY;
//   * the end user power-cycles the chip and unlocks it with FKEY and KEY.
// Flow: enrol ENROLL_PAIRS pairs; structural test of a good and of a faulty
// die; choice of FKEY among the enrolled pairs; functional test under FKEY (design unlocked with a blank OTP),
// key generation; locked/unlocked checks with right and wrong keys before
// and after a reset.  Each mechanism is counted and must occur.
//
// The lock pattern of the stand-in core is taken from an enrolled pair:
// with 16-bit identifiers a design house would need about 2^16 enrolled
// pairs to find a challenge matching a pattern fixed in advance, which is
// too long to simulate; the outcome is the same.
module tb_puf_sst_top;
  import sst_pkg::*;
  localparam int          ENROLL_PAIRS = 40;
  localparam int          TEST_LEN     = 150;
  localparam int          N = 10, CW = 32, RW = 16;
  localparam int          SCR_CW = scr_ctrl_bits(10, 10);
  localparam int          KW = SCR_CW + 10;
  localparam logic [63:0] RSA_N = 64'hFFFF_FFEA_0000_0055;
  localparam logic [63:0] RSA_D = 64'd9331878932546167513;
  localparam logic [15:0] FLIP  = 16'h5A3C;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic        cmd_valid, busy, enc_valid, shift_en, scan_ready, scan_done;
  logic        scrambled_valid, otp_programmed;
  sst_cmd_e    cmd;
  enc_kind_e   enc_kind;
  logic [15:0] crp_count, test_len;
  logic [CW-1:0] fkey;
  logic [RW-1:0] key, func_in, func_out;
  logic [63:0]   enc_data;
  logic [N-1:0]  scan_out, scrambled, signature;

  puf_sst_top dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // ---------------- mechanism counters ----------------
  int m_enrol, m_ecc_fix, m_scan_pass, m_fault_found, m_scrambled, m_locked;
  int m_test_unlock, m_keygen, m_user_unlock, m_wrong_key, m_otp_kept;

  // ECC corrections: a vote that was not unanimous when the word was used.
  always @(posedge clk) if (rst_n && dut.u_ecc.done && (dut.seed_load || dut.id_load || dut.rsa1_start))
    for (int i = 0; i < RW; i++)
      if (dut.u_ecc.ones[i] != 0 && dut.u_ecc.ones[i] != 3) m_ecc_fix++;

  // ---------------- design-house models ----------------
  function automatic logic [63:0] modexp(logic [63:0] b, logic [63:0] x, logic [63:0] m);
    logic [127:0] r, bb;
    r = 1; bb = 128'(b) % 128'(m);
    for (int i = 0; i < 64; i++) begin
      if (x[i]) r = (r * bb) % 128'(m);
      bb = (bb * bb) % 128'(m);
    end
    return r[63:0];
  endfunction

  function automatic logic [31:0] prng_next(logic [31:0] s);
    logic [31:0] r;
    r = s >> 1;
    if (s[0]) begin r[31] ^= 1; r[21] ^= 1; r[1] ^= 1; r[0] ^= 1; end
    return r;
  endfunction

  function automatic logic [15:0] lstep(logic [15:0] s);
    logic [15:0] r;
    r = s >> 1;
    if (s[0]) begin r[15] ^= 1; r[13] ^= 1; r[12] ^= 1; r[10] ^= 1; end
    return r;
  endfunction

  // Signature a good die gives for responses 'resp' under scrambler seed sd.
  function automatic logic [N-1:0] predict_sig(logic [15:0] sd, logic [N-1:0] resp [], int len);
    logic [15:0] l;
    logic [KW-1:0] ks;
    logic [N-1:0] sig, v;
    logic t;
    int k;
    l = (sd == 0) ? 16'd1 : sd; ks = '0; sig = '0;
    for (int i = 0; i < KW; i++) begin ks = {l[0], ks[KW-1:1]}; l = lstep(l); end
    for (int p = 0; p < len; p++) begin
      v = resp[p]; k = 0;
      for (int s = 0; s < 10; s++)
        for (int i = s % 2; i + 1 < N; i += 2) begin
          if (ks[k]) begin t = v[i]; v[i] = v[i+1]; v[i+1] = t; end
          k++;
        end
      for (int j = 0; j < 10; j++) v[j] ^= ks[SCR_CW + j];
      begin
        logic [N-1:0] r;
        r = sig >> 1;
        if (sig[0]) begin r[9] ^= 1; r[6] ^= 1; end
        sig = r ^ v;
      end
      ks = {l[0], ks[KW-1:1]}; l = lstep(l);
    end
    return sig;
  endfunction

  // ---------------- test-house helpers ----------------
  logic [63:0] cipher_q [$];
  enc_kind_e   kind_q   [$];
  int          enc_cycle [$];
  int          cyc;
  always @(posedge clk) begin
    cyc++;
    if (rst_n && enc_valid) begin cipher_q.push_back(enc_data); kind_q.push_back(enc_kind); enc_cycle.push_back(cyc); end
  end

  task automatic issue(sst_cmd_e c);
    @(negedge clk);
    check(!busy, "idle before command");
    cmd = c; cmd_valid = 1;
    @(negedge clk);
    cmd_valid = 0; cmd = CMD_NOP;
  endtask

  task automatic wait_idle();
    while (busy) @(negedge clk);
  endtask

  // Shift 'len' slices of resp through the scan port, with gaps.
  task automatic drive_scan(logic [N-1:0] resp [], int len);
    int sent;
    sent = 0;
    while (!scan_ready) @(negedge clk);
    while (sent < len) begin
      scan_out = resp[sent];
      shift_en = ($urandom % 5) != 0;
      #1;
      if (shift_en && scrambled != resp[sent]) m_scrambled++;
      @(negedge clk);
      if (shift_en) sent++;
    end
    shift_en = 0;
    check(scan_done, "done after the last slice");
  endtask

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] chal [$];
    logic [15:0] resp [$];
    logic [31:0] p;
    logic [15:0] truth, lockp, prn, user_key, scr_seed;
    logic [N-1:0] golden [], faulty [];
    logic [63:0] plain;
    int gap, pick;

    cmd_valid = 0; cmd = CMD_NOP; crp_count = 0; test_len = 0; fkey = 0; key = 0;
    shift_en = 0; scan_out = 0; func_in = 0; cyc = 0;
    m_enrol = 0; m_ecc_fix = 0; m_scan_pass = 0; m_fault_found = 0; m_scrambled = 0;
    m_locked = 0; m_test_unlock = 0; m_keygen = 0; m_user_unlock = 0; m_wrong_key = 0;
    m_otp_kept = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;

    // ---- 1. enrolment ----
    crp_count = 16'(ENROLL_PAIRS);
    issue(CMD_ENROLL);
    wait_idle();
    check(cipher_q.size() == ENROLL_PAIRS + 1, $sformatf("ciphertexts %0d", cipher_q.size()));
    p = 32'h1;
    for (int i = 0; i < cipher_q.size(); i++) begin
      plain = modexp(cipher_q[i], RSA_D, RSA_N);
      p = prng_next(p);
      check(kind_q[i] == ENC_CRP, "tagged as pair");
      check(plain[63:48] == 0 && plain[47:16] == p, $sformatf("pair %0d challenge is the PRNG sequence", i));
      chal.push_back(plain[47:16]);
      resp.push_back(plain[15:0]);
      m_enrol++;
    end
    gap = enc_cycle[1] - enc_cycle[0];
    for (int i = 1; i + 1 < enc_cycle.size(); i++)
      check(enc_cycle[i+1] - enc_cycle[i] == gap, "constant enrolment rate");
    // per pair: RSA latency (64 + popcount(e)) * (64 + 2) + 1 plus 8 cycles
    // of sequencing (challenge, three evaluations, vote, start, hand-over)
    check(gap == 8 + (64 + 2) * (64 + 2) + 1, $sformatf("cycles per pair %0d", gap));
    check(resp[0] != resp[1] || resp[1] != resp[2], "PUF answers differ");
    scr_seed = resp[ENROLL_PAIRS];

    // ---- 2. structural test: good die, then faulty die ----
    golden = new[TEST_LEN];
    faulty = new[TEST_LEN];
    foreach (golden[i]) begin golden[i] = N'($urandom); faulty[i] = golden[i]; end
    faulty[TEST_LEN / 2][3] = ~faulty[TEST_LEN / 2][3];   // one stuck-at effect
    test_len = 16'(TEST_LEN);
    issue(CMD_SCAN_TEST);
    drive_scan(golden, TEST_LEN);
    wait_idle();
    if (signature == predict_sig(scr_seed, golden, TEST_LEN)) m_scan_pass++;
    check(signature == predict_sig(scr_seed, golden, TEST_LEN), "good die passes");
    issue(CMD_SCAN_TEST);
    drive_scan(faulty, TEST_LEN);
    wait_idle();
    if (signature != predict_sig(scr_seed, golden, TEST_LEN)) m_fault_found++;
    check(signature != predict_sig(scr_seed, golden, TEST_LEN), "faulty die fails");

    // ---- 3. choose FKEY: an enrolled pair whose answer repeats ----
    // With a blank OTP and KEY = 0 the lock passes the PUF identifier
    // straight through to func_out when func_in = 0.
    func_in = 16'h0; key = 16'h0; pick = -1;
    for (int j = 3; j < ENROLL_PAIRS && pick < 0; j++) begin
      int same;
      same = 0;
      fkey = chal[j];
      for (int r = 0; r < 4; r++) begin
        issue(CMD_UNLOCK); wait_idle(); #1;
        if (func_out == resp[j]) same++;
      end
      if (same == 4) pick = j;
    end
    check(pick >= 0, "a stable pair exists");
    lockp = resp[pick];
    fkey  = chal[pick];
    truth = 16'hC0DE;
    func_in = truth ^ lockp;          // core nets stored inverted at lockp
    key = 16'h0;
    fkey = chal[pick + 1]; issue(CMD_UNLOCK); wait_idle();   // another identifier
    fkey = chal[pick];
    #1;
    if (func_out != truth) m_locked++;
    check(func_out != truth, "locked before FKEY");

    // ---- 4. functional test under FKEY, then key generation ----
    issue(CMD_FUNC_TEST);
    while (!scan_ready) @(negedge clk);
    if (func_out == truth) m_test_unlock++;
    check(func_out == truth, "unlocked for the functional test (blank OTP, KEY = 0)");
    drive_scan(golden, TEST_LEN);
    wait_idle();
    check(signature == predict_sig(resp[pick], golden, TEST_LEN), "functional test signature");
    check(otp_programmed, "OTP programmed");
    check(kind_q[$] == ENC_PRN && cipher_q.size() == ENROLL_PAIRS + 2, "random number sent");
    prn = modexp(cipher_q[$], RSA_D, RSA_N)[15:0];
    check(prn == prng_next(p)[15:0], "random number is the next PRNG state");
    user_key = prn ^ FLIP;          // the design house knows the flipped bits
    m_keygen++;
    #1;
    if (func_out != truth) m_locked++;
    check(func_out != truth, "locked again after key generation with KEY = 0");
    key = user_key; #1;
    if (func_out == truth) m_user_unlock++;
    check(func_out == truth, "unlocked with FKEY and KEY");
    key = user_key ^ 16'h0100; #1;
    if (func_out != truth) m_wrong_key++;
    check(func_out != truth, "wrong KEY keeps it locked");

    // ---- 5. end user: power cycle, unlock ----
    rst_n = 0; repeat (2) @(negedge clk); rst_n = 1;
    check(otp_programmed, "OTP retained over reset");
    if (otp_programmed) m_otp_kept++;
    key = user_key;
    #1;
    check(func_out != truth, "locked after reset until the PUF is evaluated");
    issue(CMD_UNLOCK); wait_idle(); #1;
    if (func_out == truth) m_user_unlock++;
    check(func_out == truth, "end user unlocks after reset");
    fkey = chal[pick == 5 ? 6 : 5]; issue(CMD_UNLOCK); wait_idle(); #1;
    if (func_out != truth) m_wrong_key++;
    check(func_out != truth, "wrong FKEY keeps it locked");
    // a second functional test cannot rewrite the OTP
    fkey = chal[pick]; key = 16'h0;
    issue(CMD_FUNC_TEST); drive_scan(golden, TEST_LEN); wait_idle();
    key = user_key; #1;
    check(func_out == truth, "OTP word unchanged by a second key generation");

    $display("mechanisms: enrol=%0d ecc_fix=%0d scan_pass=%0d fault_found=%0d scrambled=%0d locked=%0d test_unlock=%0d keygen=%0d user_unlock=%0d wrong_key=%0d otp_kept=%0d",
             m_enrol, m_ecc_fix, m_scan_pass, m_fault_found, m_scrambled, m_locked,
             m_test_unlock, m_keygen, m_user_unlock, m_wrong_key, m_otp_kept);
    check(m_enrol > 0, "mechanism: enrolment");
    check(m_ecc_fix > 0, "mechanism: ECC correction");
    check(m_scan_pass > 0, "mechanism: good die passes");
    check(m_fault_found > 0, "mechanism: faulty die caught");
    check(m_scrambled > 0, "mechanism: scrambling");
    check(m_locked > 0, "mechanism: lock");
    check(m_test_unlock > 0, "mechanism: test unlock");
    check(m_keygen > 0, "mechanism: key generation");
    check(m_user_unlock > 0, "mechanism: user unlock");
    check(m_wrong_key > 0, "mechanism: wrong key rejected");
    check(m_otp_kept > 0, "mechanism: OTP non-volatile");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
