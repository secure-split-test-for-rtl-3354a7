// tb_sst_controller: self-checking test of the PUF-SST sequencer.  The
// datapath is replaced by small responders (ECC done after REP evaluations,
// RSA done a fixed time after start, scan lock done a fixed time after
// start).  For each command the strobes are counted and their order
// checked: enrolment gives crp_count + 1 encryptions and one seed load, the
// functional test evaluates the PUF on FKEY, runs the scan lock seeded by
// the identifier and only then programs the OTP and starts RSA engine 2.
module tb_sst_controller;
  import sst_pkg::*;
  localparam int REP = 3;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic      cmd_valid;
  sst_cmd_e  cmd;
  logic [15:0] crp_count;
  logic ecc_done, rsa1_done, rsa2_done, slk_done;
  logic busy, prng_step, ecc_clear, puf_eval, chal_fkey, rsa1_start, rsa2_start;
  logic slk_start, seed_from_id, seed_load, id_load, otp_program;

  sst_controller #(.REP(REP)) dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // ---- responders ----
  int ev_seen, rsa1_t, rsa2_t, slk_t;
  logic puf_valid;
  always_ff @(posedge clk) begin
    puf_valid <= puf_eval;
    if (ecc_clear) ev_seen <= 0;
    else if (puf_valid && ev_seen < REP) ev_seen <= ev_seen + 1;
    rsa1_t <= rsa1_start ? 12 : (rsa1_t > 0 ? rsa1_t - 1 : 0);
    rsa2_t <= rsa2_start ? 9  : (rsa2_t > 0 ? rsa2_t - 1 : 0);
    if (slk_start) slk_t <= 25; else if (slk_t > 0) slk_t <= slk_t - 1;
  end
  assign ecc_done  = (ev_seen == REP);
  assign rsa1_done = (rsa1_t == 1);
  assign rsa2_done = (rsa2_t == 1);
  assign slk_done  = (slk_t == 1);

  // ---- strobe counters ----
  int n_step, n_eval, n_eval_fkey, n_rsa1, n_rsa2, n_slk, n_slk_id, n_seed, n_id, n_otp;
  int n_otp_before_slk_done;
  bit slk_done_seen;
  always @(posedge clk) if (rst_n) begin
    n_step      += int'(prng_step);
    n_eval      += int'(puf_eval);
    n_eval_fkey += int'(puf_eval && chal_fkey);
    n_rsa1      += int'(rsa1_start);
    n_rsa2      += int'(rsa2_start);
    n_slk       += int'(slk_start);
    n_slk_id    += int'(slk_start && seed_from_id);
    n_seed      += int'(seed_load);
    n_id        += int'(id_load);
    n_otp       += int'(otp_program);
    if (slk_done) slk_done_seen = 1;
    if (otp_program && !slk_done_seen) n_otp_before_slk_done++;
    if (otp_program) check(rsa2_start, "OTP program and RSA 2 start together");
    if (seed_load || id_load) check(ecc_done, "identifier taken only from a finished ECC");
  end

  task automatic clear_counts();
    n_step = 0; n_eval = 0; n_eval_fkey = 0; n_rsa1 = 0; n_rsa2 = 0; n_slk = 0;
    n_slk_id = 0; n_seed = 0; n_id = 0; n_otp = 0; n_otp_before_slk_done = 0;
    slk_done_seen = 0;
  endtask

  task automatic issue(sst_cmd_e c, int cnt);
    @(negedge clk);
    check(!busy, "idle before command");
    cmd = c; crp_count = 16'(cnt); cmd_valid = 1;
    @(negedge clk);
    cmd_valid = 0; cmd = CMD_NOP;
    check(busy, "busy after command");
    while (busy) begin
      // a command while busy must be ignored
      cmd = CMD_UNLOCK; cmd_valid = 1;
      @(negedge clk);
    end
    cmd_valid = 0; cmd = CMD_NOP;
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cmd_valid = 0; cmd = CMD_NOP; crp_count = 0;
    ev_seen = 0; rsa1_t = 0; rsa2_t = 0; slk_t = 0;
    clear_counts();
    repeat (2) @(posedge clk);
    rst_n = 1;

    clear_counts(); issue(CMD_ENROLL, 5);
    check(n_step == 6 && n_rsa1 == 6 && n_seed == 1, "enrol: 5 pairs + seed pair");
    check(n_eval == 6 * REP && n_eval_fkey == 0, "enrol: PUF evaluations on PRNG");
    check(n_rsa2 == 0 && n_otp == 0 && n_slk == 0 && n_id == 0, "enrol: nothing else");

    clear_counts(); issue(CMD_ENROLL, 0);
    check(n_rsa1 == 1 && n_seed == 1 && n_step == 1, "enrol 0: seed pair only");

    clear_counts(); issue(CMD_SCAN_TEST, 0);
    check(n_slk == 1 && n_slk_id == 0 && n_eval == 0, "scan test: one run, stored seed");

    clear_counts(); issue(CMD_FUNC_TEST, 0);
    check(n_eval == REP && n_eval_fkey == REP && n_id == 1, "func: PUF on FKEY");
    check(n_slk == 1 && n_slk_id == 1, "func: scan lock seeded by identifier");
    check(n_step == 1 && n_otp == 1 && n_rsa2 == 1 && n_rsa1 == 0, "func: key generation");
    check(n_otp_before_slk_done == 0, "func: key generated after done");

    clear_counts(); issue(CMD_UNLOCK, 0);
    check(n_eval_fkey == REP && n_id == 1 && n_otp == 0 && n_slk == 0, "unlock");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
