// puf_sst_top: PUF-based secure split test (PUF-SST) wrapper that sits
// between a protected core and an untrusted test floor.  The test house can
// run structural (scan) and functional tests, but it sees only scrambled,
// compacted responses and encrypted data, so the pass/fail decision and the
// key that makes a chip usable stay with the design house.
//
// Blocks: PRNG (sst_lfsr, challenges and the key random number), arbiter
// PUF (behavioural model), repetition-code ECC, RSA engine 1 (enrolled
// challenge/response pairs), RSA engine 2 (random number), flipping
// circuit, OTP key store (behavioural model), XOR_F functional lock, scan
// locking block (scrambler + LFSR control + XOR gates + MISR compactor) and
// the sequencer sst_controller.
//
// The protected core is outside this module: its N_CHAINS scan-chain
// outputs enter on scan_out (one slice per shift_en cycle while scan_ready
// is high), and its RESP_W locked nets enter on func_in and leave, unmasked
// only for a correctly keyed chip, on func_out.  The chip ID (ECID) is read
// by the tester from fuses outside this block.
//
// Tester interface: cmd/cmd_valid (accepted while busy is low, see
// sst_controller), crp_count, test_len, fkey (functional key = a PUF
// challenge) and key (end-user KEY).  Outputs: enc_valid pulses with each
// ciphertext enc_data, tagged by enc_kind; signature is final when
// scan_done is high; otp_programmed tells that the key word has been burnt.
//
// Defaults: ten scan chains and ten XOR gates after the scrambler follow the
// evaluated configuration; the challenge, response and RSA widths, the
// public key (e = 65537, n = 4294967291 * 4294967279), the flip mask and the
// polynomials are this design's choices.
module puf_sst_top #(
  parameter int                CHAL_W      = 32,
  parameter int                RESP_W      = 16,
  parameter int                RSA_W       = 64,
  parameter int                N_CHAINS    = 10,
  parameter int                N_XOR       = 10,
  parameter int                SCR_STAGES  = 10,
  parameter int                ECC_REP     = 3,
  parameter int                PUF_NOISE   = 64,
  parameter logic [31:0]       DEVICE_SEED = 32'h1F2E_3D4C,
  parameter logic [CHAL_W-1:0] PRNG_SEED   = 32'h0000_0001,
  parameter logic [CHAL_W-1:0] PRNG_POLY   = 32'h8020_0003,
  parameter logic [RESP_W-1:0] SLK_POLY    = 16'hB400,
  parameter logic [N_CHAINS-1:0] MISR_POLY = 10'h240,
  parameter logic [RESP_W-1:0] FLIP_MASK   = 16'h5A3C,
  parameter logic [RSA_W-1:0]  RSA_E       = 64'd65537,
  parameter logic [RSA_W-1:0]  RSA_N       = 64'hFFFF_FFEA_0000_0055
) (
  input  logic                clk,
  input  logic                rst_n,
  // tester commands
  input  logic                cmd_valid,
  input  sst_pkg::sst_cmd_e   cmd,
  input  logic [15:0]         crp_count,
  input  logic [15:0]         test_len,
  input  logic [CHAL_W-1:0]   fkey,
  input  logic [RESP_W-1:0]   key,
  output logic                busy,
  // encrypted data to the design house
  output logic                enc_valid,
  output sst_pkg::enc_kind_e  enc_kind,
  output logic [RSA_W-1:0]    enc_data,
  // scan path of the protected core
  input  logic                shift_en,
  input  logic [N_CHAINS-1:0] scan_out,
  output logic                scan_ready,
  output logic                scan_done,
  output logic [N_CHAINS-1:0] scrambled,
  output logic                scrambled_valid,
  output logic [N_CHAINS-1:0] signature,
  // functional lock on the protected core's nets
  input  logic [RESP_W-1:0]   func_in,
  output logic [RESP_W-1:0]   func_out,
  output logic                otp_programmed
);

  import sst_pkg::*;

  // ---------------- sequencer strobes ----------------
  logic prng_step, ecc_clear, puf_eval, chal_fkey;
  logic rsa1_start, rsa2_start, slk_start, seed_from_id, seed_load, id_load;
  logic otp_program;
  logic ecc_done, rsa1_done, rsa2_done;

  // ---------------- datapath ----------------
  logic [CHAL_W-1:0] prng_state, challenge;
  logic [RESP_W-1:0] puf_resp, ecc_resp, scr_seed, id_reg, slk_seed;
  logic [RESP_W-1:0] prn, prn_flipped, otp_q, lock_in2;
  logic              puf_valid;
  logic [RSA_W-1:0]  rsa1_c, rsa2_c, crp_msg, prn_msg;

  sst_controller #(.REP(ECC_REP)) u_ctrl (
    .clk, .rst_n, .cmd_valid, .cmd, .crp_count,
    .ecc_done, .rsa1_done, .rsa2_done, .slk_done(scan_done),
    .busy, .prng_step, .ecc_clear, .puf_eval, .chal_fkey,
    .rsa1_start, .rsa2_start, .slk_start, .seed_from_id, .seed_load,
    .id_load, .otp_program
  );

  sst_lfsr #(.W(CHAL_W), .POLY(PRNG_POLY), .SEED(PRNG_SEED)) u_prng (
    .clk, .rst_n, .load(1'b0), .seed('0), .step(prng_step), .state(prng_state)
  );

  assign challenge = chal_fkey ? fkey : prng_state;

  sst_arbiter_puf #(
    .CHAL_W(CHAL_W), .RESP_W(RESP_W), .DEVICE_SEED(DEVICE_SEED), .NOISE(PUF_NOISE)
  ) u_puf (
    .clk, .rst_n, .eval(puf_eval), .challenge, .response(puf_resp), .valid(puf_valid)
  );

  sst_puf_ecc #(.W(RESP_W), .REP(ECC_REP)) u_ecc (
    .clk, .rst_n, .clear(ecc_clear), .sample(puf_valid), .din(puf_resp),
    .dout(ecc_resp), .done(ecc_done)
  );

  // Scrambler seed (structural test) and PUF identifier (functional lock).
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      scr_seed <= '0;
      id_reg   <= '0;
    end else begin
      if (seed_load) scr_seed <= ecc_resp;
      if (id_load)   id_reg   <= ecc_resp;
    end
  end

  // RSA engine 1: enrolled challenge/response pairs.
  assign crp_msg = RSA_W'({challenge, ecc_resp});
  sst_rsa_encrypt #(.W(RSA_W)) u_rsa_crp (
    .clk, .rst_n, .start(rsa1_start), .msg(crp_msg), .e(RSA_E), .n(RSA_N),
    .busy(), .done(rsa1_done), .cipher(rsa1_c)
  );

  // Key generation: random number -> flipping circuit -> OTP, and -> RSA 2.
  assign prn     = prng_state[RESP_W-1:0];
  assign prn_msg = RSA_W'(prn);

  sst_flip #(.W(RESP_W), .FLIP_MASK(FLIP_MASK)) u_flip (
    .din(prn), .dout(prn_flipped)
  );

  sst_otp #(.W(RESP_W)) u_otp (
    .clk, .program_en(otp_program), .din(prn_flipped), .q(otp_q),
    .programmed(otp_programmed)
  );

  sst_rsa_encrypt #(.W(RSA_W)) u_rsa_prn (
    .clk, .rst_n, .start(rsa2_start), .msg(prn_msg), .e(RSA_E), .n(RSA_N),
    .busy(), .done(rsa2_done), .cipher(rsa2_c)
  );

  assign enc_valid = rsa1_done || rsa2_done;
  assign enc_kind  = rsa2_done ? ENC_PRN : ENC_CRP;
  assign enc_data  = rsa2_done ? rsa2_c : rsa1_c;

  // Functional lock XOR_F: IN1 = PUF identifier, IN2 = KEY xor OTP word.
  assign lock_in2 = key ^ otp_q;
  sst_xor_lock #(.W(RESP_W)) u_lock (
    .in0(func_in), .in1(id_reg), .in2(lock_in2), .dout(func_out)
  );

  // Scan locking block.
  assign slk_seed = seed_from_id ? ecc_resp : scr_seed;
  sst_scan_lock #(
    .N(N_CHAINS), .N_XOR(N_XOR), .STAGES(SCR_STAGES), .LFSR_W(RESP_W),
    .LFSR_POLY(SLK_POLY), .MISR_POLY(MISR_POLY)
  ) u_slk (
    .clk, .rst_n, .start(slk_start), .seed(slk_seed), .test_len,
    .shift_en, .scan_in(scan_out), .ready(scan_ready), .done(scan_done),
    .busy(), .scrambled, .scrambled_valid, .signature
  );

  // The pair {challenge, response} must fit below the modulus.
  if (CHAL_W + RESP_W >= RSA_W) begin : g_bad_width
    $error("CHAL_W + RESP_W must be below RSA_W");
  end

endmodule
