// sst_controller: on-chip sequencer of the PUF-SST test flow.  It carries
// out the tester's commands by driving the PRNG, the arbiter PUF and its
// error correction, the two RSA engines, the scan locking block and the OTP.
//
// Flow per command (the order of steps follows the scheme; the command
// interface and the state encoding are this design's own):
//   CMD_ENROLL    for each of crp_count pairs: step the PRNG, evaluate the
//                 PUF on the PRNG state (REP evaluations, majority by the
//                 ECC), encrypt {challenge, response} with RSA engine 1 and
//                 wait for it.  Then step the PRNG once more, keep that
//                 PUF answer as the scrambler seed for the structural test
//                 and send its pair encrypted as well (the last ciphertext
//                 of the enrolment), so the design house can rebuild the
//                 scrambler control.
//   CMD_SCAN_TEST start the scan locking block with the kept seed; wait for
//                 its 'done'.
//   CMD_FUNC_TEST evaluate the PUF on FKEY and keep the answer as the
//                 identifier that opens the functional lock; run the scan
//                 locking block seeded with that same answer; when it is
//                 done, step the PRNG, burn the flipped random number into
//                 the OTP and encrypt the raw number with RSA engine 2.
//   CMD_UNLOCK    evaluate the PUF on FKEY and keep the identifier (what an
//                 end user's chip does at power-up).
// A command is accepted only while 'busy' is low.
//
// Strobes to the datapath (all one cycle): prng_step, ecc_clear, puf_eval
// (REP consecutive cycles), rsa1_start, rsa2_start, slk_start, seed_load
// (scrambler seed := ECC output), id_load (identifier := ECC output),
// otp_program.  chal_fkey selects FKEY instead of the PRNG as the PUF
// challenge; seed_from_id selects the identifier as the scan-lock seed.
module sst_controller #(
  parameter int REP = 3
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              cmd_valid,
  input  sst_pkg::sst_cmd_e cmd,
  input  logic [15:0]       crp_count,
  input  logic              ecc_done,
  input  logic              rsa1_done,
  input  logic              rsa2_done,
  input  logic              slk_done,
  output logic              busy,
  output logic              prng_step,
  output logic              ecc_clear,
  output logic              puf_eval,
  output logic              chal_fkey,
  output logic              rsa1_start,
  output logic              rsa2_start,
  output logic              slk_start,
  output logic              seed_from_id,
  output logic              seed_load,
  output logic              id_load,
  output logic              otp_program
);

  import sst_pkg::*;

  typedef enum logic [4:0] {
    C_IDLE,
    C_E_CHAL, C_E_EVAL, C_E_ECC, C_E_ENC, C_E_WAIT,
    C_S_CHAL, C_S_EVAL, C_S_ECC, C_S_ENC, C_S_WAIT,
    C_T_START, C_T_WAIT,
    C_F_CLR, C_F_EVAL, C_F_ECC, C_F_START, C_F_WAIT,
    C_K_PRN, C_K_PROG, C_K_WAIT,
    C_U_CLR, C_U_EVAL, C_U_ECC
  } cstate_e;

  localparam int RW = $clog2(REP + 1);

  cstate_e      st;
  logic [RW-1:0] ev_cnt;
  logic [15:0]  crp_left;

  logic in_eval;
  assign in_eval = (st == C_E_EVAL) || (st == C_S_EVAL) ||
                   (st == C_F_EVAL) || (st == C_U_EVAL);

  always_comb begin
    busy         = (st != C_IDLE);
    prng_step    = (st == C_E_CHAL) || (st == C_S_CHAL) || (st == C_K_PRN);
    ecc_clear    = (st == C_E_CHAL) || (st == C_S_CHAL) ||
                   (st == C_F_CLR)  || (st == C_U_CLR);
    puf_eval     = in_eval && (ev_cnt != RW'(REP));
    chal_fkey    = (st == C_F_CLR) || (st == C_F_EVAL) ||
                   (st == C_U_CLR) || (st == C_U_EVAL);
    rsa1_start   = (st == C_E_ENC) || (st == C_S_ENC);
    rsa2_start   = (st == C_K_PROG);
    otp_program  = (st == C_K_PROG);
    slk_start    = (st == C_T_START) || (st == C_F_START);
    seed_from_id = (st == C_F_START);
    seed_load    = (st == C_S_ECC) && ecc_done;
    id_load      = ((st == C_F_ECC) || (st == C_U_ECC)) && ecc_done;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st       <= C_IDLE;
      ev_cnt   <= '0;
      crp_left <= '0;
    end else begin
      if (in_eval && ev_cnt != RW'(REP)) ev_cnt <= ev_cnt + RW'(1);
      unique case (st)
        C_IDLE: if (cmd_valid) begin
          ev_cnt <= '0;
          unique case (cmd)
            CMD_ENROLL: begin
              crp_left <= crp_count;
              st       <= (crp_count == '0) ? C_S_CHAL : C_E_CHAL;
            end
            CMD_SCAN_TEST: st <= C_T_START;
            CMD_FUNC_TEST: st <= C_F_CLR;
            CMD_UNLOCK:    st <= C_U_CLR;
            default:       st <= C_IDLE;
          endcase
        end
        // enrolment of one challenge/response pair
        C_E_CHAL: begin ev_cnt <= '0; st <= C_E_EVAL; end
        C_E_EVAL: if (ev_cnt == RW'(REP)) st <= C_E_ECC;
        C_E_ECC:  if (ecc_done) st <= C_E_ENC;
        C_E_ENC:  st <= C_E_WAIT;
        C_E_WAIT: if (rsa1_done) begin
          crp_left <= crp_left - 16'd1;
          st       <= (crp_left == 16'd1) ? C_S_CHAL : C_E_CHAL;
        end
        // next PUF answer becomes the scrambler seed
        C_S_CHAL: begin ev_cnt <= '0; st <= C_S_EVAL; end
        C_S_EVAL: if (ev_cnt == RW'(REP)) st <= C_S_ECC;
        C_S_ECC:  if (ecc_done) st <= C_S_ENC;
        C_S_ENC:  st <= C_S_WAIT;
        C_S_WAIT: if (rsa1_done) st <= C_IDLE;
        // structural (scan) test
        C_T_START: st <= C_T_WAIT;
        C_T_WAIT:  if (slk_done) st <= C_IDLE;
        // functional test under FKEY
        C_F_CLR:   begin ev_cnt <= '0; st <= C_F_EVAL; end
        C_F_EVAL:  if (ev_cnt == RW'(REP)) st <= C_F_ECC;
        C_F_ECC:   if (ecc_done) st <= C_F_START;
        C_F_START: st <= C_F_WAIT;
        C_F_WAIT:  if (slk_done) st <= C_K_PRN;
        // key generation: random number -> flip -> OTP, and -> RSA
        C_K_PRN:   st <= C_K_PROG;
        C_K_PROG:  st <= C_K_WAIT;
        C_K_WAIT:  if (rsa2_done) st <= C_IDLE;
        // unlock
        C_U_CLR:   begin ev_cnt <= '0; st <= C_U_EVAL; end
        C_U_EVAL:  if (ev_cnt == RW'(REP)) st <= C_U_ECC;
        C_U_ECC:   if (ecc_done) st <= C_IDLE;
        default:   st <= C_IDLE;
      endcase
    end
  end

  a_one_start: assert property (@(posedge clk) disable iff (!rst_n)
                                !(rsa1_start && rsa2_start));

endmodule
