// sst_pkg: types and helper functions shared by the PUF-based secure split
// test (PUF-SST) blocks.
//
// The command set (sst_cmd_e) is the interface between the tester and the
// on-chip sequencer; its encoding is this design's own choice.  The
// scrambler helper computes how many 2x2 exchange switches an odd-even
// transposition network of N lines and S stages holds, which fixes the
// width of the scrambler control word everywhere it is used.
package sst_pkg;

  // Commands the tester issues to the on-chip SST sequencer.
  typedef enum logic [2:0] {
    CMD_NOP       = 3'd0,
    CMD_ENROLL    = 3'd1,  // collect and encrypt challenge/response pairs
    CMD_SCAN_TEST = 3'd2,  // structural test, responses scrambled + compacted
    CMD_FUNC_TEST = 3'd3,  // functional test under FKEY, then key generation
    CMD_UNLOCK    = 3'd4   // evaluate the PUF on FKEY to (re)open the lock
  } sst_cmd_e;

  // Tag of an RSA ciphertext leaving the chip.
  typedef enum logic {
    ENC_CRP = 1'b0,  // {challenge, response} of one PUF evaluation
    ENC_PRN = 1'b1   // the random number that becomes the end-user KEY
  } enc_kind_e;

  // Switches in stage s of an odd-even transposition network of n lines.
  function automatic int scr_stage_switches(int n, int s);
    return (n - (s % 2)) / 2;
  endfunction

  // Control bits of a whole network of n lines and 'stages' stages.
  function automatic int scr_ctrl_bits(int n, int stages);
    int total;
    total = 0;
    for (int s = 0; s < stages; s++) total += scr_stage_switches(n, s);
    return total;
  endfunction

endpackage
