// sst_xor_lock: functional locking mask (XOR_F).  Each of the W locked nets
// of the protected core passes through a 3-input XOR gate: IN0 is the net,
// IN1 a bit of the PUF identifier produced by the functional key FKEY, IN2
// a bit that compares the end-user KEY with the word stored in the OTP
// memory (KEY xor OTP).
//
// The core's locked nets are stored inverted at a secret set of positions
// (the lock pattern); the mask undoes this only when IN1 ^ IN2 equals that
// pattern.  With a blank OTP and KEY = 0 (the tester's situation) the core
// works only if the PUF answer to FKEY is the lock pattern; after key
// generation it works only if in addition KEY equals the OTP word.  The XOR
// gate with IN0/IN1/IN2 follows the scheme; feeding IN2 from KEY xor OTP is
// this design's reading of it.
//
// Interface / timing: combinational, dout = in0 ^ in1 ^ in2.
module sst_xor_lock #(
  parameter int W = 16
) (
  input  logic [W-1:0] in0,
  input  logic [W-1:0] in1,
  input  logic [W-1:0] in2,
  output logic [W-1:0] dout
);

  assign dout = in0 ^ in1 ^ in2;

endmodule
