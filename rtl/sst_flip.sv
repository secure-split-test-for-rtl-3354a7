// sst_flip: flipping circuit of the PUF-SST key generation.  It inverts a
// fixed, secret set of bits of the on-chip random number before the number
// is burnt into the one-time programmable memory, so that the encrypted
// random number sent off-chip does not by itself reveal the stored key:
// only the design house knows which bits FLIP_MASK inverts.
//
// Following the scheme: "invert some bits of the random number", bits known
// only to the design house.  Hard-wiring them as FLIP_MASK is this design's
// choice.  Interface / timing: combinational, dout = din ^ FLIP_MASK.
module sst_flip #(
  parameter int           W         = 16,
  parameter logic [W-1:0] FLIP_MASK = 16'h5A3C
) (
  input  logic [W-1:0] din,
  output logic [W-1:0] dout
);

  assign dout = din ^ FLIP_MASK;

endmodule
