// sst_otp: BEHAVIOURAL MODEL of a one-time programmable (OTP) memory word,
// such as an antifuse array, that holds the key derived from the on-chip
// random number.  The real part is a process-specific macro; its contents
// survive power cycles and reset, which logic flip-flops cannot do.
//
// Behaviour: every bit starts at 0, the blank state the scheme relies on
// while the chip is on the tester.  The first 'program_en' pulse blows the 1 bits of 'din' (a blown bit stays 1); after that
// the word is sealed and further program pulses are ignored.  Reset does not
// touch the contents.  Sealing after one write is this design's choice.
//
// Interface / timing: 'program_en' is sampled at the clock edge; 'q' and
// 'programmed' change at that edge.
module sst_otp #(
  parameter int W = 16
) (
  input  logic         clk,
  input  logic         program_en,
  input  logic [W-1:0] din,
  output logic [W-1:0] q,
  output logic         programmed
);

  logic [W-1:0] fuse   = '0;
  logic         sealed = 1'b0;

  always_ff @(posedge clk) begin
    if (program_en && !sealed) begin
      fuse   <= fuse | din;
      sealed <= 1'b1;
    end
  end

  assign q          = fuse;
  assign programmed = sealed;

endmodule
