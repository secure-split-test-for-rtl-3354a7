// sst_puf_ecc: error correction for PUF responses by a repetition code.
//
// The scheme places an error correcting code block behind the PUF so that
// the same challenge always yields the same key despite noisy arbiters; it
// does not say which code.  This design uses the simplest one: the PUF is
// evaluated REP times (REP odd) and every response bit is decided by
// majority, which corrects up to (REP-1)/2 flips of each bit.
//
// Interface / timing: 'clear' (one cycle) empties the vote counters;
// each cycle with 'sample' high adds 'din' to them.  'done' is high once REP
// samples are in, and 'dout' is then the majority word; both hold until the
// next clear.  Samples beyond REP are ignored.
module sst_puf_ecc #(
  parameter int W   = 16,
  parameter int REP = 3
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clear,
  input  logic         sample,
  input  logic [W-1:0] din,
  output logic [W-1:0] dout,
  output logic         done
);

  localparam int CW = $clog2(REP + 1);

  logic [CW-1:0] ones [W];
  logic [CW-1:0] nsamp;

  assign done = (nsamp == CW'(REP));

  always_comb begin
    for (int i = 0; i < W; i++) dout[i] = (ones[i] > CW'(REP / 2));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      nsamp <= '0;
      for (int i = 0; i < W; i++) ones[i] <= '0;
    end else if (clear) begin
      nsamp <= '0;
      for (int i = 0; i < W; i++) ones[i] <= '0;
    end else if (sample && !done) begin
      nsamp <= nsamp + CW'(1);
      for (int i = 0; i < W; i++) ones[i] <= ones[i] + CW'(din[i]);
    end
  end

endmodule
