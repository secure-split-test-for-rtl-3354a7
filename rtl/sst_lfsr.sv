// sst_lfsr: loadable Galois linear feedback shift register, used as the
// pseudo random number generator (PRNG) of the PUF-SST scheme.
//
// The PRNG produces the challenges applied to the arbiter PUF during
// enrolment and the random number that is turned into the end-user KEY;
// a second, narrower copy drives the scrambler control inside the scan
// locking block.  That a PRNG built from a seed and a fixed formula is used
// follows the scheme; the LFSR form, the polynomials and the seed are this
// design's own choice.
//
// Form: right-shifting Galois LFSR.  One step: out bit = state[0],
// state = (state >> 1) ^ (state[0] ? POLY : 0).  POLY holds the feedback
// polynomial with the x^W term at bit W-1 (x^k at bit k-1); the default is
// x^32 + x^22 + x^2 + x + 1, which is primitive (period 2^32-1).
//
// Interface / timing: 'load' copies 'seed' (an all-zero seed is replaced
// by 1, the only lock-up state) at the next clock edge; otherwise 'step'
// advances the register by one state per clock.  'state' is the register.
module sst_lfsr #(
  parameter int          W    = 32,
  parameter logic [W-1:0] POLY = 32'h8020_0003,
  parameter logic [W-1:0] SEED = 32'h0000_0001
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load,
  input  logic [W-1:0] seed,
  input  logic         step,
  output logic [W-1:0] state
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= (SEED == '0) ? W'(1) : SEED;
    end else if (load) begin
      state <= (seed == '0) ? W'(1) : seed;
    end else if (step) begin
      state <= (state >> 1) ^ (state[0] ? POLY : '0);
    end
  end

endmodule
