// sst_arbiter_puf: BEHAVIOURAL MODEL of an arbiter physical unclonable
// function (PUF).  A real arbiter PUF is a race between two edges through
// a chain of CHAL_W challenge-controlled multiplexer stages, resolved by an
// arbiter latch at the end; the winner is set by manufacturing variation of
// the wire and gate delays and cannot be synthesised as logic.  This model
// stands in for RESP_W such chains that share one challenge.
//
// Model (this design's own, the widely used additive delay model): stage s
// of chain a adds a delay difference w[a][s] to the race, with sign flipped
// by every crossed (challenge bit = 1) stage behind it, so
//   delta = sum_s w[a][s] * prod_{t >= s} (1 - 2 c[t]),  response = delta > 0.
// The weights are a fixed hash of DEVICE_SEED (the "die"), the chain and
// the stage, in [-2048, 2047].  Measurement noise, set by NOISE (0 = none),
// is drawn from an internal LFSR and added to delta at every evaluation, so
// repeated evaluations of marginal chains can disagree, as in silicon.
//
// Interface / timing: 'eval' (one cycle) samples 'challenge'; the response
// appears on the next clock with 'valid' high for one cycle.
module sst_arbiter_puf #(
  parameter int          CHAL_W      = 32,
  parameter int          RESP_W      = 16,
  parameter logic [31:0] DEVICE_SEED = 32'h1F2E_3D4C,
  parameter int          NOISE       = 64
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              eval,
  input  logic [CHAL_W-1:0] challenge,
  output logic [RESP_W-1:0] response,
  output logic              valid
);

  // 32-bit integer mixing function used to draw a die's delay weights.
  function automatic logic [31:0] mix32(logic [31:0] x);
    x = x ^ (x >> 16);
    x = x * 32'h7FEB_352D;
    x = x ^ (x >> 15);
    x = x * 32'h846C_A68B;
    x = x ^ (x >> 16);
    return x;
  endfunction

  function automatic int weight(int a, int s);
    logic [31:0] h;
    h = mix32(DEVICE_SEED ^ (32'(a) << 8) ^ 32'(s) ^ 32'h9E37_79B9);
    return int'(h[11:0]) - 2048;
  endfunction

  logic [15:0] noise_lfsr;
  int          noise;

  always_comb begin
    noise = ((int'(noise_lfsr[7:0]) - 128) * NOISE) / 128;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      response   <= '0;
      valid      <= 1'b0;
      noise_lfsr <= 16'hACE1;
    end else begin
      valid <= eval;
      if (eval) begin
        noise_lfsr <= (noise_lfsr >> 1) ^ (noise_lfsr[0] ? 16'hB400 : 16'h0000);
        for (int a = 0; a < RESP_W; a++) begin
          int sgn, delta;
          sgn   = 1;
          delta = noise;
          for (int s = CHAL_W - 1; s >= 0; s--) begin
            if (challenge[s]) sgn = -sgn;
            delta += sgn * weight(a, s);
          end
          response[a] <= (delta > 0);
        end
      end
    end
  end

endmodule
