// sst_ro_trng: ring oscillator true random number generator (behavioural).
//
// Several free-running ring oscillators, each made of a different number of
// inverters, run at unrelated frequencies.  A slow sampling clock takes the
// XOR of their outputs; the random part is the phase jitter each ring picks
// up from noise.  In the memory based split test scheme this number is the
// secret stored in the one-time programmable memory; the PUF based scheme
// replaces it by the arbiter PUF and the PRNG.
//
// A ring oscillator is a combinational loop and its jitter is an analog
// effect, so neither can be written as logic.  This model keeps one phase
// accumulator per ring: every clock it advances by the ring's nominal
// frequency (INC, in 1/65536 of a ring period per clock, larger for shorter
// rings) plus a small jitter term taken from an internal noise LFSR.  The
// ring output is the top bit of the phase.  The noise LFSR is this model's
// stand-in for thermal noise; its seed (NOISE_SEED) plays the part of the
// die and of the moment of power-up.
//
// Interface / timing: while 'en' is high the rings run and every
// SAMPLE_DIV clocks one bit is sampled ('bit_valid' pulse with 'bit_out').
// Sampled bits are shifted into 'word' (newest bit at bit 0); when W new
// bits have been collected 'word_valid' pulses for one clock with the
// complete word.  With 'en' low nothing advances.
module sst_ro_trng #(
  parameter int                W          = 16,
  parameter int                N_RO       = 5,
  parameter int                SAMPLE_DIV = 16,
  parameter logic [15:0]       NOISE_SEED = 16'hACE1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  output logic         bit_out,
  output logic         bit_valid,
  output logic [W-1:0] word,
  output logic         word_valid
);

  // nominal phase steps of rings with 3, 5, 7, 9 and 11 inverters; rings
  // beyond five reuse the list with a small detuning
  localparam logic [15:0] INC_TAB [5] = '{16'h9A3D, 16'h5C71, 16'h41E9, 16'h3341, 16'h29F5};

  localparam int DW = $clog2(SAMPLE_DIV);
  localparam int CW = $clog2(W + 1);

  logic [15:0]    phase [N_RO];
  logic [15:0]    noise;
  logic [DW-1:0]  div;
  logic [CW-1:0]  nbits;
  logic [N_RO-1:0] ring;
  logic           sample;

  always_comb begin
    for (int k = 0; k < N_RO; k++) ring[k] = phase[k][15];
  end

  assign sample = en && (div == DW'(SAMPLE_DIV - 1));

  // noise source: 16-bit Galois LFSR, x^16+x^14+x^13+x^11+1
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) noise <= (NOISE_SEED == '0) ? 16'h0001 : NOISE_SEED;
    else if (en) noise <= (noise >> 1) ^ (noise[0] ? 16'hB400 : 16'h0000);
  end

  // rings: phase += INC + jitter, jitter in [-1024, +896] (up to 1.6% of a
  // ring period per clock) from four noise bits
  for (genvar k = 0; k < N_RO; k++) begin : g_ring
    localparam logic [15:0] INC = INC_TAB[k % 5] + 16'(37 * (k / 5));
    logic [3:0]  jbits;
    logic [15:0] jitter;
    assign jbits  = {noise[(3*k+3) % 16], noise[(3*k+2) % 16], noise[(3*k+1) % 16], noise[(3*k) % 16]};
    assign jitter = 16'({{12{jbits[3]}}, jbits} <<< 7);
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) phase[k] <= 16'(k * 16'h3333);
      else if (en) phase[k] <= phase[k] + INC + jitter;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      div        <= '0;
      nbits      <= '0;
      bit_out    <= 1'b0;
      bit_valid  <= 1'b0;
      word       <= '0;
      word_valid <= 1'b0;
    end else begin
      bit_valid  <= 1'b0;
      word_valid <= 1'b0;
      if (en) div <= sample ? '0 : div + 1'b1;
      if (sample) begin
        bit_out   <= ^ring;
        bit_valid <= 1'b1;
        word      <= {word[W-2:0], ^ring};
        if (nbits == CW'(W - 1)) begin
          nbits      <= '0;
          word_valid <= 1'b1;
        end else begin
          nbits <= nbits + 1'b1;
        end
      end
    end
  end

endmodule
