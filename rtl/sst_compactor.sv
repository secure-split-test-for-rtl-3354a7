// sst_compactor: multiple-input signature register (MISR) that compacts the
// scrambled scan-out slices into one signature.
//
// The scheme sends the scrambled test responses to a compactor and only the
// final signature, with the chip ID, leaves for the design house.  A MISR is
// this design's choice of compactor.  One W-bit slice enters per enabled
// clock: sig = ((sig >> 1) ^ (sig[0] ? POLY : 0)) ^ din.  The default
// polynomial x^10 + x^7 + 1 (primitive) matches the ten scan chains of the
// evaluated benchmark.
//
// Interface / timing: 'clear' zeroes the signature at the next edge and
// wins over 'en'; 'en' absorbs 'din' at the next edge.
module sst_compactor #(
  parameter int           W    = 10,
  parameter logic [W-1:0] POLY = 10'h240
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clear,
  input  logic         en,
  input  logic [W-1:0] din,
  output logic [W-1:0] sig
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sig <= '0;
    end else if (clear) begin
      sig <= '0;
    end else if (en) begin
      sig <= ((sig >> 1) ^ (sig[0] ? POLY : '0)) ^ din;
    end
  end

endmodule
