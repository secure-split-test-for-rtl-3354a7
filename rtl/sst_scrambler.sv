// sst_scrambler: N x N scrambler that reorders the scan-chain outputs under
// control bits, so that a reader of the scan port without the control word
// cannot tell which chain a bit came from.
//
// The scheme asks only for a block that maps an input string onto an output
// string of the same width in an order set by control inputs (the example
// in the scheme is 4 x 4; the ten-chain benchmark uses ten).  The structure
// here is this design's own: an odd-even transposition network.  Stage s
// holds 2x2 exchange switches on line pairs (i, i+1) with i = s%2, s%2+2,
// ...; a switch whose control bit is 1 swaps its two lines.  With
// STAGES = N every permutation of the N lines can be set.  Control bits are
// used stage by stage, lowest line pair first, from ctrl[0] upwards.
//
// Interface / timing: purely combinational, dout follows din and ctrl.
module sst_scrambler #(
  parameter int N      = 10,
  parameter int STAGES = 10,
  localparam int CW    = sst_pkg::scr_ctrl_bits(N, STAGES)
) (
  input  logic [N-1:0]  din,
  input  logic [CW-1:0] ctrl,
  output logic [N-1:0]  dout
);

  // Control-bit index of the first switch of stage s.
  function automatic int stage_base(int s);
    int b;
    b = 0;
    for (int t = 0; t < s; t++) b += sst_pkg::scr_stage_switches(N, t);
    return b;
  endfunction

  logic [N-1:0] lane [STAGES+1];

  assign lane[0] = din;

  for (genvar s = 0; s < STAGES; s++) begin : g_stage
    localparam int FIRST = s % 2;
    localparam int NSW   = sst_pkg::scr_stage_switches(N, s);
    localparam int BASE  = stage_base(s);
    for (genvar i = 0; i < N; i++) begin : g_line
      if (i < FIRST || i >= FIRST + 2 * NSW) begin : g_pass
        assign lane[s+1][i] = lane[s][i];
      end else if ((i - FIRST) % 2 == 0) begin : g_upper
        assign lane[s+1][i] = ctrl[BASE + (i - FIRST) / 2] ? lane[s][i+1] : lane[s][i];
      end else begin : g_lower
        assign lane[s+1][i] = ctrl[BASE + (i - FIRST) / 2] ? lane[s][i-1] : lane[s][i];
      end
    end
  end

  assign dout = lane[STAGES];

endmodule
