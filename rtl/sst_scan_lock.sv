// sst_scan_lock: scan locking block of the PUF-SST scheme.  It hides the
// scan-out responses of the chip under test: each slice (one bit per scan
// chain) is reordered by the scrambler, the first N_XOR outputs are then
// inverted or not by key bits, and the result is compacted into a MISR
// signature.  Only the design house, which can rebuild the control word,
// can predict the signature of a good chip.
//
// What follows the scheme: scrambler on the scan-chain outputs, XOR gates
// after it (ten XOR gates on ten chains in the main configuration), an LFSR
// and a control unit driving the scrambler, the PUF response as the seed of
// that control, a compactor producing the signature and a 'done' once the
// test response has been fully scrambled.
//
// This design's own choices: the control unit expands the LFSR_W-bit seed
// into a KS_W-bit control word (scrambler bits, then XOR bits) by shifting
// the LFSR output bit state[0] into a control register for KS_W clocks
// (SETUP).  During RUN the LFSR and the control register advance one step
// per accepted slice, so the mapping changes from slice to slice.
//
// Interface / timing:
//   start       - one-cycle pulse; loads 'seed' (zero is replaced by 1),
//                 clears the signature and enters SETUP.
//   ready       - high in RUN: the tester may present slices.
//   shift_en    - a slice on scan_in is accepted at the next edge.
//   test_len    - slices per test (sampled at start; 0 is treated as 1).
//   done        - high from the end of the last slice until the next start.
//   scrambled / scrambled_valid - the masked slice, combinational.
//   signature   - MISR contents; final once 'done' is high.
// Latency: SETUP takes KS_W clocks after the start edge.
module sst_scan_lock #(
  parameter int              N         = 10,
  parameter int              N_XOR     = 10,
  parameter int              STAGES    = 10,
  parameter int              LFSR_W    = 16,
  parameter logic [LFSR_W-1:0] LFSR_POLY = 16'hB400,
  parameter logic [N-1:0]    MISR_POLY = 10'h240,
  localparam int             SCR_CW    = sst_pkg::scr_ctrl_bits(N, STAGES),
  localparam int             KS_W      = SCR_CW + N_XOR
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic [LFSR_W-1:0] seed,
  input  logic [15:0]       test_len,
  input  logic              shift_en,
  input  logic [N-1:0]      scan_in,
  output logic              ready,
  output logic              done,
  output logic              busy,
  output logic [N-1:0]      scrambled,
  output logic              scrambled_valid,
  output logic [N-1:0]      signature
);

  typedef enum logic [1:0] {S_IDLE, S_SETUP, S_RUN, S_DONE} state_e;

  state_e            st;
  logic [LFSR_W-1:0] lfsr;
  logic [KS_W-1:0]   ks;
  logic [15:0]       cnt, len_q;
  logic [N-1:0]      scr_out, xor_mask;
  logic              advance, misr_clear;

  sst_scrambler #(.N(N), .STAGES(STAGES)) u_scr (
    .din  (scan_in),
    .ctrl (ks[SCR_CW-1:0]),
    .dout (scr_out)
  );

  always_comb begin
    xor_mask = '0;
    for (int j = 0; j < N_XOR; j++) xor_mask[j] = ks[SCR_CW+j];
  end

  assign scrambled       = scr_out ^ xor_mask;
  assign ready           = (st == S_RUN);
  assign scrambled_valid = ready && shift_en;
  assign done            = (st == S_DONE);
  assign busy            = (st == S_SETUP) || (st == S_RUN);
  assign advance         = (st == S_SETUP) || scrambled_valid;
  assign misr_clear      = start;

  sst_compactor #(.W(N), .POLY(MISR_POLY)) u_misr (
    .clk   (clk),
    .rst_n (rst_n),
    .clear (misr_clear),
    .en    (scrambled_valid),
    .din   (scrambled),
    .sig   (signature)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st    <= S_IDLE;
      lfsr  <= LFSR_W'(1);
      ks    <= '0;
      cnt   <= '0;
      len_q <= 16'd1;
    end else if (start) begin
      st    <= S_SETUP;
      lfsr  <= (seed == '0) ? LFSR_W'(1) : seed;
      ks    <= '0;
      cnt   <= '0;
      len_q <= (test_len == '0) ? 16'd1 : test_len;
    end else begin
      if (advance) begin
        lfsr <= (lfsr >> 1) ^ (lfsr[0] ? LFSR_POLY : '0);
        ks   <= {lfsr[0], ks[KS_W-1:1]};
      end
      unique case (st)
        S_IDLE, S_DONE: ;
        S_SETUP: begin
          if (cnt == 16'(KS_W - 1)) begin
            st  <= S_RUN;
            cnt <= '0;
          end else begin
            cnt <= cnt + 16'd1;
          end
        end
        S_RUN: begin
          if (shift_en) begin
            if (cnt == len_q - 16'd1) st <= S_DONE;
            cnt <= cnt + 16'd1;
          end
        end
        default: st <= S_IDLE;
      endcase
    end
  end

endmodule
