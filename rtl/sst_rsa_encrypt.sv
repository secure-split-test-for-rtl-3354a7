// sst_rsa_encrypt: RSA encryption engine, c = m^e mod n, with the design
// house's public key (e, n).  The PUF-SST chip holds two of them: one
// encrypts every enrolled challenge/response pair, the other the random
// number that becomes the end-user KEY, so only the holder of the private
// key d (m = c^d mod n) can read either.
//
// The formulas follow the scheme; the hardware is this design's own:
// left-to-right square-and-multiply over all W exponent bits (leading zero
// bits are squared too, which keeps the latency independent of e's
// length), each product computed by sst_modmul.
//
// Interface / timing: 'start' (one cycle) captures msg, e and n.  With
// P = popcount(e), 'done' pulses (W + P) * (W + 2) + 1 clocks after the
// start edge, and 'cipher' holds the result until the next start.
// Precondition: msg < n, n > 1.
module sst_rsa_encrypt #(
  parameter int W = 64
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [W-1:0] msg,
  input  logic [W-1:0] e,
  input  logic [W-1:0] n,
  output logic         busy,
  output logic         done,
  output logic [W-1:0] cipher
);

  typedef enum logic [2:0] {R_IDLE, R_SQ_GO, R_SQ_WAIT, R_MU_GO, R_MU_WAIT, R_FIN} rstate_e;

  localparam int BW = $clog2(W);

  rstate_e       st;
  logic [W-1:0]  base_q, e_q, n_q, res;
  logic [BW-1:0] bit_i;
  logic          mm_start, mm_busy, mm_done;
  logic [W-1:0]  mm_a, mm_b, mm_r;

  assign mm_start = (st == R_SQ_GO) || (st == R_MU_GO);
  assign mm_a     = res;
  assign mm_b     = (st == R_MU_GO) ? base_q : res;
  assign busy     = (st != R_IDLE);
  assign cipher   = res;

  sst_modmul #(.W(W)) u_mm (
    .clk   (clk),
    .rst_n (rst_n),
    .start (mm_start),
    .a     (mm_a),
    .b     (mm_b),
    .n     (n_q),
    .busy  (mm_busy),
    .done  (mm_done),
    .r     (mm_r)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st     <= R_IDLE;
      base_q <= '0;
      e_q    <= '0;
      n_q    <= '0;
      res    <= '0;
      bit_i  <= '0;
      done   <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (st)
        R_IDLE: if (start) begin
          base_q <= msg;
          e_q    <= e;
          n_q    <= n;
          res    <= W'(1);
          bit_i  <= BW'(W - 1);
          st     <= R_SQ_GO;
        end
        R_SQ_GO: st <= R_SQ_WAIT;
        R_SQ_WAIT: if (mm_done) begin
          res <= mm_r;
          if (e_q[bit_i])          st <= R_MU_GO;
          else if (bit_i == '0)    st <= R_FIN;
          else begin
            bit_i <= bit_i - BW'(1);
            st    <= R_SQ_GO;
          end
        end
        R_MU_GO: st <= R_MU_WAIT;
        R_MU_WAIT: if (mm_done) begin
          res <= mm_r;
          if (bit_i == '0) st <= R_FIN;
          else begin
            bit_i <= bit_i - BW'(1);
            st    <= R_SQ_GO;
          end
        end
        R_FIN: begin
          done <= 1'b1;
          st   <= R_IDLE;
        end
        default: st <= R_IDLE;
      endcase
    end
  end

  // The modular multiplier must be idle whenever a new product is requested.
  a_mm_idle: assert property (@(posedge clk) disable iff (!rst_n) mm_start |-> !mm_busy);

endmodule
