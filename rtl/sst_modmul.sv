// sst_modmul: sequential modular multiplier, r = a * b mod n, the building
// block of the RSA exponentiation.
//
// Interleaved (shift-and-add) method, one bit of b per clock from the most
// significant end: acc = 2*acc mod n, then acc = acc + a mod n if the bit
// is 1.  Each reduction needs at most one subtraction because acc < n and
// a < n.  The method is this design's choice; the scheme only gives the
// RSA formulas.
//
// Interface / timing: 'start' (one cycle) captures a, b and n; exactly W
// clocks later 'done' pulses for one cycle and 'r' holds the product until
// the next start.  Preconditions: n odd or even but > 1, a < n.
module sst_modmul #(
  parameter int W = 64
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic [W-1:0] n,
  output logic         busy,
  output logic         done,
  output logic [W-1:0] r
);

  localparam int CW = $clog2(W + 1);

  logic [W-1:0]  a_q, b_q, n_q;
  logic [CW-1:0] left;
  logic [W:0]    dbl, dbl_red, sum, sum_red;

  always_comb begin
    dbl     = {r, 1'b0};
    dbl_red = (dbl >= {1'b0, n_q}) ? dbl - {1'b0, n_q} : dbl;
    sum     = b_q[W-1] ? dbl_red + {1'b0, a_q} : dbl_red;
    sum_red = (sum >= {1'b0, n_q}) ? sum - {1'b0, n_q} : sum;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_q  <= '0;
      b_q  <= '0;
      n_q  <= '0;
      r    <= '0;
      left <= '0;
      busy <= 1'b0;
      done <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start) begin
        a_q  <= a;
        b_q  <= b;
        n_q  <= n;
        r    <= '0;
        left <= CW'(W);
        busy <= 1'b1;
      end else if (busy) begin
        r    <= sum_red[W-1:0];
        b_q  <= b_q << 1;
        left <= left - CW'(1);
        if (left == CW'(1)) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

endmodule
