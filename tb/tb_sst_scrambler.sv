// tb_sst_scrambler: self-checking test of the scrambler network.  For random
// control words it checks that the output is the reference permutation of
// the input (reference: explicit sequence of swaps on an index array), that
// it is always a permutation, that all-zero control is the identity, and
// that, with N stages, the network can realise a full reversal.
module tb_sst_scrambler;
  localparam int N = 10, S = 10;
  localparam int CW = sst_pkg::scr_ctrl_bits(N, S);
  int checks = 0, failures = 0;

  logic [N-1:0]  din, dout;
  logic [CW-1:0] ctrl;

  sst_scrambler #(.N(N), .STAGES(S)) dut (.din, .ctrl, .dout);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // src[o] = input line that reaches output o
  function automatic void ref_perm(input logic [CW-1:0] c, output int src [N]);
    int k, t;
    for (int i = 0; i < N; i++) src[i] = i;
    k = 0;
    for (int s = 0; s < S; s++)
      for (int i = s % 2; i + 1 < N; i += 2) begin
        if (c[k]) begin t = src[i]; src[i] = src[i+1]; src[i+1] = t; end
        k++;
      end
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int src [N];
    logic [N-1:0] expv;
    logic [CW-1:0] rev;
    int k;
    check(CW == 45, "control width 45 for 10 lines, 10 stages");
    ctrl = '0;
    for (int t = 0; t < 20; t++) begin
      din = N'($urandom); #1;
      check(dout == din, "zero control is identity");
    end
    for (int t = 0; t < 300; t++) begin
      ctrl = {$urandom, $urandom};
      ref_perm(ctrl, src);
      for (int b = 0; b < N; b++) begin
        din = N'(1) << b; #1;
        check($countones(dout) == 1, "one-hot stays one-hot");
      end
      din = N'($urandom); #1;
      for (int o = 0; o < N; o++) expv[o] = din[src[o]];
      check(dout == expv, $sformatf("permutation t=%0d", t));
    end
    // bubble-sort style reversal: every switch set
    rev = '1; k = 0;
    ctrl = rev;
    din = 10'b00_0000_0001; #1;
    check(dout == 10'b10_0000_0000, "all switches: line 0 reaches line 9");
    din = 10'b10_0000_0000; #1;
    check(dout == 10'b00_0000_0001, "all switches: line 9 reaches line 0");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
