// tb_da_obc_lane: drives one lane with H random bit slices of four taps and
// compares {acc, low} with extra + sum_j s_j * D_j * 2^j, where
// D_j = sum_k (2*x_k[j] - 1) * A_k is worked out by multiplication and
// s_j = -1 on the slice marked as the sign slice. Runs the lane both as a
// low lane (no sign slice, nonzero extra) and as a high lane (last slice is
// the sign slice, extra 0).
module tb_da_obc_lane;
  import da_obc_pkg::*;

  localparam int unsigned W = 8, H = 4, AW = W + 4;
  localparam int A[4] = '{23, 94, -61, 7};

  logic clk = 0, rst_n = 0, en = 0;
  logic [3:0] xbit = '0;
  lane_ctl_t ctl = '{first: 1'b0, nsign: 1'b1};
  logic signed [AW-1:0] extra = '0;
  logic signed [AW-1:0] acc;
  logic        [H-2:0]  low;
  int checks = 0, failures = 0;

  da_obc_lane #(.W(W), .H(H), .AW(AW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 400; t++) begin
      bit hi_lane;
      longint exp, got;
      hi_lane = t[0];
      exp = hi_lane ? 0 : -(A[0] + A[1] + A[2] + A[3]);
      for (int j = 0; j < H; j++) begin
        logic [3:0] b;
        int d;
        bit sgn;
        b = 4'($urandom);
        sgn = hi_lane && (j == H - 1);
        d = 0;
        for (int k = 0; k < 4; k++) d += (2 * int'(b[k]) - 1) * A[k];
        if (sgn) d = -d;
        exp += longint'(d) <<< j;
        @(negedge clk);
        en = 1; xbit = b; ctl.first = (j == 0); ctl.nsign = !sgn;
        extra = hi_lane ? '0 : AW'(-(A[0] + A[1] + A[2] + A[3]));
      end
      @(negedge clk);
      en = 0;
      got = (longint'(acc) <<< (H - 1)) + longint'(low);
      checks++;
      if (got != exp) begin
        failures++;
        $display("FAIL t=%0d got %0d exp %0d", t, got, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
