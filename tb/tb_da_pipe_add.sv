// tb_da_pipe_add: loads random lane results and checks that two clocks later
// y = (({acc_hi,low_hi} << H) + {acc_lo,low_lo}) / 2 with y_valid high for
// exactly one clock, and that y holds between loads.
module tb_da_pipe_add;
  localparam int unsigned AW = 12, H = 4, YW = 20;  // wide enough for any lane values

  logic clk = 0, rst_n = 0, load = 0;
  logic signed [AW-1:0] acc_lo = '0, acc_hi = '0;
  logic        [H-2:0]  low_lo = '0, low_hi = '0;
  logic signed [YW-1:0] y;
  logic                 y_valid;
  int checks = 0, failures = 0;

  da_pipe_add #(.AW(AW), .H(H), .YW(YW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    repeat (300) begin
      longint vlo, vhi, exp;
      @(negedge clk);
      load = 1;
      acc_lo = AW'($urandom); low_lo = (H-1)'($urandom);
      acc_hi = AW'($urandom); low_hi = (H-1)'($urandom);
      // keep the joined sum even, as the lanes always deliver
      low_lo[0] = 1'b0;
      vlo = (longint'(acc_lo) <<< (H - 1)) + longint'(low_lo);
      vhi = (longint'(acc_hi) <<< (H - 1)) + longint'(low_hi);
      exp = ((vhi <<< H) + vlo) / 2;
      @(negedge clk);
      load = 0;
      acc_lo = AW'($urandom); acc_hi = AW'($urandom);  // must not matter any more
      checks++;
      if (y_valid) begin failures++; $display("FAIL y_valid one clock early"); end
      @(negedge clk);
      checks += 2;
      if (!y_valid) begin failures++; $display("FAIL y_valid missing"); end
      if (longint'(y) != exp) begin
        failures++;
        $display("FAIL y=%0d exp %0d", y, exp);
      end
      @(negedge clk);
      checks += 2;
      if (y_valid) begin failures++; $display("FAIL y_valid longer than one clock"); end
      if (longint'(y) != exp) begin failures++; $display("FAIL y did not hold"); end
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
