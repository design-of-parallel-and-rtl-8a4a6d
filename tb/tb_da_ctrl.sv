// tb_da_ctrl: runs the controller with random in_valid and compares every
// output, every clock, with a cycle model written from the specification:
// H slices per sample, S3/S4 on the first slice, S2 low on the last slice,
// S1 always high, in_ready while idle or in the last slice, pipe_load one clock
// after the last slice. Also checks the sample period of H clocks for
// back-to-back samples.
module tb_da_ctrl;
  import da_obc_pkg::*;

  localparam int unsigned H = 4, CW = 2;

  logic clk = 0, rst_n = 0, in_valid = 0;
  logic in_ready, take, en, pipe_load;
  logic [CW-1:0] slice;
  lane_ctl_t ctl_lo, ctl_hi;
  int checks = 0, failures = 0;
  int takes = 0, back_to_back = 0;

  da_ctrl #(.H(H)) dut (.*);

  always #5 clk = ~clk;

  // reference model state
  int  m_cnt = -1;      // -1 idle, else slice index
  bit  m_load = 0;
  int  last_take = -100, cyc = 0;

  task automatic cmp(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL cycle %0d %s: got %0d exp %0d", cyc, what, got, exp);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    repeat (2000) begin
      bit rdy, tk;
      in_valid = ($urandom_range(0, 3) != 0);
      #1;
      rdy = (m_cnt < 0) || (m_cnt == H - 1);
      tk  = rdy && in_valid;
      cmp("in_ready", in_ready, rdy);
      cmp("take", take, tk);
      cmp("en", en, m_cnt >= 0);
      cmp("pipe_load", pipe_load, m_load);
      if (m_cnt >= 0) begin
        cmp("slice", slice, m_cnt);
        cmp("S3", ctl_lo.first, m_cnt == 0);
        cmp("S4", ctl_hi.first, m_cnt == 0);
        cmp("S1", ctl_lo.nsign, 1);
        cmp("S2", ctl_hi.nsign, m_cnt != H - 1);
      end
      if (tk) begin
        if (cyc - last_take == H) back_to_back++;
        if (last_take >= 0) cmp("sample period", (cyc - last_take) >= H, 1);
        last_take = cyc;
        takes++;
      end
      @(posedge clk);
      m_load = (m_cnt == H - 1);
      if (tk) m_cnt = 0;
      else if (m_cnt == H - 1) m_cnt = -1;
      else if (m_cnt >= 0) m_cnt++;
      cyc++;
      @(negedge clk);
    end
    cmp("back-to-back samples seen", back_to_back > 0, 1);
    $display("takes=%0d back_to_back=%0d", takes, back_to_back);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
