// tb_da_obc_fir_n8: end-to-end test of the 2-BAAT DA OBC FIR filter with 8-bit
// samples (the second configuration of the comparison), 8-bit default coefficients.
//
// Random and extreme samples are offered with random gaps. Every accepted
// sample is also fed to a reference FIR, y(n) = sum_k A_k * x(n-k), computed
// with multiplications. Each y_valid output is compared with the oldest
// outstanding reference value; the latency (accept clock to y_valid clock,
// N/2 + 3) and the sample period of back-to-back samples (N/2 clocks) are
// checked as well. The test counts how often each mechanism occurred and fails
// if one never did: back-to-back samples, idle clocks between samples, Extra
// starts of the low lane, sign-slice negation in the high lane, ROM word
// inversion in each lane, and the pipeline register taking a result while the
// next sample is already being processed.
module tb_da_obc_fir_n8;
  localparam int unsigned N = 8, W = 8, H = N / 2, YW = N + W + 2;
  localparam int A[4] = '{23, 94, -61, 7};
  localparam int NSAMPLES = 3000;

  logic clk = 0, rst_n = 0, in_valid = 0;
  logic in_ready, y_valid;
  logic signed [N-1:0]  x_in = '0;
  logic signed [YW-1:0] y;

  da_obc_fir #(.N(N)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cyc = 0;
  longint hist[4] = '{default: 0};
  longint exp_q[$];
  int     t_q[$];
  int n_in = 0, n_out = 0;
  int n_b2b = 0, n_idle = 0, n_extra = 0, n_sign = 0, n_inv_lo = 0, n_inv_hi = 0, n_overlap = 0;
  int last_take = -1000;

  always @(posedge clk) cyc <= cyc + 1;

  // reference model and input side
  always @(posedge clk) if (rst_n) begin
    if (in_valid && in_ready) begin
      longint e;
      hist[3] = hist[2]; hist[2] = hist[1]; hist[1] = hist[0]; hist[0] = longint'(x_in);
      e = 0;
      for (int k = 0; k < 4; k++) e += longint'(A[k]) * hist[k];
      exp_q.push_back(e);
      t_q.push_back(cyc);
      if (cyc - last_take == H) n_b2b++;
      if (last_take >= 0 && cyc - last_take < H) begin
        failures++; $display("FAIL sample period %0d < %0d", cyc - last_take, H);
      end
      last_take = cyc;
      n_in++;
    end else if (in_ready && !in_valid) n_idle++;
  end

  // mechanism counters from inside the filter
  always @(posedge clk) if (rst_n && dut.en) begin
    if (dut.ctl_lo.first) n_extra++;
    if (!dut.ctl_hi.nsign && dut.u_lane_hi.u_mux.cin) n_sign++;
    if (dut.u_lane_lo.u_mux.cin) n_inv_lo++;
    if (dut.u_lane_hi.u_mux.cin) n_inv_hi++;
    if (dut.pipe_load && dut.ctl_lo.first) n_overlap++;
  end

  // output side
  always @(posedge clk) if (rst_n && y_valid) begin
    longint e;
    int t;
    checks += 2;
    if (exp_q.size() == 0) begin
      failures++; $display("FAIL output without input");
    end else begin
      e = exp_q.pop_front();
      t = t_q.pop_front();
      if (longint'(y) != e) begin
        failures++; $display("FAIL output %0d: y=%0d exp %0d", n_out, y, e);
      end
      if (cyc - t != H + 3) begin
        failures++; $display("FAIL latency %0d exp %0d", cyc - t, H + 3);
      end
    end
    n_out++;
  end

  function automatic logic signed [N-1:0] pick_sample(input int i);
    case ($urandom_range(0, 7))
      0: return {1'b1, {(N-1){1'b0}}};   // most negative
      1: return {1'b0, {(N-1){1'b1}}};   // most positive
      2: return '0;
      default: return N'($urandom);
    endcase
  endfunction

  task automatic report_mech(input string name, input int n);
    checks++;
    $display("mechanism %-28s %0d", name, n);
    if (n == 0) begin failures++; $display("FAIL mechanism never happened: %s", name); end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    while (n_in < NSAMPLES) begin
      in_valid = ($urandom_range(0, 3) != 0);
      x_in = pick_sample(n_in);
      @(negedge clk);
    end
    in_valid = 0;
    repeat (4 * H + 10) @(negedge clk);
    checks++;
    if (n_out != NSAMPLES || exp_q.size() != 0) begin
      failures++; $display("FAIL %0d inputs, %0d outputs", NSAMPLES, n_out);
    end
    report_mech("back-to-back samples", n_b2b);
    report_mech("idle clocks", n_idle);
    report_mech("Extra start (S3)", n_extra);
    report_mech("sign-slice negation (S2)", n_sign);
    report_mech("ROM word inverted, lo lane", n_inv_lo);
    report_mech("ROM word inverted, hi lane", n_inv_hi);
    report_mech("pipeline overlap", n_overlap);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NSAMPLES * H * 3 + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
