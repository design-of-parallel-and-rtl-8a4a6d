// tb_fir_tap_line: shifts random samples into the delay line (N = 8) and checks,
// for every slice, that bits_lo/bits_hi are bit j and bit H+j of the newest
// four samples kept in a reference history.
module tb_fir_tap_line;
  localparam int unsigned N = 8, H = 4;

  logic clk = 0, rst_n = 0, take = 0;
  logic [N-1:0] x_in = '0;
  logic [1:0] slice = '0;
  logic [3:0] bits_lo, bits_hi;
  int checks = 0, failures = 0;
  logic [N-1:0] hist[4] = '{default: '0};

  fir_tap_line #(.N(N)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    repeat (200) begin
      logic [N-1:0] s;
      s = N'($urandom);
      take = 1; x_in = s;
      @(negedge clk);
      take = 0; x_in = N'($urandom);
      hist[3] = hist[2]; hist[2] = hist[1]; hist[1] = hist[0]; hist[0] = s;
      for (int j = 0; j < H; j++) begin
        slice = 2'(j);
        #1;
        for (int k = 0; k < 4; k++) begin
          checks += 2;
          if (bits_lo[k] != hist[k][j]) begin
            failures++; $display("FAIL lo tap %0d slice %0d", k, j);
          end
          if (bits_hi[k] != hist[k][H + j]) begin
            failures++; $display("FAIL hi tap %0d slice %0d", k, j);
          end
        end
        @(negedge clk);
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
