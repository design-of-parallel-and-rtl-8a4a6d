// tb_shift_accumulator: random sequences of H slice words. After the H-th
// slice, {acc, low} must equal extra + sum_j (word_j + cin_j) * 2^j, worked out
// with plain integer arithmetic. Also checks that acc/low hold while en = 0.
module tb_shift_accumulator;
  localparam int unsigned DW = 11, AW = 12, H = 4;

  logic clk = 0, rst_n = 0, en = 0, first = 0, cin = 0;
  logic signed [DW-1:0] word_sel = '0;
  logic signed [AW-1:0] extra = '0;
  logic signed [AW-1:0] acc;
  logic        [H-2:0]  low;
  int checks = 0, failures = 0;

  shift_accumulator #(.DW(DW), .AW(AW), .H(H)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    repeat (300) begin
      longint exp, got;
      int e;
      e = int'($urandom_range(0, 1000)) - 500;
      extra = AW'(e);
      exp = e;
      for (int j = 0; j < H; j++) begin
        int w;
        bit c;
        w = int'($urandom_range(0, 1000)) - 500;
        c = 1'($urandom);
        @(negedge clk);
        en = 1; first = (j == 0); word_sel = DW'(w); cin = c;
        exp += longint'(w + int'(c)) <<< j;
      end
      @(negedge clk);
      en = ($urandom_range(0, 3) == 0);  // sometimes a new start right away
      first = 1; word_sel = '0; cin = 0; extra = '0;
      // result right after the last slice
      got = (longint'(acc) <<< (H - 1)) + longint'(low);
      checks++;
      if (got != exp) begin
        failures++;
        $display("FAIL got %0d exp %0d", got, exp);
      end
      if (!en) begin
        @(negedge clk);
        checks++;
        if ((longint'(acc) <<< (H - 1)) + longint'(low) != exp) begin
          failures++;
          $display("FAIL value changed while en = 0");
        end
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
