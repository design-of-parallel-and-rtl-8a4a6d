// tb_obc_sign_mux: checks that word_sel + cin is +word or -word as the
// select x0 XOR nsign asks, for extreme and random words.
module tb_obc_sign_mux;
  localparam int unsigned DW = 11;

  logic signed [DW-1:0] word, word_sel;
  logic x0, nsign, cin;
  int checks = 0, failures = 0;

  obc_sign_mux #(.DW(DW)) dut (.word, .x0, .nsign, .word_sel, .cin);

  task automatic check_one(input int w, input bit b0, input bit ns);
    int got, exp;
    word = DW'(w); x0 = b0; nsign = ns;
    #1;
    got = int'(word_sel) + int'(cin);
    exp = (b0 != ns) ? -w : w;
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL word=%0d x0=%0b nsign=%0b got %0d exp %0d", w, b0, ns, got, exp);
    end
  endtask

  initial begin
    int vals[5] = '{0, 1, -1, 1023, -1023};
    foreach (vals[i])
      for (int c = 0; c < 4; c++) check_one(vals[i], c[0], c[1]);
    repeat (200) begin
      int w;
      w = int'($urandom_range(0, 2046)) - 1023;
      check_one(w, 1'($urandom), 1'($urandom));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
