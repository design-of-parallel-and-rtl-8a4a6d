// tb_obc_rom: checks every word of the 8-word OBC ROM.
//
// Two ROMs are instantiated, one with the default coefficients and one with
// 10-bit coefficients. For each address the expected word is worked out from
// the OBC definition: with x0 = 1 and x_k = NOT a_k, D = sum_k (2*x_k - 1)*A_k.
module tb_obc_rom;
  import da_obc_pkg::*;

  localparam int unsigned W2 = 10;
  localparam logic [4*W2-1:0] C2 = {-10'sd512, 10'sd300, -10'sd77, 10'sd511};

  logic [2:0]          addr;
  logic signed [10:0]  word1;
  logic signed [12:0]  word2;
  int checks = 0, failures = 0;

  obc_rom u_rom1 (.addr(addr), .word(word1));
  obc_rom #(.W(W2), .COEFFS(C2)) u_rom2 (.addr(addr), .word(word2));

  function automatic int expect_word(input int a, input int c0, c1, c2, c3);
    int cf[4];
    int bits[4];
    int d;
    cf = '{c0, c1, c2, c3};
    bits[0] = 1;
    bits[1] = ((a >> 2) & 1) ^ 1;
    bits[2] = ((a >> 1) & 1) ^ 1;
    bits[3] = (a & 1) ^ 1;
    d = 0;
    for (int k = 0; k < 4; k++) d += (2 * bits[k] - 1) * cf[k];
    return d;
  endfunction

  initial begin
    for (int a = 0; a < 8; a++) begin
      addr = 3'(a);
      #1;
      checks += 2;
      if (int'(word1) != expect_word(a, 23, 94, -61, 7)) begin
        failures++;
        $display("FAIL rom1 addr %0d: got %0d exp %0d", a, word1, expect_word(a, 23, 94, -61, 7));
      end
      if (int'(word2) != expect_word(a, 511, -77, 300, -512)) begin
        failures++;
        $display("FAIL rom2 addr %0d: got %0d exp %0d", a, word2, expect_word(a, 511, -77, 300, -512));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
