// obc_rom: the 8-word offset-binary-coding look-up table of one DA lane.
//
// For K = 4 taps with coefficients A0..A3, OBC replaces each data bit b by
// c = 2b - 1 (+1 or -1), and the table has to give, for one bit slice,
// D = sum_k c_k * A_k. Because D flips sign when all bits are complemented,
// only half of the 16 combinations are stored. This ROM holds the half for
// x0n = 1, addressed by the complemented bits of taps 1..3: the surrounding
// lane feeds it a_k = x_kn XOR x0n (see da_obc_lane), and
//
//     word[a] = A0 + sum_{k=1..3} (a_k ? -A_k : +A_k)
//
// with address bit 2 = tap 1, bit 1 = tap 2, bit 0 = tap 3, the row order of
// the 16-row OBC table. The words are twice the table's 1/2-scaled values, so
// that they stay integers; da_pipe_add divides the final sum by two.
// Word 0 is A0+A1+A2+A3, whose negation is the Extra term.
//
// The contents are fixed at elaboration from the COEFFS parameter (the filter
// has fixed coefficients). The read is combinational: `word` follows `addr`
// in the same clock. Output width is W+3 bits signed, enough for the sum of
// four W-bit coefficients and for its negation.
module obc_rom
  import da_obc_pkg::*;
#(
  parameter int unsigned W = 8,                      // coefficient width
  parameter logic [TAPS*W-1:0] COEFFS = {8'sd7, -8'sd61, 8'sd94, 8'sd23} // {A3,A2,A1,A0}
) (
  input  logic [ROM_AW-1:0]   addr,
  output logic signed [W+2:0] word
);

  localparam int unsigned DW = W + 3;

  typedef logic signed [DW-1:0] word_t;

  function automatic word_t coeff(input int unsigned k);
    logic signed [W-1:0] a;
    a = COEFFS[k*W +: W];
    return word_t'(a);
  endfunction

  function automatic word_t rom_word(input int unsigned a);
    word_t sum;
    sum = coeff(0);
    for (int unsigned k = 1; k < TAPS; k++) begin
      // tap k sits at address bit TAPS-1-k
      if (((a >> (TAPS - 1 - k)) & 1) != 0) sum = sum - coeff(k);
      else                                  sum = sum + coeff(k);
    end
    return sum;
  endfunction

  word_t rom [ROM_WORDS];

  always_comb begin
    for (int unsigned a = 0; a < ROM_WORDS; a++) rom[a] = rom_word(a);
  end

  assign word = rom[addr];

endmodule
