// obc_sign_mux: sign selection of one DA lane's look-up table word.
//
// The ROM output goes straight to multiplexer input 0 and through a bitwise
// inverter to input 1. The select is x0n XOR nsign, where nsign is the lane's
// sign-slice switch (S1 or S2: 0 on the slice of the sign bits, 1 otherwise).
// Inverting gives the one's complement; to make it an exact two's-complement
// negation the block also raises `cin`, a carry of one that the following
// accumulator adder adds in the same clock. So word_sel + cin equals +word or
// -word. The inverter/multiplexer arrangement follows the architecture; the
// carry-in that completes the negation is this design's choice.
//
// Purely combinational.
module obc_sign_mux #(
  parameter int unsigned DW = 11  // word width (W+3 for W-bit coefficients)
) (
  input  logic signed [DW-1:0] word,      // ROM output
  input  logic                 x0,        // bit of the newest sample in this slice
  input  logic                 nsign,     // S1/S2 switch: 0 on the sign slice
  output logic signed [DW-1:0] word_sel,  // word, or its bitwise inverse
  output logic                 cin        // 1 when inverted: completes the negation
);

  logic sel;

  always_comb begin
    sel      = x0 ^ nsign;
    word_sel = sel ? ~word : word;
    cin      = sel;
  end

endmodule
