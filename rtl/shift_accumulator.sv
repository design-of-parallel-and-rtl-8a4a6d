// shift_accumulator: the shift-and-add loop of one bit-serial DA lane.
//
// Every enabled clock the lane adds one signed bit-slice word (word_sel plus
// the carry cin) to either the Extra term or the accumulator shifted right by
// one bit. The Extra multiplexer is switched by `first` (S3/S4): 1 on the first
// slice of a sample, which starts a new sum, 0 on the following slices. The
// slices arrive least significant first, so after H slices
//
//     acc * 2^(H-1) + low = extra + sum_{j=0..H-1} slice_j * 2^j
//
// exactly. The bits shifted out of the accumulator are not dropped: they are
// collected in `low` (H-1 bits, most recent shifted bit on top), so the lane
// result carries the full precision. Keeping these bits is this design's
// choice; the architecture draws only the right shift.
//
// Timing: registered; acc/low change on the rising clock edge when en = 1.
// Reset (rst_n low, asynchronous) clears both registers.
module shift_accumulator #(
  parameter int unsigned DW = 11,  // slice word width
  parameter int unsigned AW = 12,  // accumulator width (> DW)
  parameter int unsigned H  = 8    // slices per sample (bits per lane), >= 2
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 en,
  input  logic                 first,     // S3/S4: take Extra instead of the shifted sum
  input  logic signed [DW-1:0] word_sel,
  input  logic                 cin,
  input  logic signed [AW-1:0] extra,
  output logic signed [AW-1:0] acc,
  output logic        [H-2:0]  low
);

  logic signed [AW-1:0] feedback;
  logic signed [AW-1:0] sum;

  always_comb begin
    feedback = first ? extra : (acc >>> 1);
    sum      = feedback + AW'(word_sel) + AW'({1'b0, cin});
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc <= '0;
      low <= '0;
    end else if (en) begin
      acc <= sum;
      if (first) low <= '0;
      else       low <= (low >> 1) | ((H-1)'(acc[0]) << (H - 2));
    end
  end

endmodule
