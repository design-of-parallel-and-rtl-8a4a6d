// da_obc_lane: one bit-serial distributed-arithmetic lane with offset binary
// coding.
//
// Each clock the lane gets one bit of each of the four tap samples (x0n is the
// newest sample, x3n the oldest). The bits of taps 1..3 are folded with x0n
// (a_k = x_kn XOR x0n) to address the 8-word ROM; the ROM word is passed or
// negated by the sign multiplexer (select x0n XOR nsign); the result is added
// into the shift-accumulator, which starts from `extra` on the first slice.
// After H slices, {acc, low} holds
//
//     extra + sum_{j=0..H-1} s_j * D_j * 2^j,   D_j = sum_k (2*x_k[j] - 1) * A_k
//
// where s_j = -1 on the sign slice (nsign = 0) and +1 otherwise, i.e. twice the
// OBC partial result of the lane's H bits. The filter uses two of these lanes
// side by side: one for the least significant half of the sample bits (started
// from the OBC Extra term), one for the most significant half (started from 0).
//
// Timing: ROM and multiplexer are combinational; the result registers update on
// the rising edge while en = 1. The lane result is valid in the clock after its
// last slice.
module da_obc_lane
  import da_obc_pkg::*;
#(
  parameter int unsigned W  = 8,
  parameter logic [TAPS*W-1:0] COEFFS = {8'sd7, -8'sd61, 8'sd94, 8'sd23}, // {A3,A2,A1,A0}
  parameter int unsigned H  = 8,      // slices (bits) per sample in this lane
  parameter int unsigned AW = W + 4   // accumulator width
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 en,
  input  logic [TAPS-1:0]      xbit,   // xbit[k] = bit of tap k in this slice
  input  lane_ctl_t            ctl,
  input  logic signed [AW-1:0] extra,
  output logic signed [AW-1:0] acc,
  output logic        [H-2:0]  low
);

  localparam int unsigned DW = W + 3;

  logic [ROM_AW-1:0]   addr;
  logic signed [DW-1:0] word, word_sel;
  logic                 cin;

  // Address folding: tap 1 drives address bit 2, tap 3 address bit 0.
  always_comb begin
    for (int unsigned k = 1; k < TAPS; k++)
      addr[TAPS-1-k] = xbit[k] ^ xbit[0];
  end

  obc_rom #(.W(W), .COEFFS(COEFFS)) u_rom (
    .addr (addr),
    .word (word)
  );

  obc_sign_mux #(.DW(DW)) u_mux (
    .word     (word),
    .x0       (xbit[0]),
    .nsign    (ctl.nsign),
    .word_sel (word_sel),
    .cin      (cin)
  );

  shift_accumulator #(.DW(DW), .AW(AW), .H(H)) u_acc (
    .clk      (clk),
    .rst_n    (rst_n),
    .en       (en),
    .first    (ctl.first),
    .word_sel (word_sel),
    .cin      (cin),
    .extra    (extra),
    .acc      (acc),
    .low      (low)
  );

endmodule
