// da_obc_fir: 4-tap FIR filter by distributed arithmetic with offset binary
// coding, two bits at a time (2-BAAT), in two parallel pipelined lanes.
//
// y(n) = A0*x(n) + A1*x(n-1) + A2*x(n-2) + A3*x(n-3), with fixed coefficients
// A0..A3 (COEFFS, W bits each, signed) and N-bit two's-complement samples. No
// multiplier is used: every N-bit sample is split into its low and high N/2
// bits. Two identical lanes, each with its own 8-word OBC ROM, sign multiplexer
// and shift-accumulator, process one bit of each half per clock, least
// significant bit first. The low lane starts from the OBC Extra term
// -(A0+A1+A2+A3), the high lane from zero and negates its last (sign) slice.
// Pipeline registers take both lane results; an adder joins them, weighting the
// high lane by 2^(N/2), and the output register holds y. The output is the exact
// (N+W+2)-bit integer sum of products; read it as a fraction by scaling with
// 2^-(N-1) for the samples and whatever scale the coefficients have.
//
// Interface: a sample is accepted when in_valid && in_ready; y_valid pulses for
// one clock with the matching y. Timing: accept in clock t, y_valid in clock
// t+N/2+3; a new sample can be accepted every N/2 clocks (twice the rate of a
// one-bit-at-a-time DA filter). Asynchronous active-low reset clears the delay
// line, so the first outputs see zero history.
//
// The lane split, the ROM folding, the switches S1..S4 and the pipeline follow
// the architecture; the handshake, the reset, the widths, the exact low-bit
// handling and the default coefficients are this design's choices.
module da_obc_fir
  import da_obc_pkg::*;
#(
  parameter int unsigned N = 16, // sample width, even, >= 4
  parameter int unsigned W = 8,  // coefficient width
  parameter logic [TAPS*W-1:0] COEFFS = {8'sd7, -8'sd61, 8'sd94, 8'sd23}, // {A3,A2,A1,A0}
  localparam int unsigned YW = N + W + 2
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  output logic                 in_ready,
  input  logic signed [N-1:0]  x_in,
  output logic                 y_valid,
  output logic signed [YW-1:0] y
);

  localparam int unsigned H  = N / 2;
  localparam int unsigned AW = W + 4;
  localparam int unsigned CW = (H > 1) ? $clog2(H) : 1;

  // OBC Extra term, at the doubled scale of the ROM words: -(A0+A1+A2+A3).
  function automatic logic signed [AW-1:0] extra_term();
    logic signed [AW-1:0] s;
    s = '0;
    for (int unsigned k = 0; k < TAPS; k++)
      s = s - AW'($signed(COEFFS[k*W +: W]));
    return s;
  endfunction

  localparam logic signed [AW-1:0] EXTRA = extra_term();

  logic            take, en, pipe_load;
  logic [CW-1:0]   slice;
  lane_ctl_t       ctl_lo, ctl_hi;
  logic [TAPS-1:0] bits_lo, bits_hi;

  logic signed [AW-1:0] acc_lo, acc_hi;
  logic        [H-2:0]  low_lo, low_hi;

  da_ctrl #(.H(H)) u_ctrl (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (in_valid),
    .in_ready  (in_ready),
    .take      (take),
    .en        (en),
    .slice     (slice),
    .ctl_lo    (ctl_lo),
    .ctl_hi    (ctl_hi),
    .pipe_load (pipe_load)
  );

  fir_tap_line #(.N(N)) u_taps (
    .clk     (clk),
    .rst_n   (rst_n),
    .take    (take),
    .x_in    (x_in),
    .slice   (slice),
    .bits_lo (bits_lo),
    .bits_hi (bits_hi)
  );

  // Least significant bits of every sample, started from the Extra term.
  da_obc_lane #(.W(W), .COEFFS(COEFFS), .H(H), .AW(AW)) u_lane_lo (
    .clk   (clk),
    .rst_n (rst_n),
    .en    (en),
    .xbit  (bits_lo),
    .ctl   (ctl_lo),
    .extra (EXTRA),
    .acc   (acc_lo),
    .low   (low_lo)
  );

  // Most significant bits of every sample, including the sign bit.
  da_obc_lane #(.W(W), .COEFFS(COEFFS), .H(H), .AW(AW)) u_lane_hi (
    .clk   (clk),
    .rst_n (rst_n),
    .en    (en),
    .xbit  (bits_hi),
    .ctl   (ctl_hi),
    .extra ('0),
    .acc   (acc_hi),
    .low   (low_hi)
  );

  da_pipe_add #(.AW(AW), .H(H), .YW(YW)) u_add (
    .clk     (clk),
    .rst_n   (rst_n),
    .load    (pipe_load),
    .acc_lo  (acc_lo),
    .low_lo  (low_lo),
    .acc_hi  (acc_hi),
    .low_hi  (low_hi),
    .y       (y),
    .y_valid (y_valid)
  );

endmodule
