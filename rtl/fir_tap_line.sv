// fir_tap_line: FIR delay line and bit selection for the two DA lanes.
//
// Holds the newest sample x(n) in tap 0 and the three previous samples in taps
// 1..3. On `take` the line shifts and x_in enters tap 0, so the filter computes
// y(n) = sum_k A_k * x(n-k). While a sample is processed the taps stay still and
// the slice index picks, from every tap, bit `slice` for the least significant
// lane and bit H+slice for the most significant lane. Splitting each N-bit word
// into these two halves is what lets the filter take two bits per clock.
//
// Timing: taps update on the rising edge with take = 1; the bit outputs are
// combinational from the taps and the slice index. Reset clears the taps, so
// the filter starts from an all-zero history.
module fir_tap_line
  import da_obc_pkg::*;
#(
  parameter int unsigned N = 16,  // sample width, even
  localparam int unsigned H = N / 2,
  localparam int unsigned CW = (H > 1) ? $clog2(H) : 1
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                take,
  input  logic [N-1:0]        x_in,
  input  logic [CW-1:0]       slice,
  output logic [TAPS-1:0]     bits_lo,   // bit `slice` of taps 0..3
  output logic [TAPS-1:0]     bits_hi    // bit H+slice of taps 0..3
);

  localparam int unsigned IW = $clog2(N);

  logic [N-1:0]  tap [TAPS];
  logic [IW-1:0] idx_lo, idx_hi;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < TAPS; k++) tap[k] <= '0;
    end else if (take) begin
      tap[0] <= x_in;
      for (int k = 1; k < TAPS; k++) tap[k] <= tap[k-1];
    end
  end

  always_comb begin
    idx_lo = IW'(slice);
    idx_hi = IW'(H) + IW'(slice);
    for (int k = 0; k < TAPS; k++) begin
      bits_lo[k] = tap[k][idx_lo];
      bits_hi[k] = tap[k][idx_hi];
    end
  end

endmodule
