// da_ctrl: slice counter and switch control of the 2-BAAT DA filter.
//
// A sample is accepted when in_valid and in_ready are both high (`take`). The
// controller then runs H = N/2 slice clocks, counting `slice` from 0 to H-1.
// In slice j the least significant lane works on sample bit j and the most
// significant lane on bit H+j, so both halves of every word are processed at
// the same time, two bits per clock. The switches follow the bit index n of the
// architecture, where n = 0 is the sign bit and n = N-1 the least significant
// bit:
//   S3 (lane lo) and S4 (lane hi): 1 on the first slice (lane lo: n = N-1),
//                                  which starts the sum from the Extra input;
//   S1 (lane lo): 0 when n = 0, 1 otherwise; lane lo never sees n = 0, so S1
//                 stays 1;
//   S2 (lane hi): 0 on the last slice (n = 0, the sign bit), 1 otherwise.
// in_ready is high while idle and in the last slice, so a new sample can start
// in the clock right after the previous one ends: one output every H clocks.
// pipe_load is high in the clock after the last slice, when both lane
// accumulators hold their final values.
//
// Timing: take in clock t -> slices in clocks t+1 .. t+H -> pipe_load in
// clock t+H+1. Asynchronous active-low reset returns to idle.
module da_ctrl
  import da_obc_pkg::*;
#(
  parameter int unsigned H  = 8,                      // slices per sample (N/2)
  localparam int unsigned CW = (H > 1) ? $clog2(H) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  output logic          in_ready,
  output logic          take,       // sample accepted this clock
  output logic          en,         // lanes active (a slice is being processed)
  output logic [CW-1:0] slice,      // slice index j
  output lane_ctl_t     ctl_lo,     // {S3, S1}
  output lane_ctl_t     ctl_hi,     // {S4, S2}
  output logic          pipe_load
);

  logic busy;
  logic last;

  always_comb begin
    last     = busy && (slice == CW'(H - 1));
    in_ready = !busy || last;
    take     = in_valid && in_ready;
    en       = busy;
    ctl_lo.first = (slice == '0);
    ctl_lo.nsign = 1'b1;
    ctl_hi.first = (slice == '0);
    ctl_hi.nsign = (slice != CW'(H - 1));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy      <= 1'b0;
      slice     <= '0;
      pipe_load <= 1'b0;
    end else begin
      pipe_load <= last;
      if (take) begin
        busy  <= 1'b1;
        slice <= '0;
      end else if (last) begin
        busy  <= 1'b0;
        slice <= '0;
      end else if (busy) begin
        slice <= slice + 1'b1;
      end
    end
  end

endmodule
