// da_pipe_add: pipeline registers, final adder and output register.
//
// When `load` is high the two lane results (accumulator plus collected low
// bits) are captured in the pipeline registers. In the next clock the adder
// joins them: the most significant lane's value is weighted by 2^H, the number
// of bits the least significant lane covers, so
//
//     2*y = {accM,lowM} * 2^H + {accL,lowL}
//
// and the output register D takes y = (2*y) / 2 (the look-up words are stored
// at twice their OBC value, so the sum is always even and the halving is
// exact). y_valid marks the clock in which y holds a new output.
//
// Timing: load in clock t -> pipeline registers at the end of t -> y and
// y_valid at the end of t+1. Asynchronous active-low reset clears everything.
module da_pipe_add #(
  parameter int unsigned AW = 12,  // lane accumulator width
  parameter int unsigned H  = 8,   // bits per lane
  parameter int unsigned YW = 26   // output width
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 load,
  input  logic signed [AW-1:0] acc_lo,
  input  logic        [H-2:0]  low_lo,
  input  logic signed [AW-1:0] acc_hi,
  input  logic        [H-2:0]  low_hi,
  output logic signed [YW-1:0] y,
  output logic                 y_valid
);

  localparam int unsigned VW = AW + H - 1;  // full-precision lane value
  localparam int unsigned SW = VW + H + 1;  // width of the joined sum

  logic signed [VW-1:0] pipe_lo, pipe_hi;
  logic                 pipe_valid;
  logic signed [SW-1:0] sum2;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pipe_lo    <= '0;
      pipe_hi    <= '0;
      pipe_valid <= 1'b0;
    end else begin
      pipe_valid <= load;
      if (load) begin
        pipe_lo <= {acc_lo, low_lo};
        pipe_hi <= {acc_hi, low_hi};
      end
    end
  end

  always_comb begin
    sum2 = (SW'(pipe_hi) <<< H) + SW'(pipe_lo);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      y       <= '0;
      y_valid <= 1'b0;
    end else begin
      y_valid <= pipe_valid;
      if (pipe_valid) y <= YW'(sum2 >>> 1);
    end
  end

endmodule
