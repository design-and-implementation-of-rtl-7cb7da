// cic_interp: non-recursive CIC interpolation filter of order M, rate x 2^K.
//
// Implements H(z) = ((1 - z^-2^K) / (1 - z^-1))^M after zero-stuffing by 2^K
// through its factorised form (1 + z^-1)^M (1 + z^-2)^M ... (1 + z^-2^(K-1))^M:
// K identical cic_interp_stage sections in cascade, each doubling the rate,
// with no integrators and therefore no feedback or wrap-around arithmetic.
// In the hearing-aid interpolator the third stage is M = 3, K = 1 (4fs to
// 8fs) and the fourth stage M = 1, K = 3 (8fs to 64fs); the defaults are
// those of the third stage.
//
// Timing: one input every IN_PERIOD cycles on in_valid; outputs come evenly
// spaced every IN_PERIOD / 2^K cycles (IN_PERIOD must be divisible by 2^K),
// the first of them 2 cycles per section after the input. The output is
// K*(M-1) bits wider than the input (gain 2^(K*(M-1)) per output phase, full
// precision). Reset (rst, synchronous) clears every section.
module cic_interp #(
  parameter int unsigned M         = 3,
  parameter int unsigned K         = 1,
  parameter int unsigned W_IN      = 22,
  parameter int unsigned IN_PERIOD = 96,
  localparam int unsigned W_OUT    = W_IN + K * (M - 1)
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic                    in_valid,
  input  logic signed [W_IN-1:0]  din,
  output logic signed [W_OUT-1:0] dout,
  output logic                    dout_valid
);

  logic signed [W_OUT-1:0] data  [K+1];
  logic                    valid [K+1];

  assign data[0]  = W_OUT'(din);
  assign valid[0] = in_valid;

  for (genvar i = 0; i < int'(K); i++) begin : g_stage
    localparam int unsigned WI = W_IN + i * (M - 1);
    localparam int unsigned WO = WI + M - 1;
    logic signed [WO-1:0] so;

    cic_interp_stage #(
      .M           (M),
      .W_IN        (WI),
      .HALF_PERIOD (IN_PERIOD >> (i + 1))
    ) u_stage (
      .clk        (clk),
      .rst        (rst),
      .in_valid   (valid[i]),
      .din        (data[i][WI-1:0]),
      .dout       (so),
      .dout_valid (valid[i+1])
    );

    assign data[i+1] = W_OUT'(so);
  end

  assign dout       = data[K];
  assign dout_valid = valid[K];

  initial assert (IN_PERIOD % (1 << K) == 0 && (IN_PERIOD >> K) >= 2);

endmodule
