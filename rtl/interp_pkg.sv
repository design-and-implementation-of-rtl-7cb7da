// interp_pkg: types and constants shared by the first interpolation stage.
//
// The first stage of the hearing-aid interpolator is a 38-tap polyphase
// halfband FIR that doubles the sample rate (22.05 kHz in, 44.1 kHz out).
// Input samples are Q1.15 (16 bits), coefficients Q1.17 (18 bits, normalised
// to the halfband centre tap so that the centre tap is exactly 1) and output
// samples Q2.20 (22 bits); these formats follow the design specification.
//
// The 19 stored coefficients are this design's own equiripple halfband design
// of order 74 with passband edge 10 kHz at 44.1 kHz: a length-38 type-II
// filter g approximating 1 on [0, 20 kHz] (Parks-McClellan), interleaved with
// the centre tap as h = (z^-37 + g(z^2)) / 2, divided by the centre tap 0.5 and
// rounded to 17 fractional bits. Quantised, it reaches -62.9 dB from
// 12.05 kHz upward with a 0.012 dB passband ripple. Entry a multiplies the
// samples of age a and 37 - a in the delay line.
package interp_pkg;

  localparam int unsigned X_W     = 16;  // input sample width, Q1.15
  localparam int unsigned X_FRAC  = 15;
  localparam int unsigned H_W     = 18;  // coefficient width, Q1.17
  localparam int unsigned H_FRAC  = 17;
  localparam int unsigned Y_W     = 22;  // output sample width, Q2.20
  localparam int unsigned Y_FRAC  = 20;
  localparam int unsigned P_W     = X_W + H_W;   // product, Q2.32
  localparam int unsigned P_FRAC  = X_FRAC + H_FRAC;
  localparam int unsigned ACC_W   = P_W + 6;     // accumulator, Q8.32

  localparam int unsigned N_TAPS  = 38;  // delay-line length (taps)
  localparam int unsigned N_COEF  = 19;  // stored coefficients (symmetric half)

  localparam int unsigned FRAME   = 384; // sys_clk cycles per lr_clk period
  localparam int unsigned HALF    = 192; // sys_clk cycles per lr_clk half period
  localparam int unsigned BIT_DIV = 6;   // sys_clk cycles per bit_clk period

  localparam int unsigned MULT_LATENCY = 6; // pipeline stages of the multiplier

  typedef logic signed [X_W-1:0]   sample_t;
  typedef logic signed [H_W-1:0]   coef_t;
  typedef logic signed [Y_W-1:0]   out_t;
  typedef logic signed [P_W-1:0]   prod_t;
  typedef logic signed [ACC_W-1:0] acc_t;

  // Controller states (Section on the FSM: idle, writing, low/high operating, ready).
  typedef enum logic [2:0] {
    IDLE_ST    = 3'd0,
    WR_ST      = 3'd1,
    LOW_OP_ST  = 3'd2,
    HIGH_OP_ST = 3'd3,
    READY_ST   = 3'd4
  } fir_state_t;

  // Stored half of the normalised coefficients, h(0) (outermost) .. h(18)
  // (next to the centre tap), in units of 2^-17.
  localparam coef_t COEF_ROM [N_COEF] = '{
    18'sd163,   -18'sd184,   18'sd284,   -18'sd417,   18'sd588,
   -18'sd807,    18'sd1080, -18'sd1420,   18'sd1840, -18'sd2358,
    18'sd3000,  -18'sd3806,  18'sd4839,  -18'sd6205,  18'sd8111,
   -18'sd10998,  18'sd16019, -18'sd27408,  18'sd83307
  };

endpackage
