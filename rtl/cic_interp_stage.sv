// cic_interp_stage: one factor-of-two section of a non-recursive CIC interpolator.
//
// Raises the sample rate by 2 and filters with (1 + z^-1)^M at the new rate,
// the building block of the factorised CIC structure (a CIC of order M and
// rate change 2^K is K such sections in cascade). The section is computed in
// polyphase form at the input rate, with no zero samples and no feedback:
//   y(2n + p) = sum over k = p, p+2, ... <= M of C(M,k) * x(n - (k - p)/2)
// where C(M,k) are binomial coefficients (constant multiplications, i.e.
// shifts and adds). Each phase has a DC gain of 2^(M-1), so the output is
// M-1 bits wider than the input; no rounding, full precision.
//
// Timing: an input sample is taken when in_valid is 1 (one sample every
// 2 * HALF_PERIOD cycles). y(2n) appears two cycles later with dout_valid = 1,
// y(2n+1) HALF_PERIOD cycles after that, so outputs are evenly spaced.
// Reset (rst, synchronous, active high) clears the sample history.
module cic_interp_stage #(
  parameter int unsigned M           = 3,
  parameter int unsigned W_IN        = 22,
  parameter int unsigned HALF_PERIOD = 48,
  localparam int unsigned W_OUT      = W_IN + M - 1,
  localparam int unsigned L          = M / 2 + 1     // input samples needed
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic                    in_valid,
  input  logic signed [W_IN-1:0]  din,
  output logic signed [W_OUT-1:0] dout,
  output logic                    dout_valid
);

  logic signed [W_IN-1:0]  hist [L];   // hist[j] = x(n - j)
  logic signed [W_OUT-1:0] y0, y1;
  logic                    pend0, pend1;
  logic [$clog2(HALF_PERIOD+1)-1:0] cnt;

  function automatic int binom(input int n, input int k);
    int r = 1;
    for (int i = 0; i < k; i++) r = r * (n - i) / (i + 1);
    return r;
  endfunction

  always_comb begin
    y0 = '0;
    y1 = '0;
    for (int k = 0; k <= int'(M); k++) begin
      if (k % 2 == 0) y0 += W_OUT'(binom(M, k)) * W_OUT'(hist[k / 2]);
      else            y1 += W_OUT'(binom(M, k)) * W_OUT'(hist[(k - 1) / 2]);
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int j = 0; j < int'(L); j++) hist[j] <= '0;
      dout       <= '0;
      dout_valid <= 1'b0;
      pend0      <= 1'b0;
      pend1      <= 1'b0;
      cnt        <= '0;
    end else begin
      dout_valid <= 1'b0;
      if (in_valid) begin
        hist[0] <= din;
        for (int j = 1; j < int'(L); j++) hist[j] <= hist[j-1];
        pend0 <= 1'b1;
      end
      if (pend0) begin
        dout       <= y0;
        dout_valid <= 1'b1;
        pend0      <= 1'b0;
        pend1      <= 1'b1;
        cnt        <= $bits(cnt)'(HALF_PERIOD - 1);
      end else if (pend1) begin
        if (cnt == '0) begin
          dout       <= y1;
          dout_valid <= 1'b1;
          pend1      <= 1'b0;
        end else begin
          cnt <= cnt - 1'b1;
        end
      end
    end
  end

endmodule
