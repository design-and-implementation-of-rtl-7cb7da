// fir_mac: multiply-accumulate block of the first interpolation stage.
//
// One multiplier serves all 38 taps. In the first half of an input period
// (lr_switch = 0) it multiplies, cycle by cycle, the delay-line sample on
// data_in_1_a (Q1.15, from the RAM) by the coefficient on data_in_2_a (Q1.17,
// from the ROM) and adds every product into an accumulator; on
// sum_ready_tick the accumulated convolution is rounded down to Q2.20,
// saturated, and placed on sum. In the second half (lr_switch = 1) the
// multiplier is idle: on lr_tick_m the centre-tap sample on data_in_1_a is
// passed to sum unchanged in value (the centre coefficient is exactly 1).
//
// The multiplier has MULT_LAT = 6 pipeline stages, as the document states for
// the FPGA multiplier; a product reaches the accumulator MULT_LAT cycles after
// its operands. mac_tick_rst clears the multiplier pipeline and the
// accumulator, reg_tick_rst only the accumulator (both synchronous); neither
// touches sum. The two resets arrive one cycle after the controller state
// that causes them, which lines them up with the one-cycle read latency of the
// memories. sum_valid pulses for one cycle when sum changes and sum_odd tells
// which of the two outputs it holds (0: convolution, 1: centre tap); these two
// outputs and the global reset rst are this design's additions, as are the
// accumulator width (Q8.32), round-down and saturation.
module fir_mac
  import interp_pkg::*;
#(
  parameter int unsigned MULT_LAT = MULT_LATENCY
) (
  input  logic    sys_clk,
  input  logic    rst,
  input  logic    mac_tick_rst,
  input  logic    reg_tick_rst,
  input  logic    lr_switch,
  input  logic    sum_ready_tick,
  input  logic    lr_tick_m,
  input  sample_t data_in_1_a,
  input  coef_t   data_in_2_a,
  output out_t    sum,
  output logic    sum_valid,
  output logic    sum_odd
);

  localparam int unsigned SHIFT = P_FRAC - Y_FRAC;  // 12 bits dropped
  localparam acc_t OUT_MAX = acc_t'((64'sd1 <<< (Y_W - 1)) - 1);
  localparam acc_t OUT_MIN = acc_t'(-(64'sd1 <<< (Y_W - 1)));

  prod_t pipe [MULT_LAT];
  acc_t  acc;
  acc_t  acc_scaled;
  out_t  acc_sat;
  out_t  mid_scaled;

  always_ff @(posedge sys_clk) begin
    if (rst || mac_tick_rst) begin
      for (int i = 0; i < int'(MULT_LAT); i++) pipe[i] <= '0;
    end else begin
      pipe[0] <= prod_t'(data_in_1_a) * prod_t'(data_in_2_a);
      for (int i = 1; i < int'(MULT_LAT); i++) pipe[i] <= pipe[i-1];
    end
  end

  always_ff @(posedge sys_clk) begin
    if (rst || mac_tick_rst || reg_tick_rst) acc <= '0;
    else                                      acc <= acc + acc_t'(pipe[MULT_LAT-1]);
  end

  always_comb begin
    acc_scaled = acc >>> SHIFT;
    if      (acc_scaled > OUT_MAX) acc_sat = out_t'(OUT_MAX);
    else if (acc_scaled < OUT_MIN) acc_sat = out_t'(OUT_MIN);
    else                           acc_sat = out_t'(acc_scaled);
    mid_scaled = out_t'(data_in_1_a) <<< (Y_FRAC - X_FRAC);
  end

  always_ff @(posedge sys_clk) begin
    if (rst) begin
      sum       <= '0;
      sum_valid <= 1'b0;
      sum_odd   <= 1'b0;
    end else begin
      sum_valid <= 1'b0;
      if (sum_ready_tick && !lr_switch) begin
        sum       <= acc_sat;
        sum_valid <= 1'b1;
        sum_odd   <= 1'b0;
      end else if (lr_tick_m && lr_switch) begin
        sum       <= mid_scaled;
        sum_valid <= 1'b1;
        sum_odd   <= 1'b1;
      end
    end
  end

endmodule
