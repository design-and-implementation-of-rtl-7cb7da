// fir_timing: clocks, counters and control ticks of the first interpolation stage.
//
// Everything runs from one system clock, sys_clk (8.9 MHz in the intended
// system, the DPWM rate). One input-sample period (one lr_clk period) is
// FRAME = 384 sys_clk cycles, split into two halves of HALF = 192 cycles: the
// first half (lr_clk = 0) computes the convolution output, the second half
// (lr_clk = 1) the centre-tap output. bit_clk has a period of BIT_DIV = 6
// sys_clk cycles, so one lr_clk period holds 64 bit_clk periods (two 32-bit
// I2S slots).
//
// Four counters are kept, as in the design description:
//   count_1  0..191  updated on the rising edge of sys_clk
//   count_2  0..191  updated on the falling edge (a half-cycle-late copy)
//   count_3  0..383  updated on the rising edge
//   count_4  0..383  updated on the falling edge
// The control ticks are decoded from the falling-edge counters, so they change
// half a cycle away from the rising edge on which the controller samples them.
// A tick decoded from count_2 == K is seen by the controller at the rising edge
// that starts cycle K+1 of the half period.
//
//   tick_0          count_2 == 0    leave idle/ready for the writing state
//   tick_39         count_2 == 39   end of the 38 operating cycles
//   rom_tick_inc    count_2 in 3..20, rom_tick_dec in 22..39: coefficient
//                   address walk 0,0,1..18,18,17..1 during the convolution
//   sum_ready_tick  first half, count_2 == 41 + MULT_LATENCY: the accumulator
//                   holds the finished convolution (this design's timing)
//   lr_tick_m       second half, count_2 == 22: the RAM output holds the
//                   centre-tap sample (this design's timing)
// The counter ranges, the edge assignment, tick_0/tick_39 and the 6:64 clock
// ratios follow the document; the exact positions of the other ticks follow
// from this design's memory and multiplier latencies.
// Reset (rst, synchronous, active high) clears all counters.
module fir_timing
  import interp_pkg::*;
#(
  parameter int unsigned MULT_LAT = MULT_LATENCY
) (
  input  logic       sys_clk,
  input  logic       rst,
  output logic [7:0] count_1,
  output logic [7:0] count_2,
  output logic [8:0] count_3,
  output logic [8:0] count_4,
  output logic       bit_clk,
  output logic       lr_clk,
  output logic       tick_0,
  output logic       tick_39,
  output logic       rom_tick_inc,
  output logic       rom_tick_dec,
  output logic       sum_ready_tick,
  output logic       lr_tick_m
);

  localparam int unsigned SUM_READY_AT = 41 + MULT_LAT;
  localparam int unsigned MID_AT       = 22;

  logic [7:0] count_1_next;
  logic [8:0] count_3_next;

  always_comb begin
    count_1_next = (count_1 == 8'(HALF - 1))  ? 8'd0 : count_1 + 8'd1;
    count_3_next = (count_3 == 9'(FRAME - 1)) ? 9'd0 : count_3 + 9'd1;
  end

  always_ff @(posedge sys_clk) begin
    if (rst) begin
      count_1 <= '0;
      count_3 <= '0;
      bit_clk <= 1'b0;
      lr_clk  <= 1'b0;
    end else begin
      count_1 <= count_1_next;
      count_3 <= count_3_next;
      // Registered so that the clock outputs are glitch free; they equal the
      // decoded value of count_3 at all times.
      bit_clk <= (count_3_next % 9'(BIT_DIV)) >= 9'(BIT_DIV / 2);
      lr_clk  <= count_3_next >= 9'(HALF);
    end
  end

  always_ff @(negedge sys_clk) begin
    if (rst) begin
      count_2 <= '0;
      count_4 <= '0;
    end else begin
      count_2 <= count_1;
      count_4 <= count_3;
    end
  end

  logic second_half;
  assign second_half = count_4 >= 9'(HALF);

  always_comb begin
    tick_0         = count_2 == 8'd0;
    tick_39        = count_2 == 8'd39;
    rom_tick_inc   = count_2 >= 8'd3  && count_2 <= 8'd20;
    rom_tick_dec   = count_2 >= 8'd22 && count_2 <= 8'd39;
    sum_ready_tick = !second_half && count_2 == 8'(SUM_READY_AT);
    lr_tick_m      = second_half && count_2 == 8'(MID_AT);
  end

endmodule
