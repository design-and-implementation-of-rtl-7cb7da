// hb_interp_fir: first stage of the hearing-aid interpolation filter.
//
// Doubles the sample rate of a 16-bit (Q1.15) audio stream with a 38-tap
// polyphase halfband FIR of order 74, producing 22-bit (Q2.20) samples. Of
// the 76 polyphase coefficients, the odd phase is all zero except the centre
// tap, which the normalisation makes exactly 1, and the even phase is
// symmetric. So each input x(n) yields
//   y(2n)   = sum_{a=0..37} h(min(a, 37-a)) * x(n-a)   (one multiplier, 38 cycles)
//   y(2n+1) = x(n-18)                                  (centre tap, no multiply)
// with only the 19 distinct h(a) stored.
//
// Structure: fir_timing (counters and ticks), fir_fsm (controller),
// rom_coefficients (19 x 18 bits), ram_mem (38 x 16-bit circular delay line)
// and fir_mac (multiplier and accumulator), as in the document's block diagram.
//
// Timing, in sys_clk cycles within the 384-cycle input period (lr_clk period):
//   cycle 1     din is written into the delay line (din must be stable then)
//   cycle 48    y(2n) appears on dout with dout_valid = 1, dout_odd = 0
//   cycle 215   y(2n+1) appears on dout with dout_valid = 1, dout_odd = 1
// lr_clk, bit_clk and count_3 are brought out for the serial interfaces.
// count_1, count_2, count_4, the controller state and the RAM pointer are
// named here but not used inside this module (lint reports them unused); they
// are kept as nets so that a testbench or a debugger can observe them.
// Reset (rst, synchronous, active high) clears the delay line and all state;
// the filter starts at the first input period after reset.
module hb_interp_fir
  import interp_pkg::*;
(
  input  logic       sys_clk,
  input  logic       rst,
  input  sample_t    din,
  output out_t       dout,
  output logic       dout_valid,
  output logic       dout_odd,
  output logic       lr_clk,
  output logic       bit_clk,
  output logic [8:0] count_3
);

  logic [7:0] count_1, count_2;
  logic [8:0] count_4;
  logic tick_0, tick_39, rom_tick_inc, rom_tick_dec, sum_ready_tick, lr_tick_m;

  fir_state_t state;
  logic       ram_en, ram_we, rom_en, mac_rst, reg_rst;
  logic [5:0] ram_addr, ram_pr;
  logic [4:0] rom_addr;
  sample_t    ram_do;
  coef_t      rom_do;

  fir_timing u_timing (
    .sys_clk        (sys_clk),
    .rst            (rst),
    .count_1        (count_1),
    .count_2        (count_2),
    .count_3        (count_3),
    .count_4        (count_4),
    .bit_clk        (bit_clk),
    .lr_clk         (lr_clk),
    .tick_0         (tick_0),
    .tick_39        (tick_39),
    .rom_tick_inc   (rom_tick_inc),
    .rom_tick_dec   (rom_tick_dec),
    .sum_ready_tick (sum_ready_tick),
    .lr_tick_m      (lr_tick_m)
  );

  fir_fsm u_fsm (
    .sys_clk      (sys_clk),
    .rst          (rst),
    .lr_clk       (lr_clk),
    .tick_0       (tick_0),
    .tick_39      (tick_39),
    .rom_tick_inc (rom_tick_inc),
    .rom_tick_dec (rom_tick_dec),
    .state        (state),
    .ram_en       (ram_en),
    .ram_we       (ram_we),
    .ram_addr     (ram_addr),
    .ram_pr       (ram_pr),
    .rom_en       (rom_en),
    .rom_addr     (rom_addr),
    .mac_rst      (mac_rst),
    .reg_rst      (reg_rst)
  );

  rom_coefficients u_rom (
    .clk  (sys_clk),
    .en   (rom_en),
    .addr (rom_addr),
    .do_a (rom_do)
  );

  ram_mem u_ram (
    .clk    (sys_clk),
    .rst    (rst),
    .we     (ram_we),
    .en     (ram_en),
    .addr_a (ram_addr),
    .di     (din),
    .do_a   (ram_do)
  );

  fir_mac u_mac (
    .sys_clk        (sys_clk),
    .rst            (rst),
    .mac_tick_rst   (mac_rst),
    .reg_tick_rst   (reg_rst),
    .lr_switch      (lr_clk),
    .sum_ready_tick (sum_ready_tick),
    .lr_tick_m      (lr_tick_m),
    .data_in_1_a    (ram_do),
    .data_in_2_a    (rom_do),
    .sum            (dout),
    .sum_valid      (dout_valid),
    .sum_odd        (dout_odd)
  );

endmodule
