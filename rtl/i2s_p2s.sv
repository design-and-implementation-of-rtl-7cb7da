// i2s_p2s: I2S parallel-to-serial output interface.
//
// Sends the 22-bit output samples of the filter to an audio analyser over
// I2S, using the same bit_clk/lr_clk as the receiver (6 sys_clk cycles per
// bit, 64 bits per lr_clk period, position given by count_3). Since the filter
// makes two output samples per lr_clk period, this design sends y(2n) in the
// left slot and y(2n+1) in the right slot of the following period, each MSB
// first starting one bit period after the lr_clk edge (standard I2S), the
// remaining 10 bits of each 32-bit slot zero.
// y_valid with y_odd = 0 loads the left holding register, with y_odd = 1 the
// right one; both are copied into the transmit registers at the start of a
// period (count_3 = 0). sdata is registered: it changes one sys_clk cycle
// after the falling bit_clk edge and is stable across the rising edge.
// Reset (rst, synchronous) clears all registers and holds sdata at 0.
module i2s_p2s
  import interp_pkg::*;
(
  input  logic       sys_clk,
  input  logic       rst,
  input  logic [8:0] count_3,
  input  out_t       y,
  input  logic       y_valid,
  input  logic       y_odd,
  output logic       sdata
);

  localparam int unsigned SLOT_BITS = 32;

  out_t hold_l, hold_r, tx_l, tx_r;
  logic [5:0] bit_idx;
  logic [5:0] slot_pos;   // bit period within the slot, 0..31
  logic       right;
  logic       bit_val;

  assign bit_idx  = 6'(count_3 / 9'(BIT_DIV));
  assign right    = bit_idx >= 6'(SLOT_BITS);
  assign slot_pos = right ? bit_idx - 6'(SLOT_BITS) : bit_idx;

  always_comb begin
    bit_val = 1'b0;
    if (slot_pos >= 6'd1 && slot_pos <= 6'(Y_W))
      bit_val = right ? tx_r[5'(Y_W) - 5'(slot_pos)] : tx_l[5'(Y_W) - 5'(slot_pos)];
  end

  always_ff @(posedge sys_clk) begin
    if (rst) begin
      hold_l <= '0;
      hold_r <= '0;
      tx_l   <= '0;
      tx_r   <= '0;
      sdata  <= 1'b0;
    end else begin
      if (y_valid && !y_odd) hold_l <= y;
      if (y_valid &&  y_odd) hold_r <= y;
      if (count_3 == 9'd0) begin
        tx_l <= hold_l;
        tx_r <= hold_r;
      end
      sdata <= bit_val;
    end
  end

endmodule
