// i2s_s2p: I2S serial-to-parallel input interface.
//
// Receives the 16-bit input samples of the filter from an audio source over
// I2S, with this side as clock master: bit_clk and lr_clk are made by
// fir_timing from sys_clk (6 sys_clk cycles per bit, 64 bits per lr_clk
// period), so the receiver needs only the frame position count_3 (0..383).
// Format (standard I2S, this design's choice): lr_clk = 0 is the left slot,
// lr_clk = 1 the right slot; each slot is 32 bit periods, and the sample is
// sent MSB first starting one bit period after the lr_clk edge. The source
// changes sdata after the falling bit_clk edge; it is sampled in the cycle
// after the rising edge (count_3 mod 6 = 3).
// Only the left slot is used (the filter is mono). Its 16 bits are complete
// at bit period 16; sample then updates and sample_valid pulses for one cycle
// (cycle count_3 = 100). The filter picks sample up in cycle 1 of the next
// period, one input period of latency. Reset (rst, synchronous) clears both.
module i2s_s2p
  import interp_pkg::*;
(
  input  logic       sys_clk,
  input  logic       rst,
  input  logic [8:0] count_3,
  input  logic       sdata,
  output sample_t    sample,
  output logic       sample_valid
);

  localparam int unsigned SLOT_BITS = 32;

  logic [5:0] bit_idx;    // bit period within the lr_clk period, 0..63
  logic       sample_pt;  // cycle in which sdata is sampled
  logic [X_W-2:0] shreg;  // first 15 bits of the sample

  assign bit_idx   = 6'(count_3 / 9'(BIT_DIV));
  assign sample_pt = (count_3 % 9'(BIT_DIV)) == 9'(BIT_DIV / 2);

  always_ff @(posedge sys_clk) begin
    if (rst) begin
      shreg        <= '0;
      sample       <= '0;
      sample_valid <= 1'b0;
    end else begin
      sample_valid <= 1'b0;
      if (sample_pt && bit_idx >= 6'd1 && bit_idx <= 6'(X_W)) begin
        shreg <= {shreg[X_W-3:0], sdata};
        if (bit_idx == 6'(X_W)) begin
          sample       <= {shreg[X_W-2:0], sdata};
          sample_valid <= 1'b1;
        end
      end
    end
  end

  // The left slot must hold the whole sample.
  initial assert (X_W < SLOT_BITS);

endmodule
