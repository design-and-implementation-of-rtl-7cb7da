// ram_mem: delay-line RAM of the first interpolation stage.
//
// 38 words of 16 bits, one per tap, used as a circular buffer: each new input
// sample overwrites the oldest one, and a pointer kept by the controller marks
// where the newest sample is. Single port: on a rising edge of clk with
// en = 1, we = 1 writes di to addr_a, and we = 0 reads addr_a into do_a (one
// cycle of read latency). During a write, and while en = 0, do_a holds its
// value. The contents are cleared by rst (the document starts the delay line
// with all zeros); rst is an addition to the document's port list.
module ram_mem
  import interp_pkg::*;
#(
  parameter int unsigned DEPTH = N_TAPS,
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          we,
  input  logic          en,
  input  logic [AW-1:0] addr_a,
  input  sample_t       di,
  output sample_t       do_a
);

  sample_t mem [DEPTH];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < int'(DEPTH); i++) mem[i] <= '0;
      do_a <= '0;
    end else if (en) begin
      if (we) mem[addr_a] <= di;
      else    do_a        <= mem[addr_a];
    end
  end

endmodule
