// rom_coefficients: coefficient ROM of the first interpolation stage.
//
// Holds the 19 distinct non-zero, non-unity coefficients of the order-74
// halfband filter, h(0) at address 0 up to h(18) at address 18, as 18-bit
// Q1.17 words (contents in interp_pkg::COEF_ROM). The read is synchronous:
// on a rising edge of clk with en = 1, do_a takes the word at addr; with
// en = 0 do_a holds its value. One cycle of read latency.
// Ports, size, word width and enable behaviour follow the document; the
// coefficient values are this design's own halfband design (see interp_pkg).
module rom_coefficients
  import interp_pkg::*;
(
  input  logic        clk,
  input  logic        en,
  input  logic [4:0]  addr,
  output coef_t       do_a
);

  always_ff @(posedge clk) begin
    if (en) begin
      do_a <= (addr < 5'(N_COEF)) ? COEF_ROM[addr] : '0;
    end
  end

endmodule
