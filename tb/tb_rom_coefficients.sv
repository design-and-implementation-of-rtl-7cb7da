// tb_rom_coefficients: checks the coefficient ROM.
//
// Reads every address and checks: one cycle of read latency; do_a holds while
// en = 0; addresses above 18 read 0; and the stored half of the halfband
// impulse response has the properties the filter needs, worked out from the
// filter itself rather than from the table: signs alternate with h(18) > 0,
// magnitudes grow toward the centre, the symmetric even phase sums to a DC
// gain of 1 (2 * sum h(a) = 2^17 within 0.5 %), and the outermost and
// innermost taps match the design values 163 and 83307.
module tb_rom_coefficients;
  import interp_pkg::*;
  logic clk = 1'b0;
  logic en;
  logic [4:0] addr;
  coef_t do_a;

  rom_coefficients dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint h [32];

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    longint s = 0;
    en = 1'b1; addr = '0;
    for (int a = 0; a < 32; a++) begin
      @(negedge clk); addr = 5'(a); en = 1'b1;
      @(posedge clk); #1;
      h[a] = longint'(do_a);
      // with en low the output holds even though addr changes
      @(negedge clk); en = 1'b0; addr = 5'(a + 7);
      @(posedge clk); #1;
      chk(longint'(do_a) == h[a], $sformatf("hold at address %0d", a));
    end
    for (int a = 19; a < 32; a++) chk(h[a] == 0, $sformatf("address %0d reads 0", a));
    for (int a = 0; a < 19; a++) begin
      chk((h[a] > 0) == ((18 - a) % 2 == 0) && h[a] != 0, $sformatf("sign of h(%0d)", a));
      if (a > 0) chk((h[a] < 0 ? -h[a] : h[a]) > (h[a-1] < 0 ? -h[a-1] : h[a-1]),
                     $sformatf("magnitude grows at h(%0d)", a));
      s += h[a];
    end
    chk(2 * s > 131072 - 655 && 2 * s < 131072 + 655, $sformatf("DC gain, 2*sum = %0d", 2 * s));
    chk(h[0] == 163 && h[18] == 83307, "end taps");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
