// tb_i2s_p2s: checks the I2S transmitter.
//
// Per period the testbench presents two random 22-bit words as the filter
// does (y_odd = 0 at position 48, y_odd = 1 at position 215) and, in the
// next period, samples sdata at every rising bit_clk edge (position 6b+3):
// the left slot must carry the first word MSB first from bit 1, the right
// slot the second word, and every other bit period must be 0.
module tb_i2s_p2s;
  import interp_pkg::*;
  logic sys_clk = 1'b0;
  logic rst;
  logic [8:0] count_3;
  out_t y;
  logic y_valid, y_odd;
  logic sdata;

  i2s_p2s dut (.*);
  always #5 sys_clk = ~sys_clk;

  int checks = 0, failures = 0;
  logic [21:0] w0 [64], w1 [64];

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  initial begin
    rst = 1; count_3 = 0; y = 0; y_valid = 0; y_odd = 0;
    @(posedge sys_clk); #1 rst = 0;
    for (int frame = 0; frame < 60; frame++) begin
      w0[frame] = 22'($urandom); w1[frame] = 22'($urandom);
      for (int c = 0; c < 384; c++) begin
        int b, p;
        logic e;
        b = c / 6;
        p = b % 32;
        count_3 = 9'(c);
        y_valid = (c == 48 || c == 215);
        y_odd = (c == 215);
        y = out_t'((c == 215) ? w1[frame] : w0[frame]);
        if (c % 6 == 3 && frame > 0) begin
          e = 1'b0;
          if (p >= 1 && p <= 22) e = (b < 32) ? w0[frame-1][22 - p] : w1[frame-1][22 - p];
          chk(sdata == e, $sformatf("frame %0d bit period %0d", frame, b));
        end
        @(posedge sys_clk); #1;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (61 * 384) @(posedge sys_clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
