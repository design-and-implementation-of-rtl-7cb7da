// tb_i2s_s2p: checks the I2S receiver.
//
// The testbench keeps the frame position (0..383, six cycles per bit) and
// acts as an I2S source: it changes sdata at each falling bit_clk edge
// (position a multiple of 6), MSB first one bit after each lr_clk edge, with
// a random 16-bit word in the left slot and another in the right slot, and
// random bits in the unused bit periods. Each period the receiver must
// deliver the left word exactly once, at position 100, and never the right.
module tb_i2s_s2p;
  import interp_pkg::*;
  logic sys_clk = 1'b0;
  logic rst;
  logic [8:0] count_3;
  logic sdata;
  sample_t sample;
  logic sample_valid;

  i2s_s2p dut (.*);
  always #5 sys_clk = ~sys_clk;

  int checks = 0, failures = 0;
  logic [15:0] left_w, right_w;
  int nvalid = 0;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  initial begin
    rst = 1; count_3 = 0; sdata = 0;
    @(posedge sys_clk); #1 rst = 0;
    for (int frame = 0; frame < 60; frame++) begin
      left_w = 16'($urandom); right_w = 16'($urandom);
      nvalid = 0;
      for (int c = 0; c < 384; c++) begin
        int b, p;
        b = c / 6;
        count_3 = 9'(c);
        if (c % 6 == 0) begin
          p = b % 32;
          if (p >= 1 && p <= 16) sdata = (b < 32) ? left_w[16 - p] : right_w[16 - p];
          else                   sdata = 1'($urandom);
        end
        @(posedge sys_clk); #1;
        if (sample_valid) begin
          nvalid++;
          chk(c == 99 && sample == sample_t'(left_w),
              $sformatf("frame %0d pos %0d: got %h exp %h", frame, c + 1, sample, left_w));
        end
      end
      chk(nvalid == 1, $sformatf("frame %0d: %0d samples", frame, nvalid));
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
