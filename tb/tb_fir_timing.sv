// tb_fir_timing: checks the counters, clocks and ticks of fir_timing.
//
// A cycle counter kept by the testbench predicts count_1/count_3 after every
// rising edge and count_2/count_4 after every falling edge; bit_clk, lr_clk
// and all ticks are checked against their decoded values. The periods of
// bit_clk (6 cycles) and lr_clk (384 cycles) are measured from their edges.
module tb_fir_timing;
  logic sys_clk = 1'b0;
  logic rst;
  logic [7:0] count_1, count_2;
  logic [8:0] count_3, count_4;
  logic bit_clk, lr_clk, tick_0, tick_39, rom_tick_inc, rom_tick_dec, sum_ready_tick, lr_tick_m;

  fir_timing dut (.*);

  always #5 sys_clk = ~sys_clk;

  int checks = 0, failures = 0;
  int cyc = 0;           // rising edges since reset release
  int lr_rise_prev = -1, bit_rise_prev = -1;
  logic lr_d = 1'b0, bit_d = 1'b0;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 12) $display("FAIL cycle %0d: %s", cyc, what);
    end
  endtask

  initial begin
    int m3, m1, p3, p1;
    rst = 1'b1;
    repeat (3) @(posedge sys_clk);
    #1 rst = 1'b0;
    chk(count_1 == 0 && count_3 == 0 && !lr_clk && !bit_clk, "reset values");
    for (int i = 1; i <= 3 * 384 + 10; i++) begin
      @(posedge sys_clk); #1;
      cyc = i;
      m3 = i % 384; m1 = i % 192;
      p3 = (i - 1) % 384; p1 = (i - 1) % 192;
      chk(count_1 == 8'(m1) && count_3 == 9'(m3), "rising-edge counters");
      chk(count_2 == 8'(p1) && count_4 == 9'(p3), "falling-edge counters lag");
      chk(bit_clk == ((m3 % 6) >= 3), "bit_clk");
      chk(lr_clk == (m3 >= 192), "lr_clk");
      chk(tick_0 == (p1 == 0) && tick_39 == (p1 == 39), "tick_0/tick_39");
      chk(rom_tick_inc == (p1 >= 3 && p1 <= 20) && rom_tick_dec == (p1 >= 22 && p1 <= 39), "rom ticks");
      chk(sum_ready_tick == (p3 == 47), "sum_ready_tick");
      chk(lr_tick_m == (p3 == 192 + 22), "lr_tick_m");
      if (lr_clk && !lr_d) begin
        if (lr_rise_prev >= 0) chk(i - lr_rise_prev == 384, "lr_clk period");
        lr_rise_prev = i;
      end
      if (bit_clk && !bit_d) begin
        if (bit_rise_prev >= 0) chk(i - bit_rise_prev == 6, "bit_clk period");
        bit_rise_prev = i;
      end
      lr_d = lr_clk; bit_d = bit_clk;
      @(negedge sys_clk); #1;
      chk(count_2 == 8'(m1) && count_4 == 9'(m3), "falling-edge counters follow");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge sys_clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
