// tb_fir_fsm: checks the controller cycle by cycle.
//
// The testbench makes its own frame counter and ticks (tick_0, tick_39 and
// the coefficient-address ticks decoded half a cycle late, as the timing block
// does) and predicts, for every cycle of 80 input periods: the state (writing
// in cycle 1 of each half, operating in cycles 2..39, ready otherwise), the
// write enable (first half only), the RAM address walk starting at the newest
// sample (first half) or the oldest sample (second half), the pointer moving
// by one word per period with wrap-around at 38, the coefficient address
// sequence 0,0,1..18,18,17..1, the ROM enable and the one-cycle-late MAC
// resets (low through the operating cycles plus six ready cycles).
module tb_fir_fsm;
  import interp_pkg::*;
  logic sys_clk = 1'b0;
  logic rst, lr_clk, tick_0, tick_39, rom_tick_inc, rom_tick_dec;
  fir_state_t state;
  logic ram_en, ram_we, rom_en, mac_rst, reg_rst;
  logic [5:0] ram_addr, ram_pr;
  logic [4:0] rom_addr;

  fir_fsm dut (.*);
  always #5 sys_clk = ~sys_clk;

  int checks = 0, failures = 0, n_wrap = 0;
  int c3 = 0, c2 = 0;

  always @(negedge sys_clk) c2 <= c3 % 192;
  always_comb begin
    tick_0 = (c2 == 0);
    tick_39 = (c2 == 39);
    rom_tick_inc = (c2 >= 3 && c2 <= 20);
    rom_tick_dec = (c2 >= 22 && c2 <= 39);
    lr_clk = (c3 >= 192);
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 15) $display("FAIL %s", what); end
  endtask

  function automatic int rom_seq(input int i);
    if (i == 0) return 0;
    if (i <= 19) return i - 1;
    if (i == 20) return 18;
    return 38 - i;
  endfunction

  initial begin
    rst = 1;
    repeat (3) @(posedge sys_clk);
    #1 rst = 0;
    for (int frame = 0; frame < 80; frame++) begin
      for (int c = 0; c < 384; c++) begin
        int h, half, newest;
        fir_state_t es;
        bit emr;
        if (!(frame == 0 && c == 0)) begin
          @(posedge sys_clk); #1;
          c3 = c;
        end
        h = c % 192; half = c / 192;
        newest = frame % 38;
        if (h == 1)                es = WR_ST;
        else if (h >= 2 && h <= 39) es = half ? HIGH_OP_ST : LOW_OP_ST;
        else                       es = (frame == 0 && c == 0) ? IDLE_ST : READY_ST;
        chk(state == es, $sformatf("frame %0d cycle %0d: state %s exp %s", frame, c, state.name(), es.name()));
        chk(ram_en && (ram_we == (c == 1)), $sformatf("cycle %0d write enable", c));
        chk(rom_en == !(half && h >= 2 && h <= 39), $sformatf("cycle %0d rom_en", c));
        if (c == 1) chk(ram_addr == 6'(newest), $sformatf("frame %0d write address %0d", frame, ram_addr));
        if (!half && h >= 2 && h <= 39) begin
          chk(ram_addr == 6'((newest + h - 2) % 38), $sformatf("frame %0d cycle %0d ram_addr %0d", frame, c, ram_addr));
          chk(rom_addr == 5'(rom_seq(h - 2)), $sformatf("cycle %0d rom_addr %0d", c, rom_addr));
          chk(ram_pr == 6'(newest), "pointer during the convolution");
        end
        if (half && h >= 2 && h <= 39)
          chk(ram_addr == 6'((newest + 1 + h - 2) % 38), $sformatf("frame %0d cycle %0d high ram_addr %0d", frame, c, ram_addr));
        if (h >= 40) chk(ram_pr == 6'((newest + 1) % 38) && rom_addr == 0, "pointer advanced, rom address back to 0");
        emr = half ? !(h >= 41 && h <= 46) : !(h >= 3 && h <= 46);
        if (!(frame == 0 && c <= 2)) chk(mac_rst == emr && reg_rst == emr, $sformatf("cycle %0d mac resets %0d exp %0d", c, mac_rst, emr));
        if (h == 40 && !half && newest == 37) n_wrap++;
      end
    end
    chk(n_wrap > 0, "pointer wrap-around exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (81 * 384) @(posedge sys_clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
