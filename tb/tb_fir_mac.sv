// tb_fir_mac: checks the multiply-accumulate block.
//
// Each trial runs the block the way the controller does: the resets are held
// while junk operands are applied, then 38 operand pairs enter on consecutive
// cycles with the resets low, the resets stay low for 6 more cycles while
// junk operands keep coming (only the 38 products may count), and
// sum_ready_tick comes in the cycle the resets return. sum must then equal
// the exact sum of the 38 products, shifted down by 12 bits (round down) and
// saturated to 22 bits, with sum_valid for one cycle and sum_odd = 0; the
// cycle count from first operand to sum_valid must be 38 + 6 + 1. Trials use
// random operands and sign-matched full-scale operands (saturation both
// ways). Centre-tap trials pulse lr_tick_m with lr_switch = 1 and expect the
// operand sample scaled to Q2.20 with sum_odd = 1, and no change of sum
// when a tick comes with the wrong lr_switch.
module tb_fir_mac;
  import interp_pkg::*;
  logic sys_clk = 1'b0;
  logic rst, mac_tick_rst, reg_tick_rst, lr_switch, sum_ready_tick, lr_tick_m;
  sample_t data_in_1_a;
  coef_t data_in_2_a;
  out_t sum;
  logic sum_valid, sum_odd;

  fir_mac dut (.*);
  always #5 sys_clk = ~sys_clk;

  int checks = 0, failures = 0, n_sat = 0;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  task automatic conv_trial(input int kind);
    longint acc = 0, e;
    int start, stop;
    sample_t xv;
    coef_t hv;
    @(negedge sys_clk);
    lr_switch = 0; mac_tick_rst = 1; reg_tick_rst = 1; sum_ready_tick = 0; lr_tick_m = 0;
    repeat (3) begin
      data_in_1_a = sample_t'($urandom); data_in_2_a = coef_t'($urandom);
      @(negedge sys_clk);
    end
    mac_tick_rst = 0; reg_tick_rst = 0;
    start = $time / 10;
    for (int i = 0; i < 38; i++) begin
      if (kind == 0) begin
        xv = sample_t'($urandom); hv = coef_t'($urandom);
      end else begin
        hv = coef_t'($urandom_range(60000, 131071));
        if (i % 2 != 0) hv = -hv;
        xv = ((hv < 0) == (kind == 1)) ? 16'sh8000 : 16'sh7fff;
      end
      data_in_1_a = xv; data_in_2_a = hv;
      acc += longint'(xv) * longint'(hv);
      @(negedge sys_clk);
    end
    repeat (MULT_LATENCY) begin
      data_in_1_a = sample_t'($urandom); data_in_2_a = coef_t'($urandom);
      @(negedge sys_clk);
    end
    mac_tick_rst = 1; reg_tick_rst = 1; sum_ready_tick = 1;
    @(negedge sys_clk);
    sum_ready_tick = 0;
    stop = $time / 10;
    e = acc >>> 12;
    if (e > 2097151)  begin e = 2097151;  n_sat++; end
    if (e < -2097152) begin e = -2097152; n_sat++; end
    chk(sum_valid && !sum_odd, "sum_valid after sum_ready_tick");
    chk(longint'(sum) == e, $sformatf("kind %0d: sum %0d exp %0d", kind, sum, e));
    chk(stop - start == 38 + MULT_LATENCY + 1, $sformatf("cycles %0d", stop - start));
    @(negedge sys_clk);
    chk(!sum_valid && longint'(sum) == e, "sum holds, valid is a pulse");
  endtask

  task automatic mid_trial();
    sample_t xv = sample_t'($urandom);
    out_t prev_sum;
    @(negedge sys_clk);
    lr_switch = 1; mac_tick_rst = 1; reg_tick_rst = 1;
    data_in_1_a = xv; data_in_2_a = coef_t'($urandom);
    lr_tick_m = 1;
    @(negedge sys_clk);
    lr_tick_m = 0;
    chk(sum_valid && sum_odd && longint'(sum) == longint'(xv) * 32,
        $sformatf("centre tap %0d -> %0d", xv, sum));
    prev_sum = sum;
    // ticks with the wrong half are ignored
    lr_switch = 0; lr_tick_m = 1; data_in_1_a = ~xv;
    @(negedge sys_clk);
    lr_tick_m = 0; lr_switch = 1; sum_ready_tick = 1;
    @(negedge sys_clk);
    sum_ready_tick = 0;
    chk(sum == prev_sum, "ticks of the other half ignored");
  endtask

  initial begin
    rst = 1; mac_tick_rst = 1; reg_tick_rst = 1; lr_switch = 0;
    sum_ready_tick = 0; lr_tick_m = 0; data_in_1_a = 0; data_in_2_a = 0;
    repeat (2) @(negedge sys_clk);
    rst = 0;
    for (int t = 0; t < 40; t++) begin
      conv_trial(0);
      mid_trial();
    end
    conv_trial(1);
    conv_trial(2);
    chk(n_sat >= 2, $sformatf("saturation trials %0d", n_sat));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge sys_clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
