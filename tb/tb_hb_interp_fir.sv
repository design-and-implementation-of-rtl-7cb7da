// tb_hb_interp_fir: self-checking testbench of the first interpolation stage.
//
// Drives one new Q1.15 sample per 384-cycle input period (changed in the
// second half, so it is stable when the filter writes it in cycle 1) and
// compares both outputs of every period with a reference that convolves the
// zero-stuffed input with the full 75-tap halfband impulse response (centre
// tap 1, odd phase zero) rebuilt from the coefficient table, rounds down to
// Q2.20 and saturates. Checks also that y(2n) appears in cycle 48 and
// y(2n+1) in cycle 215 of the period, and that exactly two outputs come per
// period. Stimulus: an impulse (the output must reproduce the impulse
// response), random samples, a sign-matched full-scale pattern that drives
// the accumulator past the Q2.20 range (saturation), and full-scale extremes.
module tb_hb_interp_fir;
  import interp_pkg::*;

  logic sys_clk = 1'b0;
  logic rst;
  sample_t din;
  out_t dout;
  logic dout_valid, dout_odd, lr_clk, bit_clk;
  logic [8:0] count_3;

  int checks = 0, failures = 0;
  int n_sat = 0;

  hb_interp_fir dut (.*);

  always #5 sys_clk = ~sys_clk;

  // full impulse response, index 0..74
  function automatic longint hfull(input int k);
    int a;
    if (k == 37) return longint'(1) <<< H_FRAC;
    if (k < 0 || k > 74 || (k % 2) != 0) return 0;
    a = k / 2;
    if (a > 37 - a) a = 37 - a;
    return longint'(COEF_ROM[a]);
  endfunction

  localparam int NFR = 220;
  longint xs [NFR];   // sample written in frame f
  int     nx = 0;

  function automatic longint ref_out(input int f, input bit odd);
    longint acc = 0, v;
    int j = 2 * f + (odd ? 1 : 0);
    for (int k = 0; k <= 74; k++) begin
      int u = j - k;
      if (u >= 0 && (u % 2) == 0 && (u / 2) < nx) acc += hfull(k) * xs[u / 2];
    end
    v = acc >>> (X_FRAC + H_FRAC - Y_FRAC);
    if (v > 2097151)  v = 2097151;
    if (v < -2097152) v = -2097152;
    return v;
  endfunction

  function automatic bit would_sat(input int f);
    longint acc = 0;
    for (int k = 0; k <= 74; k += 2) if (f - k/2 >= 0) acc += hfull(k) * xs[f - k/2];
    acc = acc >>> 12;
    return acc > 2097151 || acc < -2097152;
  endfunction

  // stimulus value for frame f
  function automatic sample_t stim(input int f);
    int a;
    if (f == 2) return 16'sh4000;                    // impulse of 0.5
    if (f < 50) return '0;
    if (f < 130) return sample_t'($urandom);
    if (f < 180) begin                               // sign-matched full scale
      a = (179 - f);
      if (a > 37) return '0;
      a = (a > 37 - a) ? 37 - a : a;
      return COEF_ROM[a] < 0 ? 16'sh8000 : 16'sh7fff;
    end
    return (f % 2 != 0) ? 16'sh7fff : 16'sh8000;
  endfunction

  int frame = -1;
  int outs_in_frame = 0;
  int frames_done = 0;

  initial begin
    rst = 1'b1;
    din = '0;
    repeat (5) @(posedge sys_clk);
    rst <= 1'b0;
  end

  always @(posedge sys_clk) if (!rst) begin
    if (count_3 == 9'd1) begin
      if (frame >= 0) begin
        checks++;
        if (outs_in_frame != 2) begin
          failures++;
          $display("FAIL frame %0d: %0d outputs", frame, outs_in_frame);
        end
      end
      frame++;
      outs_in_frame = 0;
      xs[frame] = longint'(din);
      nx = frame + 1;
      if (frame == NFR - 1) begin
        $display("saturating outputs seen: %0d", n_sat);
        checks++;
        if (n_sat == 0) failures++;
        $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
        $finish;
      end
    end
    if (count_3 == 9'd200) din <= stim(frame + 1);
    if (dout_valid && frame >= 0) begin
      longint exp_v;
      outs_in_frame++;
      exp_v = ref_out(frame, dout_odd);
      checks++;
      if (longint'(dout) != exp_v) begin
        failures++;
        if (failures < 10)
          $display("FAIL frame %0d odd=%0d: got %0d exp %0d", frame, dout_odd, dout, exp_v);
      end
      if (!dout_odd && would_sat(frame)) n_sat++;
      checks++;
      if (count_3 != (dout_odd ? 9'd215 : 9'd48)) begin
        failures++;
        $display("FAIL frame %0d: output in cycle %0d", frame, count_3);
      end
      if (dout_odd != (count_3 >= 9'd192)) begin
        failures++;
        $display("FAIL frame %0d: wrong output phase", frame);
      end
    end
  end

  initial begin
    repeat (NFR * 384 + 2000) @(posedge sys_clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
