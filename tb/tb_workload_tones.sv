// tb_workload_tones: runs the two measurement tones of the prototype tests
// through the first interpolation stage and measures what the filter does to
// them, as a spectrum analyser would.
//
// Tone A: 43.0664 Hz at 22.05 kHz input rate (exactly 1/512 of the input
// rate), 512 input samples, rectangular window, so signal and image fall on
// exact DFT bins (1 and 511 of 1024 output samples).
// Tone B: 997 Hz at 23.4 kHz input rate (the analyser's measurement set-up),
// 2048 input samples, Hann window.
// Both tones are 0.2 dB below full scale, rounded to Q1.15. One input sample
// is presented per 384-cycle period (updated in the second half, as the
// filter reads it in cycle 1). After 40 periods of settling the outputs
// y(2n), y(2n+1) are collected in order and evaluated with single-bin DFTs at
// the tone and at its image (input rate minus tone frequency, in the 2x
// output rate).
// Checks: two outputs per period; output SQNR of at least 96 dB, the error
// being the difference from the same filter in real arithmetic on the
// unquantised sine (input rounding to 16 bits plus output rounding to 22
// bits; a 16-bit input allows about 98 dB); passband gain of the Q2.20
// output relative to the Q1.15 input within +-0.05 dB of 0 dB (the
// coefficients are normalised to the centre tap, so the output is not scaled
// back); image suppression of at least 60 dB (the filter specification).
module tb_workload_tones;
  import interp_pkg::*;

  logic sys_clk = 1'b0;
  logic rst;
  sample_t din;
  out_t dout;
  logic dout_valid, dout_odd, lr_clk, bit_clk;
  logic [8:0] count_3;

  int checks = 0, failures = 0;

  hb_interp_fir dut (.*);

  always #5 sys_clk = ~sys_clk;

  localparam real PI = 3.14159265358979323846;
  localparam real AMP = 0.97723722095581;   // -0.2 dB
  localparam int  SETTLE = 40;
  localparam int  MAXN = 4096;

  real ybuf [MAXN];
  int  ny = 0;
  bit  collect = 1'b0;
  int  outs_in_frame = 0;

  always @(posedge sys_clk) if (!rst) begin
    if (dout_valid) begin
      outs_in_frame++;
      if (collect && ny < MAXN) begin
        ybuf[ny] = real'(dout) / real'(1 << Y_FRAC);
        ny++;
      end
    end
  end

  // amplitude of the component at normalised frequency fn (cycles/sample)
  function automatic real tone_amp(input int n, input real fn, input bit hann);
    real re = 0.0, im = 0.0, wsum = 0.0, w;
    for (int i = 0; i < n; i++) begin
      w = hann ? 0.5 - 0.5 * $cos(2.0 * PI * i / n) : 1.0;
      re += w * ybuf[i] * $cos(2.0 * PI * fn * i);
      im -= w * ybuf[i] * $sin(2.0 * PI * fn * i);
      wsum += w;
    end
    return 2.0 * $sqrt(re * re + im * im) / wsum;
  endfunction

  // signal-to-quantisation-noise ratio of the collected outputs: the error is
  // the output minus the same filter computed in real arithmetic (stored
  // coefficients, unquantised sine input), over all collected samples
  function automatic real sqnr_db(input int nin, input real fin);
    real ps = 0.0, pe = 0.0, yi, xr;
    int a, n;
    for (int i = 0; i < 2 * nin; i++) begin
      n = SETTLE + i / 2;
      if (i % 2 == 1) yi = AMP * $sin(2.0 * PI * fin * (n - 18));
      else begin
        yi = 0.0;
        for (int k = 0; k < N_TAPS; k++) begin
          a = (k < N_TAPS - 1 - k) ? k : N_TAPS - 1 - k;
          xr = AMP * $sin(2.0 * PI * fin * (n - k));
          yi += xr * real'(COEF_ROM[a]) / real'(1 << H_FRAC);
        end
      end
      ps += yi * yi;
      pe += (ybuf[i] - yi) * (ybuf[i] - yi);
    end
    return 10.0 * $log10(ps / pe);
  endfunction

  function automatic sample_t quant(input real v);
    real s = v * 32768.0;
    s = (s < 0.0) ? s - 0.5 : s + 0.5;
    if (s > 32767.0) s = 32767.0;
    if (s < -32768.0) s = -32768.0;
    return sample_t'(int'($rtoi(s)));
  endfunction

  task automatic run_tone(input string name, input real fin, input int nin, input bit hann);
    real a_sig, a_img, gain_db, img_db, q_db;
    ny = 0;
    collect = 1'b0;
    for (int f = 0; f < SETTLE + nin + 1; f++) begin
      @(posedge sys_clk iff count_3 == 9'd200);
      din <= quant(AMP * $sin(2.0 * PI * fin * f));
      @(posedge sys_clk iff count_3 == 9'd1);
      checks++;
      if (outs_in_frame != 2) begin
        failures++;
        $display("FAIL %s: %0d outputs in a period", name, outs_in_frame);
      end
      outs_in_frame = 0;
      // the sample presented at count 200 is written at the next count 1,
      // and its outputs follow in that period
      if (f == SETTLE) collect = 1'b1;
    end
    collect = 1'b0;
    checks++;
    if (ny < 2 * nin) begin
      failures++;
      $display("FAIL %s: only %0d outputs collected", name, ny);
    end
    a_sig = tone_amp(2 * nin, fin / 2.0, hann);
    a_img = tone_amp(2 * nin, 0.5 - fin / 2.0, hann);
    gain_db = 20.0 * $log10(a_sig / AMP);
    img_db = 20.0 * $log10(a_img / a_sig + 1.0e-12);
    q_db = sqnr_db(nin, fin);
    $display("%s: signal amplitude %f (gain %f dB), image %f dB, SQNR %f dB",
             name, a_sig, gain_db, img_db, q_db);
    checks++;
    if (q_db < 96.0) begin
      failures++;
      $display("FAIL %s: SQNR %f dB", name, q_db);
    end
    checks++;
    if (gain_db > 0.05 || gain_db < -0.05) begin
      failures++;
      $display("FAIL %s: passband gain %f dB", name, gain_db);
    end
    checks++;
    if (img_db > -60.0) begin
      failures++;
      $display("FAIL %s: image only %f dB down", name, img_db);
    end
  endtask

  initial begin
    rst = 1'b1;
    din = '0;
    repeat (5) @(posedge sys_clk);
    rst <= 1'b0;
    @(posedge sys_clk iff count_3 == 9'd1);
    outs_in_frame = 0;
    run_tone("43 Hz @ 22.05 kHz", 1.0 / 512.0, 512, 1'b0);
    run_tone("997 Hz @ 23.4 kHz", 997.0 / 23400.0, 2048, 1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat ((2 * SETTLE + 512 + 2048 + 10) * 384) @(posedge sys_clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
