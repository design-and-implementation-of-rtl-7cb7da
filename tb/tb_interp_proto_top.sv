// tb_interp_proto_top: end-to-end test of the I2S set-up of the first stage.
//
// The testbench plays both I2S partners of the design: it sends one 16-bit
// sample per lr_clk period in the left slot of i2s_din (right slot filled
// with noise that must be ignored), and it receives i2s_dout, rebuilding the
// two 22-bit output words of every period. Each received pair is compared
// with a reference that convolves the zero-stuffed input with the full
// 75-tap halfband impulse response (centre tap 1), rounds down to Q2.20 and
// saturates. The sample sent in period k is written into the filter in period
// k+1 and its outputs leave in period k+2; the check of the parallel outputs'
// cycle positions (48 and 215 within the period) covers the latency.
// Stimulus: random samples, an impulse, a sign-matched full-scale run that
// overflows the Q2.20 output (saturation) and full-scale extremes. The
// mechanisms counted, each of which must occur: sample writes, writing-state
// cycles without a write (second half), convolution outputs, centre-tap
// outputs, circular-buffer pointer wrap-around and output saturation.
// The CIC chain beside the filter gets a random 4fs stream (one sample per
// 96 cycles); each of its 64fs outputs is checked against the x2 order-3
// and x8 order-1 reference and must come every 6 cycles.
// The top has no parameters, so this runs the design at its full size.
module tb_interp_proto_top;
  import interp_pkg::*;

  logic sys_clk = 1'b0;
  logic rst;
  logic i2s_din, i2s_dout, bit_clk, lr_clk;
  out_t y;
  logic y_valid, y_odd;
  sample_t x;
  logic x_valid;
  logic signed [21:0] cic_din;
  logic cic_din_valid;
  logic signed [23:0] cic_dout;
  logic cic_dout_valid;

  interp_proto_top dut (.*);

  always #5 sys_clk = ~sys_clk;

  int checks = 0, failures = 0;

  localparam int NFR = 140;
  localparam int SAT_K = 70;      // first frame of the sign-matched run

  function automatic longint hfull(input int k);
    int a;
    if (k == 37) return longint'(1) <<< H_FRAC;
    if (k < 0 || k > 74 || (k % 2) != 0) return 0;
    a = k / 2;
    if (a > 37 - a) a = 37 - a;
    return longint'(COEF_ROM[a]);
  endfunction

  longint xs [NFR + 4];
  bit     sat_ref [NFR + 4];

  function automatic longint u(input int g);   // filter input sequence
    if (g < 1 || g > NFR + 3) return 0;
    return xs[g - 1];
  endfunction

  function automatic longint ref_y(input int n, input bit odd);
    longint acc = 0, v;
    int j = 2 * n + (odd ? 1 : 0);
    for (int k = 0; k <= 74; k++)
      if (((j - k) % 2) == 0 && j - k >= 0) acc += hfull(k) * u((j - k) / 2);
    v = acc >>> (X_FRAC + H_FRAC - Y_FRAC);
    if (v > 2097151)  v = 2097151;
    if (v < -2097152) v = -2097152;
    return v;
  endfunction

  function automatic bit ref_sat(input int n);
    longint acc = 0;
    for (int k = 0; k <= 74; k += 2) acc += hfull(k) * u(n - k / 2);
    acc = acc >>> 12;
    return acc > 2097151 || acc < -2097152;
  endfunction

  initial begin
    for (int k = 0; k < NFR + 4; k++) begin
      int a;
      if (k == 5) xs[k] = 16384;                          // impulse
      else if (k < 30) xs[k] = 0;
      else if (k < SAT_K) xs[k] = longint'(sample_t'($urandom));
      else if (k < SAT_K + 38) begin
        a = SAT_K + 37 - k;
        a = (a > 37 - a) ? 37 - a : a;
        xs[k] = COEF_ROM[a] < 0 ? -32768 : 32767;
      end else if (k < SAT_K + 60) xs[k] = ((k % 2) != 0) ? 32767 : -32768;
      else xs[k] = longint'(sample_t'($urandom));
    end
  end

  // ---------------- I2S source and sink ----------------
  int  frame = 0;         // index of the current lr_clk period
  int  pos = 0;           // bit period within the current slot
  logic lr_prev = 1'b0;
  logic [15:0] txw;
  logic [15:0] noise;
  logic [21:0] rx_l, rx_r;

  // bit_clk edges during reset (from its power-up value) are not bits
  always @(negedge bit_clk) if (!rst) begin
    if (lr_clk != lr_prev) begin
      pos = 0;
      if (!lr_clk) frame++;
      lr_prev = lr_clk;
      noise = 16'($urandom);
    end else begin
      pos++;
    end
    txw = 16'(xs[frame]);
    if (pos >= 1 && pos <= 16) i2s_din <= lr_clk ? noise[16 - pos] : txw[16 - pos];
    else                       i2s_din <= 1'($urandom);
  end

  always @(posedge bit_clk) begin
    if (pos >= 1 && pos <= 22) begin
      if (!lr_clk) rx_l[22 - pos] = i2s_dout;
      else         rx_r[22 - pos] = i2s_dout;
    end
    if (lr_clk && pos == 22 && frame >= 1 && frame < NFR) begin
      longint e0, e1;
      e0 = ref_y(frame - 1, 1'b0);
      e1 = ref_y(frame - 1, 1'b1);
      checks += 2;
      if (longint'($signed(rx_l)) != e0 || longint'($signed(rx_r)) != e1) begin
        failures++;
        if (failures < 10)
          $display("FAIL frame %0d: got %0d/%0d exp %0d/%0d", frame,
                   $signed(rx_l), $signed(rx_r), e0, e1);
      end
      if (ref_sat(frame - 1)) n_sat++;
    end
  end

  // ---------------- CIC chain (third and fourth stages) ----------------
  // A 4fs stream of random samples enters every 96 cycles; the reference is
  // y3(2n) = x(n) + 3x(n-1), y3(2n+1) = 3x(n) + x(n-1) for the order-3 x2
  // stage, and an 8-fold repeat of each y3 sample for the order-1 x8 stage.
  localparam int NC = 4 * NFR;
  longint cx [NC];
  int cin_n = 0, cout_n = 0, n_cic = 0;
  longint c_last = -1;
  initial foreach (cx[i]) cx[i] = longint'($signed(22'($urandom)));

  function automatic longint cref(input int m);
    int j = m / 8, n = j / 2;
    longint a = (n >= 0) ? cx[n] : 0, b = (n >= 1) ? cx[n - 1] : 0;
    return (j % 2 == 0) ? a + 3 * b : 3 * a + b;
  endfunction

  always @(posedge sys_clk) begin
    if (rst) begin
      cic_din_valid <= 1'b0;
      cic_din <= '0;
    end else begin
      cic_din_valid <= (cyc % 96 == 0) && cin_n < NC;
      if (cyc % 96 == 0 && cin_n < NC) begin
        cic_din <= 22'(cx[cin_n]);
        cin_n++;
      end
      if (cic_dout_valid) begin
        checks++;
        n_cic++;
        if (longint'(cic_dout) != cref(cout_n)) begin
          failures++;
          if (failures < 10) $display("FAIL CIC output %0d: %0d exp %0d", cout_n, cic_dout, cref(cout_n));
        end
        if (c_last >= 0 && longint'($time / 10) - c_last != 6) begin
          failures++;
          $display("FAIL CIC output spacing");
        end
        c_last = longint'($time / 10);
        cout_n++;
      end
    end
  end

  // ---------------- mechanism counters and cycle checks ----------------
  int n_write = 0, n_wr_nowrite = 0, n_conv = 0, n_mid = 0, n_wrap = 0, n_sat = 0;
  int cyc = 0;
  logic [5:0] pr_prev = '0;

  always @(posedge sys_clk) if (!rst) begin
    cyc = (cyc == 383) ? 0 : cyc + 1;
    if (dut.u_fir.ram_we) n_write++;
    if (dut.u_fir.state == WR_ST && lr_clk) n_wr_nowrite++;
    if (dut.u_fir.ram_pr == 0 && pr_prev == 6'd37) n_wrap++;
    pr_prev = dut.u_fir.ram_pr;
    if (x_valid) begin
      checks++;
      if (x != sample_t'(xs[frame]) || dut.u_fir.count_3 != 9'd100) begin
        failures++;
        $display("FAIL received sample %0d in frame %0d", x, frame);
      end
    end
    if (y_valid) begin
      if (y_odd) n_mid++; else n_conv++;
      checks++;
      if (dut.u_fir.count_3 != (y_odd ? 9'd215 : 9'd48)) begin
        failures++;
        $display("FAIL output in cycle %0d", dut.u_fir.count_3);
      end
    end
    if (frame == NFR) begin
      $display("writes=%0d wr_without_write=%0d conv=%0d centre=%0d wraps=%0d saturations=%0d cic_outputs=%0d",
               n_write, n_wr_nowrite, n_conv, n_mid, n_wrap, n_sat, n_cic);
      checks += 7;
      if (n_cic < 64 * (NFR - 2)) failures++;
      if (n_write == 0)      failures++;
      if (n_wr_nowrite == 0) failures++;
      if (n_conv == 0)       failures++;
      if (n_mid == 0)        failures++;
      if (n_wrap == 0)       failures++;
      if (n_sat == 0)        failures++;
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

  initial begin
    rst = 1'b1;
    i2s_din = 1'b0;
    repeat (4) @(posedge sys_clk);
    rst <= 1'b0;
  end

  initial begin
    repeat ((NFR + 3) * 384) @(posedge sys_clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
