// tb_cic_interp: checks the CIC interpolators of the third and fourth stages.
//
// Two instances run side by side: order 3 with rate x2 (one input every 96
// cycles) and order 1 with rate x8 (one input every 48 cycles). For each, the
// testbench builds the impulse response of ((1 - z^-D)/(1 - z^-1))^M by
// repeated polynomial multiplication, convolves it with the input stream
// zero-stuffed by D, and compares every output sample in order. It also
// checks that outputs are evenly spaced (48 and 6 cycles) and that D outputs
// come per input. Inputs are random, with full-scale runs of both signs.
module tb_cic_interp;
  logic clk = 1'b0;
  logic rst;
  always #5 clk = ~clk;

  localparam int W3 = 22, W4 = 24;
  logic in3, v3o, in4, v4o;
  logic signed [W3-1:0] d3;
  logic signed [W3+1:0] o3;
  logic signed [W4-1:0] d4;
  logic signed [W4-1:0] o4;

  cic_interp #(.M(3), .K(1), .W_IN(W3), .IN_PERIOD(96)) dut3 (
    .clk(clk), .rst(rst), .in_valid(in3), .din(d3), .dout(o3), .dout_valid(v3o));
  cic_interp #(.M(1), .K(3), .W_IN(W4), .IN_PERIOD(48)) dut4 (
    .clk(clk), .rst(rst), .in_valid(in4), .din(d4), .dout(o4), .dout_valid(v4o));

  int checks = 0, failures = 0;

  localparam int NIN = 120;
  longint x3 [NIN], x4 [NIN];
  longint g3 [0:3], g4 [0:7];
  int n3 = 0, n4 = 0, last3 = -1, last4 = -1, cyc = 0;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  // impulse response of (1 + z^-1 + ... + z^-(D-1))^M
  task automatic build(input int m, input int d, output longint g []);
    longint t [];
    g = new[1]; g[0] = 1;
    for (int r = 0; r < m; r++) begin
      t = new[g.size() + d - 1];
      foreach (t[i]) t[i] = 0;
      foreach (g[i]) for (int j = 0; j < d; j++) t[i + j] += g[i];
      g = t;
    end
  endtask

  function automatic longint ref3(input int j);
    longint acc = 0;
    for (int i = 0; i <= 3; i++) if ((j - i) >= 0 && (j - i) % 2 == 0 && (j - i) / 2 < NIN) acc += g3[i] * x3[(j - i) / 2];
    return acc;
  endfunction
  function automatic longint ref4(input int j);
    longint acc = 0;
    for (int i = 0; i <= 7; i++) if ((j - i) >= 0 && (j - i) % 8 == 0 && (j - i) / 8 < NIN) acc += g4[i] * x4[(j - i) / 8];
    return acc;
  endfunction

  initial begin
    longint g [];
    build(3, 2, g); foreach (g[i]) g3[i] = g[i];
    build(1, 8, g); foreach (g[i]) g4[i] = g[i];
    for (int k = 0; k < NIN; k++) begin
      if (k >= 40 && k < 50)      begin x3[k] = -(1 <<< 21); x4[k] = -(1 <<< 23); end
      else if (k >= 50 && k < 60) begin x3[k] = (1 <<< 21) - 1; x4[k] = (1 <<< 23) - 1; end
      else begin
        x3[k] = longint'($signed(22'($urandom)));
        x4[k] = longint'($signed(24'($urandom)));
      end
    end
    rst = 1; in3 = 0; in4 = 0; d3 = 0; d4 = 0;
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int c = 0; c < NIN * 96; c++) begin
      @(negedge clk);
      in3 = (c % 96 == 0);
      in4 = (c % 48 == 0) && (c / 48 < NIN);
      d3 = W3'(x3[c / 96]);
      d4 = W4'(x4[(c / 48 < NIN) ? c / 48 : 0]);
    end
    @(negedge clk); in3 = 0; in4 = 0;
    repeat (200) @(negedge clk);
    chk(n3 == 2 * NIN, $sformatf("x2 outputs %0d", n3));
    chk(n4 == 8 * NIN, $sformatf("x8 outputs %0d", n4));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (!rst) begin
    cyc++;
    if (v3o) begin
      chk(longint'(o3) == ref3(n3), $sformatf("x2 output %0d: %0d exp %0d", n3, o3, ref3(n3)));
      if (last3 >= 0) chk(cyc - last3 == 48, "x2 output spacing");
      last3 = cyc; n3++;
    end
    if (v4o) begin
      chk(longint'(o4) == ref4(n4), $sformatf("x8 output %0d: %0d exp %0d", n4, o4, ref4(n4)));
      if (last4 >= 0) chk(cyc - last4 == 6, "x8 output spacing");
      last4 = cyc; n4++;
    end
  end

  initial begin
    repeat (NIN * 96 + 1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
