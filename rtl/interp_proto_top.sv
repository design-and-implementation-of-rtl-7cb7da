// interp_proto_top: I2S test set-up of the first interpolation stage.
//
// The first, sharpest stage of a four-stage x64 interpolator for a hearing-aid
// D/A back end: a polyphase halfband FIR doubling 22.05 kHz (16-bit) audio to
// 44.1 kHz (22-bit). For measurement with an audio analyser the filter sits
// between an I2S receiver and an I2S transmitter, as in the document's test
// set-up: i2s_s2p -> hb_interp_fir -> i2s_p2s. This side is the I2S clock
// master: bit_clk (sys_clk / 6) and lr_clk (sys_clk / 384) are outputs.
// sys_clk itself comes from outside (a clock manager in the prototype).
//
// Ports: sys_clk, rst (synchronous, active high); i2s_din, the serial input
// (16-bit samples in the left slot); i2s_dout, the serial output (y(2n) in
// the left slot, y(2n+1) in the right slot, 22 bits each); bit_clk, lr_clk.
// The parallel input sample (x, x_valid) and filter output (y, y_valid,
// y_odd) are also brought out for observation.
// Latency: a sample received in period n is filtered in period n+1 and its
// two outputs leave in period n+2.
//
// Beside it stand the last two stages of the x64 interpolator, CIC filters
// x2 (order 3, 4fs to 8fs) and x8 (order 1, 8fs to 64fs). The second stage
// between them (a halfband filter built from identical subfilters, 2fs to
// 4fs) is not part of this design, so the CIC chain has its own ports:
// cic_din (22 bits, one sample every 96 sys_clk cycles with cic_din_valid)
// and cic_dout (24 bits, one sample every 6 sys_clk cycles, the 64fs rate,
// with cic_dout_valid).
module interp_proto_top
  import interp_pkg::*;
#(
  localparam int unsigned CIC_W_IN  = Y_W,
  localparam int unsigned CIC_W_OUT = Y_W + 2
) (
  input  logic sys_clk,
  input  logic rst,
  input  logic i2s_din,
  output logic i2s_dout,
  output logic bit_clk,
  output logic lr_clk,
  output sample_t x,
  output logic x_valid,
  output out_t y,
  output logic y_valid,
  output logic y_odd,
  input  logic signed [CIC_W_IN-1:0]  cic_din,
  input  logic                        cic_din_valid,
  output logic signed [CIC_W_OUT-1:0] cic_dout,
  output logic                        cic_dout_valid
);

  localparam int unsigned S3_W_OUT = CIC_W_IN + 2;   // order 3: two bits of growth

  logic [8:0] count_3;

  i2s_s2p u_s2p (
    .sys_clk      (sys_clk),
    .rst          (rst),
    .count_3      (count_3),
    .sdata        (i2s_din),
    .sample       (x),
    .sample_valid (x_valid)
  );

  hb_interp_fir u_fir (
    .sys_clk    (sys_clk),
    .rst        (rst),
    .din        (x),
    .dout       (y),
    .dout_valid (y_valid),
    .dout_odd   (y_odd),
    .lr_clk     (lr_clk),
    .bit_clk    (bit_clk),
    .count_3    (count_3)
  );

  i2s_p2s u_p2s (
    .sys_clk (sys_clk),
    .rst     (rst),
    .count_3 (count_3),
    .y       (y),
    .y_valid (y_valid),
    .y_odd   (y_odd),
    .sdata   (i2s_dout)
  );

  // Third and fourth stages: CIC interpolators x2 (order 3) and x8 (order 1).
  // Their input is the 4fs output of the second stage, which is not part of
  // this design; it enters on cic_din, one sample every 96 sys_clk cycles.
  logic signed [S3_W_OUT-1:0] s3_y;
  logic                       s3_valid;

  cic_interp #(
    .M         (3),
    .K         (1),
    .W_IN      (CIC_W_IN),
    .IN_PERIOD (FRAME / 4)
  ) u_cic3 (
    .clk        (sys_clk),
    .rst        (rst),
    .in_valid   (cic_din_valid),
    .din        (cic_din),
    .dout       (s3_y),
    .dout_valid (s3_valid)
  );

  cic_interp #(
    .M         (1),
    .K         (3),
    .W_IN      (S3_W_OUT),
    .IN_PERIOD (FRAME / 8)
  ) u_cic4 (
    .clk        (sys_clk),
    .rst        (rst),
    .in_valid   (s3_valid),
    .din        (s3_y),
    .dout       (cic_dout),
    .dout_valid (cic_dout_valid)
  );

endmodule
