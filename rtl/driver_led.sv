// driver_led: model of the transmitter's electro-optical conversion (the
// LED and its driver), on K parallel lanes.
//
// Two stages, as in the described emitter model: a look-up table for the
// static non-linearity (led_lut) followed by a K-lane FIR filter for the
// limited bandwidth of driver and LED (poly_fir, output saturated back to
// M bits). Both are loaded through the configuration bus:
//   addr[15:14] = 00 : LUT entry addr[AW-1:0]
//   addr[15:14] = 01 : FIR coefficient / shift (poly_fir map on addr[12:0])
//   addr[15:14] = 10 : control, data[0] = LUT enable
// After reset the LUT is bypassed and the FIR is a unit impulse, so the
// block is transparent. sat reports FIR saturation.
//
// Timing: three core cycles from x to y (LUT 1, FIR 2). The tap count, the
// address map and the transparent reset state are this design's choices.
module driver_led
  import owc_pkg::*;
#(
  parameter int unsigned K      = K_DEF,
  parameter int unsigned M      = M_DEF,
  parameter int unsigned COEF_W = COEF_W_DEF,
  parameter int unsigned AW     = M_DEF,
  parameter int unsigned TAPS   = 8
) (
  input  logic                clk,
  input  logic                rst,
  input  cfg_wr_t             cfg,
  input  logic                in_valid,
  input  logic signed [M-1:0] x [K],
  output logic                out_valid,
  output logic signed [M-1:0] y [K],
  output logic                lut_en,
  output logic                sat
);

  cfg_wr_t cfg_lut, cfg_fir;

  always_comb begin
    cfg_lut    = cfg;
    cfg_fir    = cfg;
    cfg_lut.we = cfg.we && (cfg.addr[15:14] == SUB_A);
    cfg_fir.we = cfg.we && (cfg.addr[15:14] == SUB_FIR);
  end

  always_ff @(posedge clk) begin
    if (rst)                                         lut_en <= 1'b0;
    else if (cfg.we && cfg.addr[15:14] == SUB_CTRL)  lut_en <= cfg.data[0];
  end

  logic                lut_valid;
  logic signed [M-1:0] lut_y [K];

  led_lut #(.K(K), .M(M), .AW(AW)) u_lut (
    .clk, .rst, .cfg(cfg_lut), .en(lut_en),
    .in_valid, .x,
    .out_valid(lut_valid), .y(lut_y)
  );

  poly_fir #(.K(K), .IN_W(M), .COEF_W(COEF_W), .TAPS(TAPS), .OUT_W(M)) u_fir (
    .clk, .rst, .cfg(cfg_fir),
    .in_valid(lut_valid), .x(lut_y),
    .out_valid, .y, .sat
  );

endmodule
