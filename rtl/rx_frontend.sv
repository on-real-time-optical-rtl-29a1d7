// rx_frontend: model of the receiver's optical-electrical conversion, on K
// lanes: the photodetector (responsivity and added shot noise) followed by
// the transimpedance amplifier, whose frequency response is a K-lane FIR
// filter (poly_fir) that also brings the W-bit channel output back to the
// M-bit lanes of the output serializer.
//
// Configuration bus, local address:
//   addr[15:14] = 00 : photodetector registers (addr[3:0], see photodetector)
//   addr[15:14] = 01 : TIA FIR coefficient / shift (poly_fir map)
// After reset the block is transparent apart from the saturation to M
// bits, so the TIA shift must be set to scale W-bit channel samples down.
//
// Timing: three core cycles from x to y (PD 1, TIA 2). sat is the OR of
// both stages' saturation pulses. Tap count and address map are this
// design's choices; the PD -> TIA order follows the described receiver.
module rx_frontend
  import owc_pkg::*;
#(
  parameter int unsigned K      = K_DEF,
  parameter int unsigned W      = M_DEF + COEF_W_DEF - 1,
  parameter int unsigned M      = M_DEF,
  parameter int unsigned COEF_W = COEF_W_DEF,
  parameter int unsigned TAPS   = 8,
  parameter logic [31:0] SEED   = 32'hACE1_2468
) (
  input  logic                clk,
  input  logic                rst,
  input  cfg_wr_t             cfg,
  input  logic                in_valid,
  input  logic signed [W-1:0] x [K],
  output logic                out_valid,
  output logic signed [M-1:0] y [K],
  output logic                noise_on,
  output logic                sat
);

  cfg_wr_t cfg_pd, cfg_tia;

  always_comb begin
    cfg_pd     = cfg;
    cfg_tia    = cfg;
    cfg_pd.we  = cfg.we && (cfg.addr[15:14] == SUB_A);
    cfg_tia.we = cfg.we && (cfg.addr[15:14] == SUB_FIR);
  end

  logic                pd_valid, pd_sat, tia_sat;
  logic signed [W-1:0] pd_y [K];

  photodetector #(.K(K), .W(W), .SEED(SEED)) u_pd (
    .clk, .rst, .cfg(cfg_pd), .in_valid, .x,
    .out_valid(pd_valid), .y(pd_y), .noise_on, .sat(pd_sat)
  );

  poly_fir #(.K(K), .IN_W(W), .COEF_W(COEF_W), .TAPS(TAPS), .OUT_W(M)) u_tia (
    .clk, .rst, .cfg(cfg_tia), .in_valid(pd_valid), .x(pd_y),
    .out_valid, .y, .sat(tia_sat)
  );

  assign sat = pd_sat | tia_sat;

endmodule
