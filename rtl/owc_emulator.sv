// owc_emulator: real-time optical wireless channel emulator.
//
// The emulator sits between a baseband emitter and a baseband receiver and
// reproduces, sample by sample, what the optical link between them does:
//   serial in -> deserializer (S/P) -> driver_led (LUT non-linearity + FIR)
//   -> channel (K-lane polyphase FIR holding the channel impulse response)
//   -> rx_frontend (photodetector + noise, TIA FIR) -> serializer (P/S)
//   -> serial out.
// The core runs at f_clk (250 MHz in the described system) on K parallel
// lanes, so the signal is processed at K * f_clk; with K = 8 the impulse
// response has 0.5 ns resolution. Input and output samples are M bits;
// the channel output lanes are M+R-1 bits (R = COEF_W).
//
// The supervising processor is outside this module. It reaches the design
// through a single-cycle write bus (cfg_we, cfg_sel, cfg_addr, cfg_data):
// cfg_sel picks driver (0), channel (1) or receiver (2), cfg_addr is the
// block's local address (see each block). It reads back mon_in (the
// deserialized input block) and mon_out (the block sent to the serializer)
// for monitoring, with their valid flags, and the saturation/noise
// status. Programming the channel coefficients with another impulse
// response (e.g. another receiver position) reconfigures the emulator
// while it runs.
//
// Clocks: clk_fast = K * clk_core from one synthesizer, phase aligned;
// rst is synchronous and must be released in the clk_fast cycle that ends
// with a clk_core edge. Latency from the first fast edge of an input block
// to the first output sample of the same block: 1 + 3 + 2 + 3 core cycles
// of processing plus the serdes (see the deserializer and serializer), in
// total 10 core cycles = 10*K fast cycles, lane order preserved.
module owc_emulator
  import owc_pkg::*;
#(
  parameter int unsigned K        = K_DEF,
  parameter int unsigned M        = M_DEF,
  parameter int unsigned COEF_W   = COEF_W_DEF,
  parameter int unsigned DRV_TAPS = 8,
  parameter int unsigned CH_TAPS  = 40,
  parameter int unsigned RX_TAPS  = 8
) (
  input  logic                        clk_fast,
  input  logic                        clk_core,
  input  logic                        rst,
  // serial sample streams at K * f_clk
  input  logic signed [M-1:0]         serial_in,
  output logic signed [M-1:0]         serial_out,
  output logic                        serial_out_valid,
  // configuration write bus (clk_core domain)
  input  logic                        cfg_we,
  input  logic [3:0]                  cfg_sel,
  input  logic [CFG_AW-1:0]           cfg_addr,
  input  logic [CFG_DW-1:0]           cfg_data,
  // monitoring taps (clk_core domain)
  output logic signed [M-1:0]         mon_in  [K],
  output logic                        mon_in_valid,
  output logic signed [M-1:0]         mon_out [K],
  output logic                        mon_out_valid,
  output logic [2:0]                  sat,        // {rx, channel, driver}
  output logic                        lut_en,
  output logic                        noise_on
);

  localparam int unsigned W = M + COEF_W - 1;

  cfg_wr_t cfg_drv, cfg_ch, cfg_rx;

  always_comb begin
    cfg_drv = '{we: cfg_we && (cfg_sel == SEL_DRIVER),  addr: cfg_addr, data: cfg_data};
    cfg_ch  = '{we: cfg_we && (cfg_sel == SEL_CHANNEL), addr: cfg_addr, data: cfg_data};
    cfg_rx  = '{we: cfg_we && (cfg_sel == SEL_RX),      addr: cfg_addr, data: cfg_data};
  end

  // ---------------- S/P ----------------
  logic                in_valid;
  logic signed [M-1:0] in_lanes [K];

  deserializer #(.K(K), .M(M)) u_sp (
    .clk_fast, .clk_core, .rst, .din(serial_in),
    .lanes(in_lanes), .valid(in_valid)
  );

  assign mon_in       = in_lanes;
  assign mon_in_valid = in_valid;

  // ---------------- Driver + LED ----------------
  logic                tx_valid;
  logic signed [M-1:0] tx_lanes [K];

  driver_led #(.K(K), .M(M), .COEF_W(COEF_W), .AW(M), .TAPS(DRV_TAPS)) u_tx (
    .clk(clk_core), .rst, .cfg(cfg_drv),
    .in_valid, .x(in_lanes),
    .out_valid(tx_valid), .y(tx_lanes), .lut_en, .sat(sat[0])
  );

  // ---------------- Channel ----------------
  logic                ch_valid;
  logic signed [W-1:0] ch_lanes [K];

  poly_fir #(.K(K), .IN_W(M), .COEF_W(COEF_W), .TAPS(CH_TAPS), .OUT_W(W)) u_channel (
    .clk(clk_core), .rst, .cfg(cfg_ch),
    .in_valid(tx_valid), .x(tx_lanes),
    .out_valid(ch_valid), .y(ch_lanes), .sat(sat[1])
  );

  // ---------------- Receiver front-end ----------------
  logic                rx_valid;
  logic signed [M-1:0] rx_lanes [K];

  rx_frontend #(.K(K), .W(W), .M(M), .COEF_W(COEF_W), .TAPS(RX_TAPS)) u_rx (
    .clk(clk_core), .rst, .cfg(cfg_rx),
    .in_valid(ch_valid), .x(ch_lanes),
    .out_valid(rx_valid), .y(rx_lanes), .noise_on, .sat(sat[2])
  );

  assign mon_out       = rx_lanes;
  assign mon_out_valid = rx_valid;

  // ---------------- P/S ----------------
  serializer #(.K(K), .M(M)) u_ps (
    .clk_fast, .rst, .din(rx_lanes), .din_valid(rx_valid),
    .dout(serial_out), .dout_valid(serial_out_valid)
  );

endmodule
