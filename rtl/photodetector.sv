// photodetector: model of the photodetector at the receiver, on K lanes.
//
// Each lane's received optical sample x is converted with a programmable
// responsivity and the ambient-light shot noise is added:
//   y = sat( (x * gain) >>> shift  +  (noise * noise_amp) >>> 8 )
// where noise is the zero-mean per-lane value of noise_gen. The result is
// saturated to W bits (sat pulses when any lane saturates). Registers on
// the configuration bus, local addr[3:0]:
//   0 gain (signed, data[15:0]), 1 shift (data[5:0]), 2 noise_amp
//   (unsigned, data[15:0]; 0 disables the noise).
// Reset state: gain 1, shift 0, noise_amp 0, i.e. transparent.
//
// Timing: one core cycle from x to y; the noise source advances once per
// valid block. The gain/shift form and the additive signal-independent
// noise are this design's choices for the described "characteristics of
// the photo detector" and "addition of noise sources".
module photodetector
  import owc_pkg::*;
#(
  parameter int unsigned K    = K_DEF,
  parameter int unsigned W    = M_DEF + COEF_W_DEF - 1,
  parameter logic [31:0] SEED = 32'hACE1_2468
) (
  input  logic                clk,
  input  logic                rst,
  input  cfg_wr_t             cfg,
  input  logic                in_valid,
  input  logic signed [W-1:0] x [K],
  output logic                out_valid,
  output logic signed [W-1:0] y [K],
  output logic                noise_on,
  output logic                sat
);

  localparam int unsigned PW = W + 16 + 2;   // product/sum width

  logic signed [15:0] gain;
  logic [5:0]         shift;
  logic [15:0]        noise_amp;

  always_ff @(posedge clk) begin
    if (rst) begin
      gain      <= 16'sd1;
      shift     <= '0;
      noise_amp <= '0;
    end else if (cfg.we) begin
      case (cfg.addr[3:0])
        PD_REG_GAIN:  gain      <= cfg.data[15:0];
        PD_REG_SHIFT: shift     <= cfg.data[5:0];
        PD_REG_NOISE: noise_amp <= cfg.data[15:0];
        default: ;
      endcase
    end
  end

  assign noise_on = (noise_amp != '0);

  logic signed [10:0] noise [K];

  noise_gen #(.K(K), .SEED(SEED)) u_noise (
    .clk, .rst, .step(in_valid), .noise
  );

  localparam logic signed [PW-1:0] Y_MAX = PW'((64'sd1 <<< (W - 1)) - 64'sd1);
  localparam logic signed [PW-1:0] Y_MIN = -PW'(64'sd1 <<< (W - 1));

  logic signed [PW-1:0] sig   [K];
  logic signed [PW-1:0] nse   [K];
  logic signed [PW-1:0] tot   [K];
  logic signed [W-1:0]  ysat  [K];
  logic [K-1:0]         lsat;

  always_comb begin
    for (int p = 0; p < K; p++) begin
      sig[p] = (PW'(x[p]) * PW'(gain)) >>> shift;
      nse[p] = (PW'(noise[p]) * PW'($signed({1'b0, noise_amp}))) >>> 8;
      tot[p] = sig[p] + nse[p];
      if (tot[p] > Y_MAX) begin
        ysat[p] = Y_MAX[W-1:0]; lsat[p] = 1'b1;
      end else if (tot[p] < Y_MIN) begin
        ysat[p] = Y_MIN[W-1:0]; lsat[p] = 1'b1;
      end else begin
        ysat[p] = tot[p][W-1:0]; lsat[p] = 1'b0;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      out_valid <= 1'b0;
      sat       <= 1'b0;
      for (int p = 0; p < K; p++) y[p] <= '0;
    end else begin
      out_valid <= in_valid;
      sat       <= in_valid && (lsat != '0);
      if (in_valid) y <= ysat;
    end
  end

endmodule
