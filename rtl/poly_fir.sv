// poly_fir: K-lane (polyphase) FIR filter with loadable coefficients and a
// power-of-two normalization shift.
//
// The filter runs at the sample rate K * f_clk while its registers run at
// f_clk: every core clock it takes a block of K consecutive samples
// x(nK+0) .. x(nK+K-1) and produces K outputs
//   y(nK+p) = sum_{j=0}^{TAPS-1} h(j) * x(nK+p-j),   p = 0 .. K-1.
// Grouped by input lane q, the taps that meet lane q on output lane p are
// h(tK + ((p-q) mod K)), i.e. the polyphase components h_p(t) = h(tK+p).
// When the input is a core-rate signal interpolated by K (only lane 0
// non-zero), output lane p is exactly phase filter h_p applied to that
// signal, and reading the lanes out in order 0..K-1 is the output switch
// of the polyphase interpolator. With K = 8 at f_clk = 250 MHz the
// time resolution of h is 0.5 ns.
//
// Normalization: coefficients are stored scaled by 2^s so that the largest
// one uses the full COEF_W range; the sum is shifted right (arithmetic, by
// truncation) by the programmable amount s to undo that scaling and then
// saturated to OUT_W bits. sat pulses for one cycle when any lane
// saturated.
//
// Configuration (cfg, local address): addr[12] = 0 writes coefficient
// h(addr[11:0]) from data[COEF_W-1:0]; addr[12] = 1 writes the shift from
// data. Reset loads a unit impulse (h(0) = 1, others 0, shift 0), so the
// filter passes its input unchanged until programmed.
//
// INTERP = 1 builds the interpolator form literally: the input must carry
// samples on lane 0 only (an assertion checks that lanes 1..K-1 are zero),
// and K phase filters of ceil(TAPS/K) taps each use one multiplier per
// coefficient (TAPS in total, 40 at the defaults) instead of K*TAPS. The
// emulator top uses the general form (INTERP = 0) because the transmitter
// model ahead of the channel fills every lane.
//
// Timing: in_valid/x are registered (stage 1), the sums are registered
// (stage 2): y appears two core cycles after x, with out_valid. The
// history advances only on valid blocks. The coefficient and output
// widths, reset values and the two-stage pipeline are this design's
// choices; the K-lane polyphase structure and the shift normalization
// follow the described channel.
module poly_fir
  import owc_pkg::*;
#(
  parameter int unsigned K      = K_DEF,
  parameter int unsigned IN_W   = M_DEF,
  parameter int unsigned COEF_W = COEF_W_DEF,
  parameter int unsigned TAPS   = 40,
  parameter int unsigned OUT_W  = M_DEF + COEF_W_DEF - 1,
  parameter bit          INTERP = 1'b0
) (
  input  logic                    clk,
  input  logic                    rst,
  input  cfg_wr_t                 cfg,
  input  logic                    in_valid,
  input  logic signed [IN_W-1:0]  x [K],
  output logic                    out_valid,
  output logic signed [OUT_W-1:0] y [K],
  output logic                    sat
);

  localparam int unsigned ACC_W   = IN_W + COEF_W + ((TAPS > 1) ? $clog2(TAPS) : 1);
  localparam int unsigned SHIFT_W = $clog2(ACC_W);
  localparam int unsigned HN      = (TAPS > 1) ? TAPS - 1 : 1;   // history length
  localparam int unsigned WN      = HN + K;                      // window length

  logic signed [COEF_W-1:0] coef [TAPS];
  logic [SHIFT_W-1:0]       shift;

  // ---------------- configuration writes ----------------
  always_ff @(posedge clk) begin
    if (rst) begin
      for (int j = 0; j < TAPS; j++) coef[j] <= (j == 0) ? COEF_W'(1) : '0;
      shift <= '0;
    end else if (cfg.we) begin
      if (cfg.addr[FIR_SHIFT_BIT]) begin
        shift <= cfg.data[SHIFT_W-1:0];
      end else begin
        for (int j = 0; j < TAPS; j++)
          if (cfg.addr[11:0] == 12'(j)) coef[j] <= cfg.data[COEF_W-1:0];
      end
    end
  end

  // ---------------- stage 1: input register ----------------
  logic                   v1;
  logic signed [IN_W-1:0] xr [K];

  always_ff @(posedge clk) begin
    if (rst) begin
      v1 <= 1'b0;
      for (int q = 0; q < K; q++) xr[q] <= '0;
    end else begin
      v1 <= in_valid;
      if (in_valid) xr <= x;
    end
  end

  // ---------------- stage 2: polyphase sums ----------------
  logic signed [ACC_W-1:0] acc    [K];
  logic signed [ACC_W-1:0] scaled [K];
  logic signed [OUT_W-1:0] ysat   [K];
  logic [K-1:0]            lane_sat;

  localparam logic signed [ACC_W-1:0] OUT_MAX = ACC_W'((64'sd1 <<< (OUT_W - 1)) - 64'sd1);
  localparam logic signed [ACC_W-1:0] OUT_MIN = -ACC_W'(64'sd1 <<< (OUT_W - 1));

  if (!INTERP) begin : g_block
    // General K-lane form. Window: w[HN+q] = x(nK+q) of the current block,
    // w[HN-d] = x(nK-d).
    logic signed [IN_W-1:0] hist [HN];
    logic signed [IN_W-1:0] w    [WN];

    always_comb begin
      for (int i = 0; i < HN; i++) w[i] = hist[i];
      for (int q = 0; q < K; q++)  w[HN+q] = xr[q];
      for (int p = 0; p < K; p++) begin
        acc[p] = '0;
        for (int j = 0; j < TAPS; j++)
          acc[p] = acc[p] + ACC_W'(coef[j]) * ACC_W'(w[int'(HN) + p - j]);
      end
    end

    always_ff @(posedge clk) begin
      if (rst)     for (int i = 0; i < HN; i++) hist[i] <= '0;
      else if (v1) for (int i = 0; i < HN; i++) hist[i] <= w[i + K];
    end
  end else begin : g_interp
    // Interpolator form: only lane 0 carries x(nK). Output lane p is phase
    // filter h_p(t) = h(tK+p) applied to the lane-0 sequence, so each
    // coefficient meets exactly one sample: TAPS multipliers in total.
    // Window: v[0] = x0(n), v[t] = x0(n-t).
    localparam int unsigned TP = (TAPS + K - 1) / K;   // taps per phase
    localparam int unsigned VN = (TP > 1) ? TP - 1 : 1;
    logic signed [IN_W-1:0] hist0 [VN];
    logic signed [IN_W-1:0] v     [TP];

    always_comb begin
      v[0] = xr[0];
      for (int t = 1; t < TP; t++) v[t] = hist0[t-1];
      for (int p = 0; p < K; p++) begin
        acc[p] = '0;
        for (int t = 0; t < TP; t++)
          if (t * K + p < TAPS)
            acc[p] = acc[p] + ACC_W'(coef[t * K + p]) * ACC_W'(v[t]);
      end
    end

    always_ff @(posedge clk) begin
      if (rst) for (int i = 0; i < VN; i++) hist0[i] <= '0;
      else if (v1) begin
        hist0[0] <= xr[0];
        for (int i = 1; i < VN; i++) hist0[i] <= hist0[i-1];
      end
    end

    // Lanes 1..K-1 of an interpolated input must be zero.
    for (genvar q = 1; q < K; q++) begin : g_chk
      a_lane_zero: assert property (@(posedge clk) disable iff (rst) in_valid |-> x[q] == '0)
        else $error("poly_fir (INTERP): lane %0d of an interpolated input is not zero", q);
    end
  end

  always_comb begin
    for (int p = 0; p < K; p++) begin
      scaled[p] = acc[p] >>> shift;
      if (scaled[p] > OUT_MAX) begin
        ysat[p]     = OUT_MAX[OUT_W-1:0];
        lane_sat[p] = 1'b1;
      end else if (scaled[p] < OUT_MIN) begin
        ysat[p]     = OUT_MIN[OUT_W-1:0];
        lane_sat[p] = 1'b1;
      end else begin
        ysat[p]     = scaled[p][OUT_W-1:0];
        lane_sat[p] = 1'b0;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      out_valid <= 1'b0;
      sat       <= 1'b0;
      for (int p = 0; p < K; p++) y[p] <= '0;
    end else begin
      out_valid <= v1;
      sat       <= v1 && (lane_sat != '0);
      if (v1) y <= ysat;
    end
  end

endmodule
