// tb_owc_ofdm: workload testbench of the emulator at default parameters:
// an OFDM test signal through a multipath impulse response.
//
// Signal: 1024-point real OFDM symbols with 300 loaded carriers (carriers
// 1..150 and their mirror images) carrying 4-, 16- and 64-QAM, scaled to
// an RMS of 500 and clipped to 12 bits. Each sample is sent on lane 0 of
// a block, the others zero, so the input is the signal interpolated by
// K = 8 and the channel works as the polyphase interpolator h_p(t) =
// h(tK+p) with 0.5 ns resolution.
//
// Impulse response: 40 taps, a direct path at tap 2 (0.0127) and decaying
// reflections from tap 6 (0.0004 * 0.9^(j-6)); test values chosen for this
// bench. It is loaded twice:
//   A  coefficients quantized directly, round(h * 2^15), shift 0
//   B  normalized by the power of two 2^6 near 1/max(h): round(h * 2^21),
//      shift 6, same output scale
// The same 4-QAM symbol runs under A and B; the channel output (probed
// inside the design) is compared with the exact real-valued convolution,
// and B must reduce the quantization error power by more than 20 dB.
// Under B all three QAM orders run. Every channel output sample is checked
// bit-exactly against the integer model of the loaded coefficients, and
// every serial output sample against the receiver (TIA shift 9,
// saturation to 12 bits). The bench also reports the time-domain error
// vector magnitude between transmitted samples and the output lane that
// carries the direct path, after a least-squares gain, for each order
// (RMS EVM, 10 log10 of error power over signal power).
// Configuration changes happen during gaps of zero input, after the last
// non-zero sample has left the channel, so no output is excluded from the
// comparison.
module tb_owc_ofdm;
  import owc_pkg::*;
  import owc_ref_pkg::*;

  localparam int K = 8, M = 12, W = 27, CT = 40, N = 1024, LAT = 81, GAP = 128;
  localparam real PI = 3.14159265358979;

  logic clk_fast = 1'b0, clk_core = 1'b0, rst = 1'b1;
  logic signed [M-1:0] serial_in = '0, serial_out;
  logic serial_out_valid;
  logic cfg_we = 1'b0;
  logic [3:0] cfg_sel = '0;
  logic [15:0] cfg_addr = '0;
  logic [31:0] cfg_data = '0;
  logic signed [M-1:0] mon_in [K];
  logic signed [M-1:0] mon_out [K];
  logic mon_in_valid, mon_out_valid, lut_en, noise_on;
  logic [2:0] sat;
  int ph = 0;

  owc_emulator dut (.*);

  initial forever begin
    clk_fast = 1'b1;
    if (ph == 0)     clk_core = 1'b1;
    if (ph == K / 2) clk_core = 1'b0;
    #1 clk_fast = 1'b0;
    #1 ph = (ph + 1) % K;
  end

  int checks = 0, failures = 0;

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  real    h_real [CT];
  longint hA [$], hB [$];

  // stream description, one entry per block
  longint xs [$];            // interpolated input samples (K per block)
  int     seg_of [$];        // -1 gap, else segment index
  int     cfg_of [$];        // 0 = A, 1 = B coefficients in force
  logic [51:0] wq [$];       // pending bus writes
  longint ch_obs [$];        // observed channel output samples
  longint so_obs [$];        // observed serial output samples

  task automatic queue_channel(ref longint h [$], input int sh);
    for (int j = 0; j < CT; j++) wq.push_back({SEL_CHANNEL, 16'(j), 32'(h[j])});
    wq.push_back({SEL_CHANNEL, 16'h1000, 32'(sh)});
  endtask

  function automatic void ofdm_symbol(int qam, ref longint out [$]);
    real sym_i [151], sym_q [151], v [N], rms = 0.0, g;
    int L = (qam == 4) ? 2 : (qam == 16) ? 4 : 8;
    for (int k = 1; k <= 150; k++) begin
      sym_i[k] = real'(2 * int'($urandom_range(L - 1, 0)) - (L - 1));
      sym_q[k] = real'(2 * int'($urandom_range(L - 1, 0)) - (L - 1));
    end
    for (int n = 0; n < N; n++) begin
      v[n] = 0.0;
      for (int k = 1; k <= 150; k++)
        v[n] += sym_i[k] * $cos(2.0 * PI * k * n / N) - sym_q[k] * $sin(2.0 * PI * k * n / N);
      rms += v[n] * v[n];
    end
    g = 500.0 / $sqrt(rms / N);
    for (int n = 0; n < N; n++) begin
      longint s = longint'($rtoi(v[n] * g + ((v[n] >= 0.0) ? 0.5 : -0.5)));
      if (s > 2047) s = 2047;
      if (s < -2048) s = -2048;
      out.push_back(s);
    end
  endfunction

  initial begin
    // segments: 0 = 4-QAM under A, 1..3 = 4/16/64-QAM under B
    automatic int qam_of_seg [4] = '{4, 4, 16, 64};
    automatic int cfg_seg [4] = '{0, 1, 1, 1};
    longint sym [$];
    longint sym4 [$];
    int nblk, b;
    bit s;

    for (int j = 0; j < CT; j++) begin
      h_real[j] = (j == 2) ? 0.0127 : (j >= 6) ? 0.0004 * (0.9 ** (j - 6)) : 0.0;
      hA.push_back(longint'($rtoi(h_real[j] * 32768.0 + 0.5)));
      hB.push_back(longint'($rtoi(h_real[j] * 2097152.0 + 0.5)));
    end

    // build the block stream: gap, seg0, gap, seg1, seg2, seg3, gap
    ofdm_symbol(4, sym4);
    for (int sg = -1; sg < 4; sg++) begin
      if (sg == -1 || sg == 1) begin
        for (int i = 0; i < GAP; i++) begin
          for (int p = 0; p < K; p++) xs.push_back(0);
          seg_of.push_back(-1);
          cfg_of.push_back((sg == -1 || i < GAP / 4) ? 0 : 1);
        end
      end
      if (sg >= 0) begin
        sym.delete();
        if (sg <= 1) sym = sym4; else ofdm_symbol(qam_of_seg[sg], sym);
        for (int n = 0; n < N; n++) begin
          xs.push_back(sym[n]);
          for (int p = 1; p < K; p++) xs.push_back(0);
          seg_of.push_back(sg);
          cfg_of.push_back(cfg_seg[sg]);
        end
      end
    end
    for (int i = 0; i < GAP; i++) begin
      for (int p = 0; p < K; p++) xs.push_back(0);
      seg_of.push_back(-1);
      cfg_of.push_back(1);
    end
    nblk = seg_of.size();

    repeat (5) @(negedge clk_fast);
    while (ph != K - 1) @(negedge clk_fast);
    rst = 1'b0;

    // receiver: TIA shift 9 brings the channel scale back to 12 bits
    wq.push_back({SEL_RX, SUB_FIR, 14'h1000, 32'd9});
    queue_channel(hA, 0);

    b = 0;
    for (int n = 0; b < nblk + 12; n++) begin
      if (n % K == 1) begin
        if (dut.ch_valid)
          for (int p = 0; p < K; p++) ch_obs.push_back(longint'(dut.ch_lanes[p]));
        if (wq.size() != 0) begin
          automatic logic [51:0] w = wq.pop_front();
          cfg_we = 1'b1; cfg_sel = w[51:48]; cfg_addr = w[47:32]; cfg_data = w[31:0];
        end else cfg_we = 1'b0;
      end
      if (n >= LAT && serial_out_valid) so_obs.push_back(longint'(serial_out));
      if (n % K == 0) begin
        b = n / K;
        // switch to B a quarter into the second gap, once the tail of the
        // first segment has left the channel pipeline
        if (b < nblk && b > 0 && cfg_of[b] == 1 && cfg_of[b - 1] == 0) queue_channel(hB, 6);
      end
      serial_in = (b < nblk) ? M'(xs[b * K + n % K]) : '0;
      @(negedge clk_fast);
    end

    // ---- bit-exact checks ----
    begin
      automatic int shA = 0, shB = 6;
      automatic real eA = 0.0, eB = 0.0, pI = 0.0;
      automatic real st [4], sr [4], sx [4];
      for (int i = 0; i < 4; i++) begin st[i] = 0; sr[i] = 0; sx[i] = 0; end
      checks++;
      if (ch_obs.size() < nblk * K) begin failures++; $display("missing channel output %0d", ch_obs.size()); end
      for (int m = 0; m < nblk * K && m < ch_obs.size(); m++) begin
        automatic int  bb = m / K;
        automatic longint e, eo;
        s = 0;
        // coefficients change only while the input window is all zero
        e = (cfg_of[bb] == 0) ? fir_at(xs, hA, m, shA, W, s) : fir_at(xs, hB, m, shB, W, s);
        checks++;
        if (ch_obs[m] != e) begin
          failures++;
          if (failures < 10) $display("channel sample %0d: got %0d expected %0d", m, ch_obs[m], e);
        end
        s = 0;
        eo = sat_to(e >>> 9, M, s);
        checks++;
        if (m < so_obs.size() && so_obs[m] != eo) begin
          failures++;
          if (failures < 10) $display("serial sample %0d: got %0d expected %0d", m, so_obs[m], eo);
        end
        // quantization error against the real-valued response, segments 0 and 1
        if (seg_of[bb] == 0 || seg_of[bb] == 1) begin
          automatic real ideal = 0.0;
          for (int j = 0; j < CT; j++) if (m - j >= 0) ideal += h_real[j] * 32768.0 * real'(xs[m - j]);
          if (seg_of[bb] == 0) eA += (real'(ch_obs[m]) - ideal) ** 2;
          else begin eB += (real'(ch_obs[m]) - ideal) ** 2; pI += ideal ** 2; end
        end
        // time-domain EVM on the direct-path lane
        if (seg_of[bb] >= 1 && m % K == 2 && m < so_obs.size()) begin
          automatic int sg = seg_of[bb];
          automatic real tx = real'(xs[bb * K]), rx = real'(so_obs[m]);
          st[sg] += tx * rx; sr[sg] += rx * rx; sx[sg] += tx * tx;
        end
      end
      checks++;
      if (so_obs.size() < nblk * K) begin failures++; $display("missing serial output %0d", so_obs.size()); end
      $display("quantization error: direct %0.1f dB, power-of-2 normalized %0.1f dB (relative to signal)",
               10.0 * $log10(eA / pI), 10.0 * $log10(eB / pI));
      checks++;
      if (!(10.0 * $log10(eA / eB) > 20.0)) begin failures++; $display("normalization gain too small"); end
      for (int sg = 1; sg < 4; sg++) begin
        automatic real g = st[sg] / sr[sg];
        automatic real err = 0.0;
        for (int bb = 0; bb < nblk; bb++)
          if (seg_of[bb] == sg && bb * K + 2 < so_obs.size())
            err += (real'(xs[bb * K]) - g * real'(so_obs[bb * K + 2])) ** 2;
        $display("%0d-QAM: RMS EVM tx vs rx (direct-path lane) %0.1f dB", qam_of_seg[sg], 10.0 * $log10(err / sx[sg]));
        checks++;
        if (!(err < sx[sg])) begin failures++; $display("EVM not below 0 dB"); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
