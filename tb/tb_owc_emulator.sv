// tb_owc_emulator: end-to-end testbench of the channel emulator, with every
// parameter at its default (K = 8 lanes, M = 12, R = 16, 40 channel taps).
//
// A serial stream enters at the fast clock and the serial output is
// compared sample by sample with a reference chain (LUT, driver FIR,
// channel FIR, photodetector with the LFSR noise model, TIA FIR) computed
// in the testbench. Output sample i must leave 10 core cycles (80 fast
// cycles) after input sample i entered. The run has four configurations,
// each loaded over the configuration bus while the stream keeps flowing:
//   0  reset state: every block transparent
//   1  "room centre": compressive LED table enabled, low-pass driver,
//      a 40-tap impulse response (line of sight plus decaying reflections)
//      normalized by 2^14, photodetector gain and noise, TIA low-pass; the
//      input is interpolated by K (one non-zero sample per core cycle)
//   2  "corner": new impulse response, table bypassed, noise off,
//      full-rate input
//   3  overload: channel normalization removed and driver gain raised, so
//      every stage saturates
// Outputs influenced by a configuration change in flight are not compared.
// The input monitor tap (mon_in) is checked against the input blocks.
// The test counts each mechanism (table on/off, interpolated and
// full-rate input, reconfiguration, noise, saturation in each block) and
// fails if one never happened.
module tb_owc_emulator;
  import owc_pkg::*;
  import owc_ref_pkg::*;

  localparam int K = 8, M = 12, W = 27, DT = 8, CT = 40, RT = 8, LAT = 81;
  localparam logic [31:0] SEED = 32'hACE1_2468;   // rx_frontend default

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
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- reference configuration ----------------
  typedef struct {
    bit     lut_on;
    longint hd [DT];
    int     shd;
    longint hc [CT];
    int     shc;
    longint gain;
    int     shp;
    longint amp;
    longint ht [RT];
    int     sht;
  } cfg_t;

  cfg_t cur, nxt;
  logic [M-1:0] tbl [4096];
  longint hdq [$], hcq [$], htq [$];
  longint a_s [$], d_s [$], c_s [$], p_s [$];
  logic [31:0] st [K];

  // pending bus writes {sel, addr, data}
  logic [51:0] wq [$];

  // expected output samples and whether each is compared
  longint exp_q [$];
  bit     chk_q [$];

  longint in_hist [$];       // every input sample, for the monitor check
  int cnt_mon = 0;
  int cnt_lut_on = 0, cnt_lut_off = 0, cnt_interp = 0, cnt_full = 0;
  int cnt_noise = 0, cnt_epochs = 0, cnt_compared = 0;
  int cnt_sat [3] = '{0, 0, 0};

  function automatic void to_queues(cfg_t c);
    hdq.delete(); hcq.delete(); htq.delete();
    for (int j = 0; j < DT; j++) hdq.push_back(c.hd[j]);
    for (int j = 0; j < CT; j++) hcq.push_back(c.hc[j]);
    for (int j = 0; j < RT; j++) htq.push_back(c.ht[j]);
  endfunction

  task automatic queue_cfg(cfg_t c, bit load_table);
    if (load_table)
      for (int i = 0; i < 4096; i++) wq.push_back({SEL_DRIVER, SUB_A, 14'(i), 32'(tbl[i])});
    for (int j = 0; j < DT; j++) wq.push_back({SEL_DRIVER, SUB_FIR, 14'(j), 32'(c.hd[j])});
    wq.push_back({SEL_DRIVER, SUB_FIR, 14'h1000, 32'(c.shd)});
    for (int j = 0; j < CT; j++) wq.push_back({SEL_CHANNEL, 16'(j), 32'(c.hc[j])});
    wq.push_back({SEL_CHANNEL, 16'h1000, 32'(c.shc)});
    wq.push_back({SEL_RX, SUB_A, 10'h0, PD_REG_GAIN, 32'(c.gain)});
    wq.push_back({SEL_RX, SUB_A, 10'h0, PD_REG_SHIFT, 32'(c.shp)});
    wq.push_back({SEL_RX, SUB_A, 10'h0, PD_REG_NOISE, 32'(c.amp)});
    for (int j = 0; j < RT; j++) wq.push_back({SEL_RX, SUB_FIR, 14'(j), 32'(c.ht[j])});
    wq.push_back({SEL_RX, SUB_FIR, 14'h1000, 32'(c.sht)});
    wq.push_back({SEL_DRIVER, SUB_CTRL, 14'h0, 32'(c.lut_on)});
  endtask

  // Reference outputs of one K-sample block.
  task automatic ref_block(logic signed [M-1:0] blk [K], bit compare);
    int n0 = a_s.size();
    bit s;
    for (int p = 0; p < K; p++) begin
      int idx = int'(blk[p]) + 2048;
      a_s.push_back(cur.lut_on ? longint'($signed(tbl[idx])) : longint'(blk[p]));
    end
    for (int p = 0; p < K; p++) begin s = 0; d_s.push_back(fir_at(a_s, hdq, n0 + p, cur.shd, M, s)); end
    for (int p = 0; p < K; p++) begin s = 0; c_s.push_back(fir_at(d_s, hcq, n0 + p, cur.shc, W, s)); end
    for (int p = 0; p < K; p++) begin
      s = 0;
      p_s.push_back(pd_ref(c_s[n0 + p], cur.gain, cur.shp, noise_of(st[p]), cur.amp, W, s));
      st[p] = lfsr_step(st[p]);
    end
    for (int p = 0; p < K; p++) begin
      s = 0;
      exp_q.push_back(fir_at(p_s, htq, n0 + p, cur.sht, M, s));
      chk_q.push_back(compare);
    end
  endtask

  // ---------------- configurations ----------------
  function automatic cfg_t cfg_reset();
    cfg_t c;
    c.lut_on = 0;
    foreach (c.hd[j]) c.hd[j] = (j == 0) ? 1 : 0;
    foreach (c.hc[j]) c.hc[j] = (j == 0) ? 1 : 0;
    foreach (c.ht[j]) c.ht[j] = (j == 0) ? 1 : 0;
    c.shd = 0; c.shc = 0; c.shp = 0; c.sht = 0; c.gain = 1; c.amp = 0;
    return c;
  endfunction

  function automatic cfg_t cfg_centre();
    cfg_t c = cfg_reset();
    longint r = 1800;
    c.lut_on = 1;
    c.hd = '{4096, 8192, 8192, 4096, 2048, 1024, 512, 0};
    c.shd = 15;
    foreach (c.hc[j]) begin
      if (j == 2) c.hc[j] = 16000;
      else if (j >= 6) begin c.hc[j] = r; r = r * 9 / 10; end
      else c.hc[j] = 0;
    end
    c.shc = 14;
    c.gain = 3; c.shp = 1; c.amp = 64;
    c.ht = '{20000, 12000, 0, 0, 0, 0, 0, 0};
    c.sht = 15;
    return c;
  endfunction

  function automatic cfg_t cfg_corner();
    cfg_t c = cfg_centre();
    longint r = 3000;
    c.lut_on = 0;
    c.amp = 0;
    foreach (c.hc[j]) begin
      if (j == 5) c.hc[j] = 11000;
      else if (j >= 9) begin c.hc[j] = r; r = r * 7 / 8; end
      else c.hc[j] = 0;
    end
    c.shc = 14;
    return c;
  endfunction

  function automatic cfg_t cfg_overload();
    cfg_t c = cfg_corner();
    c.hd = '{30000, 30000, 0, 0, 0, 0, 0, 0};
    c.shd = 13;
    foreach (c.hc[j]) c.hc[j] = (j < 4) ? 32000 : 0;
    c.shc = 0;
    c.gain = 2; c.shp = 0;
    return c;
  endfunction

  // ---------------- stimulus and checking ----------------
  localparam int GUARD = 12;                 // blocks around a change
  int epoch_start [4] = '{0, 60, 4400, 4700};
  int epoch_len = 280;

  initial begin
    automatic int  epoch = 0, last_done = -1000, b = 0, busy_from = 0;
    automatic bit  interp = 0, busy = 0;
    automatic int  amp_in = 2047;
    logic signed [M-1:0] blk [K];

    for (int i = 0; i < 4096; i++) begin
      automatic longint v = longint'(i) - 2048;
      tbl[i] = M'(v - (v * v * v) / (3 * 2048 * 2048));
    end
    for (int p = 0; p < K; p++) st[p] = lfsr_seed(SEED, p);
    cur = cfg_reset();
    to_queues(cur);

    repeat (5) @(negedge clk_fast);
    while (ph != K - 1) @(negedge clk_fast);
    rst = 1'b0;

    for (int n = 0; ; n++) begin
      // ---- check the serial output ----
      if (n >= LAT) begin
        automatic longint e = exp_q.pop_front();
        automatic bit c = chk_q.pop_front();
        checks++;
        if (!serial_out_valid) begin failures++; $display("serial_out_valid low at %0d", n); end
        if (c) begin
          checks++; cnt_compared++;
          if (longint'(serial_out) != e) begin
            failures++;
            if (failures < 20) $display("sample %0d: got %0d expected %0d", n - LAT, serial_out, e);
          end
        end
      end else begin
        checks++;
        if (serial_out_valid) begin failures++; $display("serial_out_valid early at %0d", n); end
      end

      // ---- core-domain actions just after a core edge ----
      if (n % K == 1) begin
        for (int i = 0; i < 3; i++) if (sat[i]) cnt_sat[i]++;
        // monitor tap: block b is on mon_in during core cycle b+1
        if (n > K) begin
          automatic int mb = (n - 1) / K - 1;
          checks++;
          if (!mon_in_valid) begin failures++; $display("mon_in_valid low at block %0d", mb); end
          for (int p = 0; p < K; p++) begin
            checks++;
            if (longint'(mon_in[p]) != in_hist[mb * K + p]) begin
              failures++; $display("mon_in block %0d lane %0d wrong", mb, p);
            end
          end
          cnt_mon++;
        end
        if (noise_on) cnt_noise++;
        if (wq.size() != 0) begin
          automatic logic [51:0] w = wq.pop_front();
          cfg_we = 1'b1; cfg_sel = w[51:48]; cfg_addr = w[47:32]; cfg_data = w[31:0];
          if (wq.size() == 0) begin
            cur = nxt; to_queues(cur); busy = 0; last_done = b;
          end
        end else begin
          cfg_we = 1'b0;
        end
      end

      // ---- a new input block every K fast cycles ----
      if (n % K == 0) begin
        automatic bit cmp;
        b = n / K;
        if (epoch < 3 && b == epoch_start[epoch + 1]) begin
          epoch++;
          cnt_epochs++;
          case (epoch)
            1: begin nxt = cfg_centre();   queue_cfg(nxt, 1'b1); interp = 1; end
            2: begin nxt = cfg_corner();   queue_cfg(nxt, 1'b0); interp = 0; end
            default: begin nxt = cfg_overload(); queue_cfg(nxt, 1'b0); interp = 0; end
          endcase
          busy = 1; busy_from = b;
        end
        if (epoch == 3 && b >= epoch_start[3] + epoch_len) break;
        for (int p = 0; p < K; p++)
          blk[p] = (interp && p != 0) ? '0 : M'(int'($urandom_range(2 * amp_in, 0)) - amp_in);
        cmp = !busy && (b > last_done + GUARD) &&
              !(epoch < 3 && b + GUARD >= epoch_start[epoch + 1]);
        for (int p = 0; p < K; p++) in_hist.push_back(longint'(blk[p]));
        ref_block(blk, cmp);
        if (cmp) begin
          if (cur.lut_on) cnt_lut_on++; else cnt_lut_off++;
          if (interp) cnt_interp++; else cnt_full++;
        end
      end
      serial_in = blk[n % K];
      @(negedge clk_fast);
    end

    checks++; if (cnt_lut_on == 0)  begin failures++; $display("table never used"); end
    checks++; if (cnt_lut_off == 0) begin failures++; $display("table bypass never used"); end
    checks++; if (cnt_interp == 0)  begin failures++; $display("no interpolated input"); end
    checks++; if (cnt_full == 0)    begin failures++; $display("no full-rate input"); end
    checks++; if (cnt_epochs != 3)  begin failures++; $display("reconfigurations: %0d", cnt_epochs); end
    checks++; if (cnt_mon == 0)     begin failures++; $display("monitor never checked"); end
    checks++; if (cnt_noise == 0)   begin failures++; $display("noise never on"); end
    for (int i = 0; i < 3; i++) begin
      checks++;
      if (cnt_sat[i] == 0) begin failures++; $display("stage %0d never saturated", i); end
    end
    $display("compared=%0d lut_on=%0d lut_off=%0d interp=%0d full=%0d noise=%0d sat=%0d/%0d/%0d",
             cnt_compared, cnt_lut_on, cnt_lut_off, cnt_interp, cnt_full, cnt_noise,
             cnt_sat[0], cnt_sat[1], cnt_sat[2]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
