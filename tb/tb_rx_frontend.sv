// tb_rx_frontend: self-checking testbench of the receiver model
// (photodetector followed by the TIA filter).
//
// After the transparent reset state (where W-bit inputs saturate to the
// M-bit output), the photodetector gets a gain and noise, and the TIA a
// random response with the shift that scales the wide channel samples back
// to M bits. Every lane is compared with the reference chain (PD transfer
// with the LFSR noise model, then the FIR model); latency is three core
// cycles. Saturation and noise use are counted.
module tb_rx_frontend;
  import owc_pkg::*;
  import owc_ref_pkg::*;
  localparam int unsigned K = 4, W = 20, M = 10, TAPS = 4, L = 3;
  localparam logic [31:0] SEED = 32'h0BAD_F00D;

  logic clk = 1'b0, rst = 1'b1, in_valid = 1'b0, out_valid, noise_on, sat;
  cfg_wr_t cfg = '0;
  logic signed [W-1:0] x [K];
  logic signed [M-1:0] y [K];

  rx_frontend #(.K(K), .W(W), .M(M), .COEF_W(16), .TAPS(TAPS), .SEED(SEED)) dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0, sat_seen = 0, noisy = 0;
  longint gain = 1, amp = 0;
  int sh = 0, tsh = 0;
  logic [31:0] st [K];
  longint ps [$];
  longint h [$];
  longint exp_q [$];
  bit exp_s [$];
  logic [L-1:0] vh = '0;

  initial begin
    #400000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wr(logic [15:0] a, logic [31:0] d);
    @(negedge clk);
    cfg = '{we: 1'b1, addr: a, data: d};
    @(negedge clk);
    cfg.we = 1'b0;
  endtask

  task automatic cyc(bit v, int xamp);
    @(negedge clk);
    checks++;
    if (out_valid !== vh[L-1]) begin failures++; $display("valid/latency mismatch"); end
    if (out_valid) begin
      bit es = exp_s.pop_front();
      for (int p = 0; p < K; p++) begin
        longint e = exp_q.pop_front();
        checks++;
        if (longint'(y[p]) != e) begin
          failures++; $display("lane %0d: got %0d expected %0d", p, y[p], e);
        end
      end
      checks++;
      if (sat !== es) begin failures++; $display("sat mismatch"); end
      if (sat) sat_seen++;
      if (noise_on) noisy++;
    end
    vh = {vh[L-2:0], v};
    in_valid = v;
    for (int p = 0; p < K; p++) x[p] = W'(int'($urandom_range(2 * xamp, 0)) - xamp);
    if (v) begin
      bit anys = 0;
      int n0 = ps.size();
      for (int p = 0; p < K; p++) begin
        bit s = 0;
        ps.push_back(pd_ref(longint'(x[p]), gain, sh, noise_of(st[p]), amp, W, s));
        anys |= s;
        st[p] = lfsr_step(st[p]);
      end
      for (int p = 0; p < K; p++) begin
        bit s = 0;
        exp_q.push_back(fir_at(ps, h, n0 + p, tsh, M, s));
        anys |= s;
      end
      exp_s.push_back(anys);
    end
  endtask

  task automatic drain();
    repeat (L + 2) cyc(1'b0, 0);
  endtask

  initial begin
    for (int p = 0; p < K; p++) begin x[p] = '0; st[p] = lfsr_seed(SEED, p); end
    h.push_back(1);
    for (int j = 1; j < TAPS; j++) h.push_back(0);
    repeat (3) @(negedge clk);
    rst = 1'b0;
    repeat (30) cyc(1'b1, 2000);      // in and out of the M-bit range
    drain();
    gain = 7000; sh = 12; amp = 2000;
    wr({SUB_A, 10'h0, PD_REG_GAIN}, 32'(gain));
    wr({SUB_A, 10'h0, PD_REG_SHIFT}, 32'(sh));
    wr({SUB_A, 10'h0, PD_REG_NOISE}, 32'(amp));
    for (int j = 0; j < TAPS; j++) begin
      h[j] = longint'(int'($urandom_range(30000, 0)) - 10000);
      wr({SUB_FIR, 14'(j)}, 32'(h[j]));
    end
    tsh = 18;
    wr({SUB_FIR, 14'h1000}, 32'(tsh));
    repeat (300) cyc($urandom_range(4, 0) != 0, 500000);
    drain();
    checks++;
    if (sat_seen == 0) begin failures++; $display("saturation never happened"); end
    checks++;
    if (noisy == 0) begin failures++; $display("noise never on"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
