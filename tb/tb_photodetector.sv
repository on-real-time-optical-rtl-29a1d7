// tb_photodetector: self-checking testbench of the photodetector model.
//
// Checks the transparent reset state, then a programmed responsivity gain
// and shift without noise, then with the noise source on, against the
// reference transfer (gain, shift, noise from an independent LFSR model,
// saturation). Gaps in in_valid check that the noise only advances on
// accepted blocks. Latency is one core cycle. Saturation is provoked with
// a large gain and counted.
module tb_photodetector;
  import owc_pkg::*;
  import owc_ref_pkg::*;
  localparam int unsigned K = 4, W = 20, L = 1;
  localparam logic [31:0] SEED = 32'hCAFE_0001;

  logic clk = 1'b0, rst = 1'b1, in_valid = 1'b0, out_valid, noise_on, sat;
  cfg_wr_t cfg = '0;
  logic signed [W-1:0] x [K];
  logic signed [W-1:0] y [K];

  photodetector #(.K(K), .W(W), .SEED(SEED)) dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0, sat_seen = 0;
  longint gain = 1, amp = 0;
  int sh = 0;
  logic [31:0] st [K];
  longint exp_q [$];
  bit exp_s [$];
  logic [L:0] vh = '0;

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
    end
    vh = {vh[L-1:0], v};
    in_valid = v;
    for (int p = 0; p < K; p++) x[p] = W'(int'($urandom_range(2 * xamp, 0)) - xamp);
    if (v) begin
      bit anys = 0;
      for (int p = 0; p < K; p++) begin
        bit s = 0;
        exp_q.push_back(pd_ref(longint'(x[p]), gain, sh, noise_of(st[p]), amp, W, s));
        anys |= s;
        st[p] = lfsr_step(st[p]);
      end
      exp_s.push_back(anys);
    end
  endtask

  task automatic drain();
    repeat (3) cyc(1'b0, 0);
  endtask

  initial begin
    for (int p = 0; p < K; p++) begin x[p] = '0; st[p] = lfsr_seed(SEED, p); end
    repeat (3) @(negedge clk);
    rst = 1'b0;
    repeat (20) cyc(1'b1, 300000);
    drain();
    checks++;
    if (noise_on) begin failures++; $display("noise on after reset"); end
    gain = -1234 + 5000; sh = 9;
    wr(16'(PD_REG_GAIN), 32'(gain));
    wr(16'(PD_REG_SHIFT), 32'(sh));
    repeat (100) cyc($urandom_range(2, 0) != 0, 300000);
    drain();
    amp = 3000;
    wr(16'(PD_REG_NOISE), 32'(amp));
    checks++;
    if (!noise_on) begin failures++; $display("noise not on"); end
    repeat (200) cyc($urandom_range(2, 0) != 0, 300000);
    drain();
    gain = 30000; sh = 2;
    wr(16'(PD_REG_GAIN), 32'(gain));
    wr(16'(PD_REG_SHIFT), 32'(sh));
    repeat (50) cyc(1'b1, 300000);
    drain();
    checks++;
    if (sat_seen == 0) begin failures++; $display("saturation never happened"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
