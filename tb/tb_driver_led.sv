// tb_driver_led: self-checking testbench of the transmitter model.
//
// Checks, against the reference models, the transparent reset state, then
// a loaded random non-linearity table followed by a random FIR response
// with normalization shift, and finally the table switched off again
// (mode switch) with the FIR kept. Latency is three core cycles; the test
// also counts FIR saturation, which the large coefficients provoke.
module tb_driver_led;
  import owc_pkg::*;
  import owc_ref_pkg::*;
  localparam int unsigned K = 4, M = 10, AW = 10, TAPS = 5, L = 3;

  logic clk = 1'b0, rst = 1'b1, in_valid = 1'b0, out_valid, lut_en, sat;
  cfg_wr_t cfg = '0;
  logic signed [M-1:0] x [K];
  logic signed [M-1:0] y [K];

  driver_led #(.K(K), .M(M), .COEF_W(16), .AW(AW), .TAPS(TAPS)) dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0, sat_seen = 0;
  logic [M-1:0] tbl [2**AW];
  longint xs [$];
  longint h [$];
  int sh = 0;
  bit en_ref = 0;
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

  task automatic cyc(bit v);
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
    vh = {vh[L-2:0], v};
    in_valid = v;
    for (int p = 0; p < K; p++) x[p] = M'($urandom);
    if (v) begin
      bit anys = 0;
      int n0 = xs.size();
      for (int p = 0; p < K; p++) begin
        int idx = (int'(x[p]) + (1 << (M - 1))) >> (M - AW);
        xs.push_back(en_ref ? longint'($signed(tbl[idx])) : longint'(x[p]));
      end
      for (int p = 0; p < K; p++) begin
        bit s = 0;
        exp_q.push_back(fir_at(xs, h, n0 + p, sh, M, s));
        anys |= s;
      end
      exp_s.push_back(anys);
    end
  endtask

  task automatic drain();
    repeat (L + 2) cyc(1'b0);
  endtask

  initial begin
    for (int p = 0; p < K; p++) x[p] = '0;
    h.push_back(1);
    for (int j = 1; j < TAPS; j++) h.push_back(0);
    repeat (3) @(negedge clk);
    rst = 1'b0;
    // transparent after reset
    repeat (20) cyc(1'b1);
    drain();
    checks++;
    if (lut_en) begin failures++; $display("LUT enabled after reset"); end
    // load a random table and a random frequency response
    for (int i = 0; i < 2**AW; i++) begin
      tbl[i] = M'($urandom);
      wr({SUB_A, 14'(i)}, 32'(tbl[i]));
    end
    for (int j = 0; j < TAPS; j++) begin
      h[j] = longint'(int'($urandom_range(16000, 0)) - 8000);
      wr({SUB_FIR, 14'(j)}, 32'(h[j]));
    end
    sh = 11;
    wr({SUB_FIR, 14'h1000}, 32'(sh));
    wr({SUB_CTRL, 14'h0}, 32'h1);
    en_ref = 1;
    checks++;
    if (!lut_en) begin failures++; $display("LUT enable not set"); end
    repeat (200) cyc($urandom_range(3, 0) != 0);
    drain();
    // switch the table off, keep the FIR
    wr({SUB_CTRL, 14'h0}, 32'h0);
    en_ref = 0;
    repeat (100) cyc(1'b1);
    drain();
    checks++;
    if (sat_seen == 0) begin failures++; $display("saturation never happened"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
