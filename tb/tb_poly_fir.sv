// tb_poly_fir: self-checking testbench of the K-lane polyphase FIR.
//
// Drives random sample blocks (with gaps in in_valid) through three
// configurations: the reset state (unit impulse), a random impulse
// response with a normalization shift, and large coefficients that force
// saturation. A reference model keeps every accepted sample and computes
// y(nK+p) = sat((sum_j h(j) x(nK+p-j)) >>> shift) independently of the
// design. It also checks the two-cycle latency (out_valid two cycles after
// in_valid), the sat flag, and an interpolated input (only lane 0 set),
// where lane p must equal phase filter h_p = h(tK+p) applied to lane 0.
// A second instance built in the interpolator form (INTERP = 1) receives
// only the interpolated blocks and is checked against the same model.
module tb_poly_fir;
  import owc_pkg::*;

  localparam int unsigned K = 4, IN_W = 12, COEF_W = 16, TAPS = 7, OUT_W = 20;

  logic clk = 1'b0, rst = 1'b1;
  cfg_wr_t cfg;
  logic in_valid, out_valid, sat;
  logic signed [IN_W-1:0]  x [K];
  logic signed [OUT_W-1:0] y [K];

  poly_fir #(.K(K), .IN_W(IN_W), .COEF_W(COEF_W), .TAPS(TAPS), .OUT_W(OUT_W)) dut (.*);

  // Interpolator form, fed only the interpolated blocks.
  logic in_valid_i, out_valid_i, sat_i;
  logic signed [OUT_W-1:0] y_i [K];
  poly_fir #(.K(K), .IN_W(IN_W), .COEF_W(COEF_W), .TAPS(TAPS), .OUT_W(OUT_W), .INTERP(1'b1)) dut_i (
    .clk, .rst, .cfg, .in_valid(in_valid_i), .x,
    .out_valid(out_valid_i), .y(y_i), .sat(sat_i)
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0, sat_seen = 0;
  longint h [TAPS];
  int     sh;
  longint xs [$];
  logic [2:0] vhist;            // in_valid driven 1, 2 ... cycles ago
  longint exp_q [$];
  longint xs_i [$];
  longint exp_i [$];
  logic [2:0] vhist_i;
  int interp_checked = 0;
  bit     exp_sat_q [$];

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint sat_val(longint v, output bit s);
    longint mx = (longint'(1) <<< (OUT_W - 1)) - 1;
    longint mn = -(longint'(1) <<< (OUT_W - 1));
    s = 0;
    if (v > mx) begin s = 1; return mx; end
    if (v < mn) begin s = 1; return mn; end
    return v;
  endfunction

  // Reference: called when a block is accepted (after pushing its samples).
  task automatic push_expected();
    longint e [K];
    bit anysat = 0, s;
    int n0 = xs.size() - K;
    for (int p = 0; p < K; p++) begin
      longint acc = 0;
      for (int j = 0; j < TAPS; j++)
        if (n0 + p - j >= 0) acc += h[j] * xs[n0 + p - j];
      e[p] = sat_val(acc >>> sh, s);
      anysat |= s;
    end
    for (int p = 0; p < K; p++) exp_q.push_back(e[p]);
    exp_sat_q.push_back(anysat);
  endtask

  task automatic cfg_write(logic [15:0] a, logic [31:0] d);
    @(negedge clk);
    cfg = '{we: 1'b1, addr: a, data: d};
    @(negedge clk);
    cfg.we = 1'b0;
  endtask

  task automatic load(int shift_v);
    for (int j = 0; j < TAPS; j++) cfg_write(16'(j), 32'(h[j]));
    cfg_write(16'h1000, 32'(shift_v));
    sh = shift_v;
  endtask

  // One cycle of stimulus; lane0_only makes an interpolated block.
  task automatic cycle(bit v, bit lane0_only, int amp);
    @(negedge clk);
    // check what the last posedge produced
    if (out_valid !== vhist[1]) begin
      failures++; $display("latency/valid mismatch at %0t", $time);
    end
    checks++;
    if (out_valid) begin
      longint e;
      bit es;
      es = exp_sat_q.pop_front();
      for (int p = 0; p < K; p++) begin
        e = exp_q.pop_front();
        checks++;
        if (longint'(y[p]) != e) begin
          failures++;
          $display("lane %0d: got %0d expected %0d", p, y[p], e);
        end
      end
      checks++;
      if (sat !== es) begin failures++; $display("sat flag mismatch"); end
      if (sat) sat_seen++;
    end
    checks++;
    if (out_valid_i !== vhist_i[1]) begin failures++; $display("interpolator latency/valid mismatch"); end
    if (out_valid_i) begin
      for (int p = 0; p < K; p++) begin
        longint e = exp_i.pop_front();
        checks++;
        if (longint'(y_i[p]) != e) begin
          failures++;
          $display("interpolator lane %0d: got %0d expected %0d", p, y_i[p], e);
        end
      end
      interp_checked++;
    end
    vhist_i = {vhist_i[1:0], v && lane0_only};
    in_valid_i = v && lane0_only;
    vhist = {vhist[1:0], v};
    in_valid = v;
    for (int q = 0; q < K; q++) begin
      x[q] = (lane0_only && q != 0) ? '0 : IN_W'(int'($urandom_range(2 * amp, 0)) - amp);
    end
    if (v) begin
      for (int q = 0; q < K; q++) xs.push_back(longint'(x[q]));
      push_expected();
      if (lane0_only) begin
        int n0;
        for (int q = 0; q < K; q++) xs_i.push_back(longint'(x[q]));
        n0 = xs_i.size() - K;
        for (int p = 0; p < K; p++) begin
          longint acc = 0;
          bit s;
          for (int j = 0; j < TAPS; j++)
            if (n0 + p - j >= 0) acc += h[j] * xs_i[n0 + p - j];
          exp_i.push_back(sat_val(acc >>> sh, s));
        end
      end
    end
  endtask

  task automatic drain();
    for (int i = 0; i < 4; i++) cycle(1'b0, 1'b0, 0);
  endtask

  initial begin
    cfg = '0; in_valid = 0; vhist = '0; vhist_i = '0; in_valid_i = 0;
    for (int q = 0; q < K; q++) x[q] = '0;
    for (int j = 0; j < TAPS; j++) h[j] = (j == 0) ? 1 : 0;
    sh = 0;
    repeat (3) @(negedge clk);
    rst = 1'b0;

    // 1) reset state: unit impulse, output equals input
    for (int i = 0; i < 30; i++) cycle(1'b1, 1'b0, 2047);
    drain();

    // 2) random impulse response, normalization shift 6
    for (int j = 0; j < TAPS; j++) h[j] = longint'(int'($urandom_range(20000, 0)) - 10000);
    load(6);
    for (int i = 0; i < 200; i++) cycle(($urandom_range(3, 0) != 0), 1'b0, 2047);
    drain();

    // 3) interpolated input: lane p must follow phase filter h_p
    for (int i = 0; i < 60; i++) cycle(1'b1, 1'b1, 2047);
    drain();

    // 4) large coefficients, no shift: saturation
    for (int j = 0; j < TAPS; j++) h[j] = (j % 2 == 1) ? -32000 : 32000;
    load(0);
    for (int i = 0; i < 60; i++) cycle(1'b1, 1'b0, 2047);
    drain();

    checks++;
    if (sat_seen == 0) begin failures++; $display("saturation never happened"); end
    checks++;
    if (interp_checked == 0) begin failures++; $display("interpolator never checked"); end
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("outputs missing"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
