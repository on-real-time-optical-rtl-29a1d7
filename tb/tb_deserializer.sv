// tb_deserializer: self-checking testbench of the S/P converter.
//
// One process generates phase-aligned clocks (clk_core = clk_fast / K).
// Reset is released in the fast cycle that ends on a core edge; from then
// on a random sample is driven every fast cycle. Block b (samples
// bK .. bK+K-1) must be on the lanes, lane 0 first, for the whole core
// cycle that starts K*(b+1) fast edges after the first sample, with valid
// high; valid must be low before that.
module tb_deserializer;
  localparam int unsigned K = 4, M = 8;

  logic clk_fast = 1'b0, clk_core = 1'b0, rst = 1'b1;
  logic signed [M-1:0] din = '0;
  logic signed [M-1:0] lanes [K];
  logic valid;
  int   ph = 0;

  deserializer #(.K(K), .M(M)) dut (.*);

  initial forever begin
    clk_fast = 1'b1;
    if (ph == 0)         clk_core = 1'b1;
    if (ph == int'(K/2)) clk_core = 1'b0;
    #1 clk_fast = 1'b0;
    #1 ph = (ph + 1) % K;
  end

  int checks = 0, failures = 0;
  logic signed [M-1:0] s [$];

  initial begin
    #20000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5) @(negedge clk_fast);
    while (ph != int'(K) - 1) @(negedge clk_fast);
    rst = 1'b0;
    for (int n = 0; n < 400; n++) begin
      // n-th negedge after release: check, then drive sample n
      if (n >= int'(K) + 1 && (n - 1) % int'(K) == 0) begin
        automatic int b = (n - 1) / int'(K) - 1;
        checks++;
        if (!valid) begin failures++; $display("valid low at block %0d", b); end
        for (int p = 0; p < int'(K); p++) begin
          checks++;
          if (lanes[p] !== s[b * K + p]) begin
            failures++;
            $display("block %0d lane %0d: got %0d expected %0d", b, p, lanes[p], s[b * K + p]);
          end
        end
      end else if (n <= int'(K)) begin
        checks++;
        if (valid) begin failures++; $display("valid too early at %0d", n); end
      end
      din = M'($urandom);
      s.push_back(din);
      @(negedge clk_fast);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
