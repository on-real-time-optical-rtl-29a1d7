// tb_serializer: self-checking testbench of the P/S converter.
//
// Phase-aligned clocks as in the deserializer test. A new random K-lane
// word is presented just after every core edge, as a core-domain register
// would. Word b must leave on dout lane by lane, lane 0 first, on the fast
// edges K(b+1)+p (p = 0..K-1) counted from the first core edge after
// reset, with dout_valid high; dout_valid must be low before that.
module tb_serializer;
  localparam int unsigned K = 4, M = 8;

  logic clk_fast = 1'b0, clk_core = 1'b0, rst = 1'b1;
  logic signed [M-1:0] din [K];
  logic din_valid = 1'b0;
  logic signed [M-1:0] dout;
  logic dout_valid;
  int   ph = 0;

  serializer #(.K(K), .M(M)) dut (.clk_fast, .rst, .din, .din_valid, .dout, .dout_valid);

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
    for (int p = 0; p < int'(K); p++) din[p] = '0;
    repeat (5) @(negedge clk_fast);
    while (ph != int'(K) - 1) @(negedge clk_fast);
    rst = 1'b0;
    for (int n = 0; n < 400; n++) begin
      if (n >= int'(K) + 1) begin
        automatic int b = (n - 1) / int'(K) - 1;
        automatic int p = (n - 1) % int'(K);
        checks++;
        if (!dout_valid) begin failures++; $display("dout_valid low at %0d", n); end
        checks++;
        if (dout !== s[b * K + p]) begin
          failures++;
          $display("word %0d lane %0d: got %0d expected %0d", b, p, dout, s[b * K + p]);
        end
      end else begin
        checks++;
        if (dout_valid) begin failures++; $display("dout_valid too early at %0d", n); end
      end
      if ((n - 1) % int'(K) == 0 || n == 1) begin
        din_valid = 1'b1;
        for (int p = 0; p < int'(K); p++) begin
          din[p] = M'($urandom);
          s.push_back(din[p]);
        end
      end
      @(negedge clk_fast);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
