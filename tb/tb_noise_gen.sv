// tb_noise_gen: self-checking testbench of the per-lane noise source.
//
// Each lane is compared with an independent model of its LFSR and noise
// mapping, both while stepping and while held (step low). The test also
// checks that the lanes differ, that the sample mean is near zero and that
// every value lies in [-510, 510].
module tb_noise_gen;
  import owc_ref_pkg::*;
  localparam int unsigned K = 4;
  localparam logic [31:0] SEED = 32'h1234_5678;

  logic clk = 1'b0, rst = 1'b1, step = 1'b0;
  logic signed [10:0] noise [K];

  noise_gen #(.K(K), .SEED(SEED)) dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic [31:0] st [K];
  longint sum = 0;
  int n = 0, same = 0;

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int p = 0; p < K; p++) st[p] = lfsr_seed(SEED, p);
    repeat (3) @(negedge clk);
    rst = 1'b0;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      for (int p = 0; p < K; p++) begin
        checks++;
        if (int'(noise[p]) != noise_of(st[p])) begin
          failures++;
          $display("cycle %0d lane %0d: got %0d expected %0d", i, p, noise[p], noise_of(st[p]));
        end
        checks++;
        if (noise[p] > 510 || noise[p] < -510) begin failures++; $display("out of range"); end
        sum += noise[p];
        n++;
      end
      if (noise[0] == noise[1]) same++;
      // decide the step for the next edge
      step = ($urandom_range(4, 0) != 0);
      if (step) for (int p = 0; p < K; p++) st[p] = lfsr_step(st[p]);
    end
    checks++;
    if (same > 100) begin failures++; $display("lanes 0 and 1 too alike: %0d", same); end
    checks++;
    if (sum / n > 10 || sum / n < -10) begin failures++; $display("mean %0d", sum / n); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
