// tb_led_lut: self-checking testbench of the non-linearity look-up table.
//
// With M = 8 and AW = 6 the table is addressed by the six most significant
// bits of the offset-binary sample. The test checks the bypass after
// reset, loads a random table through the configuration bus, checks every
// lane against the table with one cycle of latency, and then disables the
// table again.
module tb_led_lut;
  import owc_pkg::*;
  localparam int unsigned K = 4, M = 8, AW = 6;

  logic clk = 1'b0, rst = 1'b1, en = 1'b0, in_valid = 1'b0, out_valid;
  cfg_wr_t cfg = '0;
  logic signed [M-1:0] x [K];
  logic signed [M-1:0] y [K];

  led_lut #(.K(K), .M(M), .AW(AW)) dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic [M-1:0] tbl [2**AW];
  logic signed [M-1:0] exp_y [K];
  logic exp_v;

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic signed [M-1:0] ref_y(logic signed [M-1:0] s, logic e);
    int idx = (int'(s) + (1 << (M - 1))) >> (M - AW);
    return e ? $signed(tbl[idx]) : s;
  endfunction

  task automatic step(logic e);
    @(negedge clk);
    if (exp_v) begin
      for (int p = 0; p < K; p++) begin
        checks++;
        if (y[p] !== exp_y[p]) begin
          failures++;
          $display("lane %0d: got %0d expected %0d (en=%0d)", p, y[p], exp_y[p], e);
        end
      end
    end
    checks++;
    if (out_valid !== exp_v) begin failures++; $display("out_valid mismatch"); end
    en = e;
    in_valid = 1'b1;
    for (int p = 0; p < K; p++) begin
      x[p] = M'($urandom);
      exp_y[p] = ref_y(x[p], e);
    end
    exp_v = 1'b1;
  endtask

  initial begin
    exp_v = 1'b0;
    for (int p = 0; p < K; p++) x[p] = '0;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    for (int i = 0; i < 20; i++) step(1'b0);
    @(negedge clk); in_valid = 1'b0; exp_v = 1'b0;
    for (int i = 0; i < 2**AW; i++) begin
      tbl[i] = M'($urandom);
      @(negedge clk);
      cfg = '{we: 1'b1, addr: 16'(i), data: 32'(tbl[i])};
    end
    @(negedge clk); cfg.we = 1'b0;
    @(negedge clk);
    for (int i = 0; i < 300; i++) step(1'b1);
    for (int i = 0; i < 20; i++) step(1'b0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
