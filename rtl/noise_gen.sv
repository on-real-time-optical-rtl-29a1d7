// noise_gen: per-lane pseudo-random noise source for the receiver model
// (the ambient-light shot-noise term added at the receiver).
//
// Each lane owns a 32-bit Galois LFSR (polynomial x^32+x^22+x^2+x+1, mask
// 32'h80200003, shifting right). Its four bytes are summed and centred:
// n = b0+b1+b2+b3-510, a zero-mean value in [-510, 510] whose distribution
// (sum of four uniform variables) approximates a Gaussian. When step is
// high the LFSR advances by 32 shifts, so successive samples use fresh
// bits. Lane p is seeded with SEED ^ (p * 32'h9E3779B9) (1 if that is 0).
//
// Timing: noise shows the current state; it changes one cycle after a
// cycle with step high. The generator type, its distribution and seeds are
// this design's choices; the source only calls for an added noise term.
module noise_gen #(
  parameter int unsigned K    = owc_pkg::K_DEF,
  parameter logic [31:0] SEED = 32'hACE1_2468
) (
  input  logic               clk,
  input  logic               rst,
  input  logic               step,
  output logic signed [10:0] noise [K]
);

  localparam logic [31:0] MASK = 32'h8020_0003;

  logic [31:0] state [K];
  logic [31:0] nxt   [K];

  function automatic logic [31:0] lane_seed(int unsigned p);
    logic [31:0] s;
    s = SEED ^ (32'(p) * 32'h9E37_79B9);
    return (s == '0) ? 32'd1 : s;
  endfunction

  always_comb begin
    for (int p = 0; p < K; p++) begin
      logic [31:0] s;
      s = state[p];
      for (int i = 0; i < 32; i++) s = (s >> 1) ^ (s[0] ? MASK : 32'h0);
      nxt[p]   = s;
      noise[p] = $signed({1'b0, 10'(10'(state[p][7:0]) + 10'(state[p][15:8]) +
                                    10'(state[p][23:16]) + 10'(state[p][31:24]))}) - 11'sd510;
    end
  end

  always_ff @(posedge clk) begin
    for (int p = 0; p < K; p++) begin
      if (rst)       state[p] <= lane_seed(p);
      else if (step) state[p] <= nxt[p];
    end
  end

endmodule
