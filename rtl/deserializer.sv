// deserializer: serial-to-parallel (S/P) converter at the emulator input.
//
// A stream of M-bit samples arrives on din, one per rising edge of
// clk_fast. Every K samples are collected into one word of K lanes, lane 0
// holding the earliest sample, and handed to the core clock domain, which
// runs K times slower. This is the de-serialize mode of the SERDES: K
// M-bit symbols in, K parallel paths of M bits out, input clock K times
// faster than the output clock.
//
// Clocking: clk_fast and clk_core come from one frequency synthesizer and
// are phase aligned (every K-th rising edge of clk_fast coincides with a
// rising edge of clk_core). rst is synchronous in both domains and must be
// released in the clk_fast cycle that ends with a clk_core rising edge, so
// that the phase counter starts at 0 on a core edge. Samples taken on fast
// edges e0..e(K-1) of a core cycle appear on lanes after the next clk_core
// edge (one core cycle of latency). The fast domain changes word only on
// the last fast edge of a core cycle, so the core side never samples it
// while it changes. The phase alignment rule and the lane order are this
// design's choices; the SERDES function follows the described system.
module deserializer #(
  parameter int unsigned K = owc_pkg::K_DEF,
  parameter int unsigned M = owc_pkg::M_DEF
) (
  input  logic                clk_fast,
  input  logic                clk_core,
  input  logic                rst,
  input  logic signed [M-1:0] din,
  output logic signed [M-1:0] lanes [K],
  output logic                valid
);

  localparam int unsigned CW = (K > 1) ? $clog2(K) : 1;

  logic [CW-1:0]       cnt;
  logic signed [M-1:0] shreg [K];
  logic signed [M-1:0] word  [K];
  logic                word_valid;

  // Fast domain: phase counter, sample capture and word hand-off.
  always_ff @(posedge clk_fast) begin
    if (rst) begin
      cnt        <= '0;
      word_valid <= 1'b0;
      for (int i = 0; i < K; i++) begin
        shreg[i] <= '0;
        word[i]  <= '0;
      end
    end else begin
      shreg[cnt] <= din;
      if (cnt == CW'(K - 1)) begin
        cnt        <= '0;
        word_valid <= 1'b1;
        for (int i = 0; i < K - 1; i++) word[i] <= shreg[i];
        word[K-1]  <= din;
      end else begin
        cnt <= cnt + 1'b1;
      end
    end
  end

  // Core domain: parallel output register.
  always_ff @(posedge clk_core) begin
    if (rst) begin
      valid <= 1'b0;
      for (int i = 0; i < K; i++) lanes[i] <= '0;
    end else begin
      valid <= word_valid;
      lanes <= word;
    end
  end

  a_cnt_range: assert property (@(posedge clk_fast) disable iff (rst) int'(cnt) < int'(K))
    else $error("deserializer phase counter out of range");

endmodule
