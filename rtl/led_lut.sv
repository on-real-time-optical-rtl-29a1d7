// led_lut: look-up table modelling the static non-linearity of the LED and
// its driver, applied to all K lanes of a block in the same core cycle.
//
// The table has 2^AW entries of M bits. A signed lane sample addresses it
// in offset binary (sample + 2^(M-1)), so entry 0 belongs to the most
// negative input and entry 2^AW-1 to the most positive; with AW < M only
// the AW most significant bits address it. The single table is read by K
// ports at once (one per lane) and written one entry at a time by the
// configuration bus: addr[AW-1:0] selects the entry, data[M-1:0] is its
// value. The table is not cleared at reset; while en is low the block
// passes its input unchanged, so a table can be loaded before it is used.
//
// Timing: one core cycle of latency, out_valid follows in_valid. The
// table is the described non-linearity model; its size, addressing and the
// bypass are this design's choices.
module led_lut
  import owc_pkg::*;
#(
  parameter int unsigned K  = K_DEF,
  parameter int unsigned M  = M_DEF,
  parameter int unsigned AW = M_DEF
) (
  input  logic                clk,
  input  logic                rst,
  input  cfg_wr_t             cfg,
  input  logic                en,
  input  logic                in_valid,
  input  logic signed [M-1:0] x [K],
  output logic                out_valid,
  output logic signed [M-1:0] y [K]
);

  logic [M-1:0] table_q [2**AW];

  always_ff @(posedge clk) begin
    if (cfg.we) table_q[cfg.addr[AW-1:0]] <= cfg.data[M-1:0];
  end

  function automatic logic [AW-1:0] lut_index(logic signed [M-1:0] s);
    logic [M-1:0] ob;
    ob = {~s[M-1], s[M-2:0]};
    return ob[M-1 -: AW];
  endfunction

  always_ff @(posedge clk) begin
    if (rst) begin
      out_valid <= 1'b0;
      for (int p = 0; p < K; p++) y[p] <= '0;
    end else begin
      out_valid <= in_valid;
      for (int p = 0; p < K; p++)
        y[p] <= en ? $signed(table_q[lut_index(x[p])]) : x[p];
    end
  end

endmodule
