// serializer: parallel-to-serial (P/S) converter at the emulator output.
//
// K lanes of M bits, written by the core clock domain once per clk_core
// cycle, are sent out one lane per clk_fast cycle, lane 0 first. As in the
// described serializer, a counter on the fast clock produces the select of
// a K:1 multiplexer whose output drives a registered output buffer.
//
// Clocking: as for the deserializer, clk_fast runs K times faster than the
// core clock that writes din, phase aligned (the core clock itself is not
// needed here), and rst is released in the clk_fast cycle that
// ends with a clk_core edge. The fast domain copies din into a holding
// register on the last fast edge of each core cycle, when din has been
// stable for K-1 fast cycles. A word written on core edge c appears on
// dout lane by lane on the fast edges K..2K-1 after c (lane p valid after
// fast edge K+p). dout_valid follows din_valid with the same delay. The
// holding register and the lane order are this design's choices.
module serializer #(
  parameter int unsigned K = owc_pkg::K_DEF,
  parameter int unsigned M = owc_pkg::M_DEF
) (
  input  logic                clk_fast,
  input  logic                rst,
  input  logic signed [M-1:0] din [K],
  input  logic                din_valid,
  output logic signed [M-1:0] dout,
  output logic                dout_valid
);

  localparam int unsigned CW = (K > 1) ? $clog2(K) : 1;

  logic [CW-1:0]       sel;
  logic signed [M-1:0] hold [K];
  logic                hold_valid;
  logic signed [M-1:0] mux_out;

  assign mux_out = hold[sel];

  always_ff @(posedge clk_fast) begin
    if (rst) begin
      sel        <= '0;
      dout       <= '0;
      dout_valid <= 1'b0;
      hold_valid <= 1'b0;
      for (int i = 0; i < K; i++) hold[i] <= '0;
    end else begin
      dout       <= mux_out;
      dout_valid <= hold_valid;
      if (sel == CW'(K - 1)) begin
        sel        <= '0;
        hold       <= din;
        hold_valid <= din_valid;
      end else begin
        sel <= sel + 1'b1;
      end
    end
  end

endmodule
