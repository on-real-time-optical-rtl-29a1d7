// owc_pkg: constants and types shared by the optical wireless channel
// emulator.
//
// The emulator processes K parallel samples per core clock, so that the
// sample rate seen by the channel model is K * f_clk (K = 8 at
// f_clk = 250 MHz gives 0.5 ns time resolution). M is the sample width on
// the lanes, COEF_W (R) the coefficient width. The widths M and R and the
// configuration bus are this design's own choices; K and f_clk follow the
// described system.
//
// Configuration bus: the supervising processor writes coefficients and
// control registers with single-cycle writes (cfg_wr_t). Each block decodes
// a 16-bit local address; the top adds a 4-bit block select.
package owc_pkg;

  localparam int unsigned K_DEF      = 8;   // parallel lanes (polyphase factor)
  localparam int unsigned M_DEF      = 12;  // lane sample width
  localparam int unsigned COEF_W_DEF = 16;  // coefficient width R
  localparam int unsigned CFG_AW     = 16;  // local configuration address width
  localparam int unsigned CFG_DW     = 32;  // configuration data width

  // Single-cycle register/coefficient write, local to one block.
  typedef struct packed {
    logic              we;
    logic [CFG_AW-1:0] addr;
    logic [CFG_DW-1:0] data;
  } cfg_wr_t;

  // Block select on the top-level configuration bus.
  typedef enum logic [3:0] {
    SEL_DRIVER  = 4'd0,
    SEL_CHANNEL = 4'd1,
    SEL_RX      = 4'd2
  } cfg_sel_e;

  // Local address map of poly_fir: bit 12 clear selects coefficient
  // addr[11:0], bit 12 set selects the normalization shift register.
  localparam int unsigned FIR_SHIFT_BIT = 12;

  // Local address map of driver_led and rx_frontend: addr[15:14].
  localparam logic [1:0] SUB_A    = 2'b00;  // LUT (driver) / PD registers (rx)
  localparam logic [1:0] SUB_FIR  = 2'b01;  // embedded FIR
  localparam logic [1:0] SUB_CTRL = 2'b10;  // control register (driver)

  // PD register offsets inside SUB_A of rx_frontend.
  localparam logic [3:0] PD_REG_GAIN   = 4'd0;  // responsivity gain (signed)
  localparam logic [3:0] PD_REG_SHIFT  = 4'd1;  // gain shift
  localparam logic [3:0] PD_REG_NOISE  = 4'd2;  // noise amplitude (unsigned)

endpackage
