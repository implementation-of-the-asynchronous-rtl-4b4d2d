// apb_pkg: shared constants and types of the asynchronous pulse blanker.
//
// The blanker looks at a complex baseband stream, keeps exponentially
// weighted estimates of the mean and the variance of |x|^2, and flags a
// sample as interference when its squared deviation from the mean exceeds
// beta^2 times the variance.  The flag then blanks a window of a delayed copy
// of the data.  This package holds the default sizes (N = L = 12, the
// configuration that was built and tested), the register map of the 8-bit
// micro-controller port and the output mode encoding.  Everything here follows
// the register table and control-bit table of the design; the enum names are
// this implementation's own.
package apb_pkg;

  // Default data path sizes: N = width of the processed I/Q samples,
  // L = width of the fractional part and of beta^2.
  localparam int unsigned N_DEFAULT = 12;
  localparam int unsigned L_DEFAULT = 12;

  // Decimation: one input sample in four is processed.
  localparam int unsigned DECIM_DEFAULT = 4;

  // Blanking timer counters are 16 bits wide (NWAIT, NBLANK, NSEP).
  localparam int unsigned CNT_W = 16;

  // Register interface: 18 read/write registers, 14 read-only ones.
  localparam int unsigned NUM_WREGS = 18;
  localparam int unsigned NUM_RREGS = 14;
  localparam int unsigned ADDR_W    = 5;

  // Register addresses (byte registers, least significant byte first).
  localparam int unsigned REG_CTRL_W   = 0;   // control write
  localparam int unsigned REG_BETA2    = 1;   // 1..2   beta^2
  localparam int unsigned REG_MEAN_RST = 3;   // 3..5   initial mean
  localparam int unsigned REG_VAR_RST  = 6;   // 6..11  initial variance
  localparam int unsigned REG_NWAIT    = 12;  // 12..13
  localparam int unsigned REG_NBLANK   = 14;  // 14..15
  localparam int unsigned REG_NSEP     = 16;  // 16..17
  localparam int unsigned REG_CTRL_R   = 18;  // control read
  localparam int unsigned REG_MEANX    = 19;  // 19..23 current mean
  localparam int unsigned REG_VARX     = 24;  // 24..31 current variance

  // Maximum field widths held by the register map.
  localparam int unsigned BETA2_MAXW    = 16;
  localparam int unsigned MEAN_RST_MAXW = 24;
  localparam int unsigned VAR_RST_MAXW  = 48;
  localparam int unsigned MEANX_MAXW    = 40;
  localparam int unsigned VARX_MAXW     = 64;

  // Control write register bits.
  localparam int unsigned CTRL_MODE_LSB     = 0;  // APB_MODE_0, APB_MODE_1
  localparam int unsigned CTRL_FORCE_UPDATE = 2;  // FORCE_UPDATE

  // Output modes, selected by APB_MODE_1..0.
  typedef enum logic [1:0] {
    MODE_RAW       = 2'b00,  // input passed straight through
    MODE_MEAN_VAR  = 2'b01,  // 15 bits of mean, 16 of variance, blank flag
    MODE_BLANKED   = 2'b10,  // delayed data, zeroed while blanking
    MODE_DATA_FLAG = 2'b11   // delayed data, blank flag in imaginary LSB
  } apb_mode_e;

  // Blanking timing register state machines share one state encoding:
  // idle, counting the first interval, counting the second interval.
  typedef enum logic [1:0] {
    BTR_IDLE   = 2'd0,
    BTR_FIRST  = 2'd1,
    BTR_SECOND = 2'd2
  } btr_state_e;

  // Start-up / FIFO fill controller states.
  typedef enum logic [2:0] {
    INIT_RESET_ALL = 3'd0,  // after reset
    INIT_FORCE     = 3'd1,  // force mean/variance updates while they settle
    INIT_FIFO_RST  = 3'd2,  // clear the FIFO
    INIT_FILL      = 3'd3,  // write only, until the FIFO holds FILL_LEN words
    INIT_RUN       = 3'd4   // write and read every clock
  } init_state_e;

endpackage
