// apb_top: asynchronous pulse blanker, complete board-level design.
//
// A full-rate (one sample per clock, 100 MHz in the built design) complex
// stream of 16+16 bits enters.  The processor (apb_processor) examines one
// sample in DECIM, keeps running estimates of the mean and variance of |x|^2
// and, through its blanking timing register, produces a blank window when a
// sample deviates by more than beta^2 times the variance.  In parallel the
// same stream goes through a FILL_LEN-sample delay FIFO (apb_fifo) so that
// the window can be applied to data that precedes the detection point and so
// that the processing latency is covered.  The start-up controller
// (apb_init_ctrl) forces statistics updates for INIT_CYCLES clocks, then
// fills the FIFO and starts it.  A micro-controller programs beta^2, the
// initial mean/variance, NWAIT, NBLANK, NSEP and the control word through
// rabbit_interface, and reads back snapshots of the mean and variance.
// apb_output_mux selects what the output bus carries (raw, mean/variance,
// blanked, or delayed data with the blank flag).
//
// Register map (byte registers, LSB first): 0 control write {force_update,
// mode[1:0]}; 1-2 beta^2; 3-5 initial mean; 6-11 initial variance; 12-13
// NWAIT; 14-15 NBLANK; 16-17 NSEP; 18 control read {apb_tmp}; 19-23 mean;
// 24-31 variance.  A value narrower than its field sits at the field's LSB;
// a wider one is carried by its MSBs.  The read-back bank is refreshed on a
// processed sample while snapshot is high.  parm_reset loads the initial
// mean and variance.  The bidirectional data bus is split into data_in,
// data_out and data_oe (the pad's tri-state enable).
//
// Timing: outputs are registered.  In the delayed modes the output is the
// input of FILL_LEN + 2 clocks earlier.  The blank flag rises (NWAIT + 8)
// processing enables (4 clocks each) after the enable that captured the
// triggering sample, and stays high for NBLANK + 1 enables; so
// FILL_LEN + 2 - 4 (NWAIT + 8) clocks of data before the pulse are blanked,
// and NWAIT must stay below about FILL_LEN / 4 - 8 for the window to reach
// the pulse at all.
// Defaults are those of the built design: N = L = 12, a 1024-word FIFO,
// 262144 start-up clocks, decimation by 4.
module apb_top
  import apb_pkg::*;
#(
  parameter int unsigned N           = N_DEFAULT,
  parameter int unsigned L           = L_DEFAULT,
  parameter int unsigned DECIM       = apb_pkg::DECIM_DEFAULT,
  parameter int unsigned FIFO_DEPTH  = 1024,
  parameter int unsigned FILL_LEN    = FIFO_DEPTH - 1,
  parameter int unsigned INIT_CYCLES = 262144
) (
  input  logic              clk,
  input  logic              rst,
  // sample stream
  input  logic [15:0]       real_in,
  input  logic [15:0]       imag_in,
  output logic [15:0]       real_out,
  output logic [15:0]       imag_out,
  output logic              out_strobe,
  output logic              blank,
  // micro-controller bus
  input  logic [ADDR_W-1:0] address,
  input  logic              cs_n,
  input  logic              rd_wr,
  input  logic [7:0]        data_in,
  output logic [7:0]        data_out,
  output logic              data_oe,
  input  logic              snapshot,
  // miscellaneous control and status
  input  logic              parm_reset,
  input  logic              apb_tmp
);

  logic [NUM_WREGS-1:0][7:0] wregs;
  logic [NUM_RREGS-1:0][7:0] rregs;

  logic [2*N+L-1:0] meanx;
  logic [4*N+L-1:0] varx;
  logic             proc_blank, pulse, clock_enable;
  logic             init_force, fifo_clr, fifo_wr, fifo_rd, running;
  logic [31:0]      fifo_q;
  logic             fifo_empty, fifo_full;
  logic [$clog2(FIFO_DEPTH+1)-1:0] fifo_used;

  // ---- register fields --------------------------------------------------
  logic [7:0]         ctrl_w;
  logic [BETA2_MAXW-1:0]    beta2_f;
  logic [MEAN_RST_MAXW-1:0] mean_rst_f;
  logic [VAR_RST_MAXW-1:0]  var_rst_f;
  logic [MEANX_MAXW-1:0]    meanx_f;
  logic [VARX_MAXW-1:0]     varx_f;
  logic [L-1:0]       beta2;
  logic [2*N-1:0]     mean_reset;
  logic [4*N-1:0]     var_reset;
  logic [CNT_W-1:0]   nwait, nblank, nsep;

  assign ctrl_w     = wregs[REG_CTRL_W];
  assign beta2_f    = {wregs[REG_BETA2+1], wregs[REG_BETA2]};
  assign mean_rst_f = {wregs[REG_MEAN_RST+2], wregs[REG_MEAN_RST+1], wregs[REG_MEAN_RST]};
  assign var_rst_f  = {wregs[REG_VAR_RST+5], wregs[REG_VAR_RST+4], wregs[REG_VAR_RST+3],
                       wregs[REG_VAR_RST+2], wregs[REG_VAR_RST+1], wregs[REG_VAR_RST]};
  assign nwait      = {wregs[REG_NWAIT+1],  wregs[REG_NWAIT]};
  assign nblank     = {wregs[REG_NBLANK+1], wregs[REG_NBLANK]};
  assign nsep       = {wregs[REG_NSEP+1],   wregs[REG_NSEP]};

  // Field -> value: LSB-aligned when it fits, else the field gives the MSBs.
  if (L <= BETA2_MAXW) begin : g_beta_lsb
    assign beta2 = beta2_f[L-1:0];
  end else begin : g_beta_msb
    assign beta2 = {beta2_f, {(L-BETA2_MAXW){1'b0}}};
  end
  if (2*N <= MEAN_RST_MAXW) begin : g_mrst_lsb
    assign mean_reset = mean_rst_f[2*N-1:0];
  end else begin : g_mrst_msb
    assign mean_reset = {mean_rst_f, {(2*N-MEAN_RST_MAXW){1'b0}}};
  end
  if (4*N <= VAR_RST_MAXW) begin : g_vrst_lsb
    assign var_reset = var_rst_f[4*N-1:0];
  end else begin : g_vrst_msb
    assign var_reset = {var_rst_f, {(4*N-VAR_RST_MAXW){1'b0}}};
  end

  // Value -> field: zero-extended when it fits, else its MSBs.
  if (2*N+L <= MEANX_MAXW) begin : g_meanx_lsb
    assign meanx_f = MEANX_MAXW'(meanx);
  end else begin : g_meanx_msb
    assign meanx_f = meanx[2*N+L-1 -: MEANX_MAXW];
  end
  if (4*N+L <= VARX_MAXW) begin : g_varx_lsb
    assign varx_f = VARX_MAXW'(varx);
  end else begin : g_varx_msb
    assign varx_f = varx[4*N+L-1 -: VARX_MAXW];
  end

  always_comb begin
    rregs    = '0;
    rregs[0] = {7'b0, apb_tmp};
    for (int i = 0; i < MEANX_MAXW / 8; i++) rregs[REG_MEANX - REG_CTRL_R + i] = meanx_f[8*i +: 8];
    for (int i = 0; i < VARX_MAXW / 8; i++)  rregs[REG_VARX - REG_CTRL_R + i]  = varx_f[8*i +: 8];
  end

  // ---- blocks -----------------------------------------------------------
  rabbit_interface u_regs (
    .clk, .rst, .address, .cs_n, .rd_wr, .data_in, .data_out, .data_oe,
    .get_meanvar (clock_enable && snapshot),
    .from_proc   (rregs),
    .to_proc     (wregs)
  );

  apb_init_ctrl #(.INIT_CYCLES(INIT_CYCLES), .FILL_LEN(FILL_LEN)) u_init (
    .clk, .rst,
    .force_updates (init_force),
    .fifo_clr, .fifo_wr, .fifo_rd, .running
  );

  apb_processor #(.N(N), .L(L), .IN_W(16), .DECIM(DECIM), .CNT_W(CNT_W)) u_proc (
    .clk, .rst, .real_in, .imag_in,
    .load_parm     (parm_reset),
    .beta2, .mean_reset, .var_reset,
    .force_updates (init_force || ctrl_w[CTRL_FORCE_UPDATE]),
    .nwait, .nblank, .nsep,
    .meanx, .varx,
    .blank         (proc_blank),
    .pulse, .clock_enable
  );

  apb_fifo #(.WIDTH(32), .DEPTH(FIFO_DEPTH)) u_fifo (
    .clk,
    .clr   (fifo_clr),
    .wrreq (fifo_wr),
    .data  ({imag_in, real_in}),
    .rdreq (fifo_rd),
    .q     (fifo_q),
    .empty (fifo_empty),
    .full  (fifo_full),
    .usedw (fifo_used)
  );

  apb_output_mux #(.N(N), .L(L)) u_out (
    .clk, .rst,
    .mode         (apb_mode_e'(ctrl_w[CTRL_MODE_LSB +: 2])),
    .real_in, .imag_in, .fifo_q,
    .blank        (proc_blank),
    .clock_enable, .meanx, .varx,
    .real_out, .imag_out,
    .blank_out    (blank),
    .out_strobe
  );

  // Once running, the FIFO is a fixed-length delay line.
  property p_fifo_level;
    @(posedge clk) disable iff (rst) running |-> (int'(fifo_used) == FILL_LEN);
  endproperty
  assert property (p_fifo_level);

  initial assert (FILL_LEN >= 1 && FILL_LEN <= FIFO_DEPTH)
    else $error("FILL_LEN must be between 1 and FIFO_DEPTH");

endmodule
