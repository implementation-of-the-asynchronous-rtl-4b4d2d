// apb_processor: the asynchronous pulse blanker processor.
//
// Estimates the mean and the variance of the instantaneous power |x|^2 of a
// complex input with exponentially weighted averages and flags every
// processed sample whose squared deviation from the mean is at least beta^2
// times the variance.  A flag starts the blanking timing register, which
// freezes the statistics for a while and produces the blank window.
//
// Pipeline (every register loads only on clock_enable, one clock in DECIM):
//   stage 1  input register, i^2 and q^2 registers, |x|^2 register
//   stage 2  mean register                   (apb_mean)
//   stage 3  |x|^2 delay, difference, square (apb_var), variance register
//   stage 4  compare (apb_detect) into the blank register (apb_btr)
// Counting the enable that captures a sample as the first, the detector
// output for it is valid after the sixth enable (5 x DECIM = 20 clocks after
// capture) and the blanking timing register takes the decision at the
// seventh: seven enabled ranks, 7 x DECIM = 28 clocks from the input.  The
// blank output then rises NWAIT + 2 enables later, i.e. (NWAIT + 8) enables
// after the capture, and stays high for NBLANK + 1 enables.
//
// The processor takes the N most significant bits of each IN_W-bit input
// component.  meanx and varx are the raw registers with L fraction bits.
// load_parm loads mean_reset / var_reset (integer parts) on the next enable.
// All of this follows the design; reset is synchronous and active high.
module apb_processor #(
  parameter int unsigned N     = apb_pkg::N_DEFAULT,
  parameter int unsigned L     = apb_pkg::L_DEFAULT,
  parameter int unsigned IN_W  = 16,
  parameter int unsigned DECIM = apb_pkg::DECIM_DEFAULT,
  parameter int unsigned CNT_W = apb_pkg::CNT_W
) (
  input  logic             clk,
  input  logic             rst,
  input  logic [IN_W-1:0]  real_in,
  input  logic [IN_W-1:0]  imag_in,
  input  logic             load_parm,
  input  logic [L-1:0]     beta2,
  input  logic [2*N-1:0]   mean_reset,
  input  logic [4*N-1:0]   var_reset,
  input  logic             force_updates,
  input  logic [CNT_W-1:0] nwait,
  input  logic [CNT_W-1:0] nblank,
  input  logic [CNT_W-1:0] nsep,
  output logic [2*N+L-1:0] meanx,
  output logic [4*N+L-1:0] varx,
  output logic             blank,
  output logic             pulse,          // raw detector output
  output logic             clock_enable
);

  logic [2*N-1:0] x2;
  logic [4*N-1:0] dev2;
  logic           update_enable;

  apb_decimator #(.DECIM(DECIM)) u_decim (
    .clk, .rst, .clock_enable
  );

  apb_power #(.N(N)) u_power (
    .clk, .rst, .clock_enable,
    .x_real (real_in[IN_W-1 -: N]),
    .x_imag (imag_in[IN_W-1 -: N]),
    .x2
  );

  apb_mean #(.N(N), .L(L)) u_mean (
    .clk, .rst, .clock_enable, .update_enable, .load_parm,
    .mean_reset, .x2, .meanx
  );

  apb_var #(.N(N), .L(L)) u_var (
    .clk, .rst, .clock_enable, .update_enable, .load_parm,
    .var_reset, .x2,
    .mean_int (meanx[2*N+L-1:L]),
    .dev2, .varx
  );

  apb_detect #(.N(N), .L(L)) u_detect (
    .beta2, .dev2, .varx, .pulse
  );

  apb_btr #(.CNT_W(CNT_W)) u_btr (
    .clk, .rst, .clock_enable, .pulse, .force_updates,
    .nwait, .nblank, .nsep, .update_enable, .blank
  );

endmodule
