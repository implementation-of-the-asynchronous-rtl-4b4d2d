// apb_output_mux: output mode selector and output registers of the blanker.
//
// The board has a 16-bit real and a 16-bit imaginary output bus.  Two control
// bits choose what drives them, so the blanker can be bypassed or debugged:
//   MODE_RAW       the full-rate input, unprocessed; blank_out is 0
//   MODE_MEAN_VAR  real = {blank, 15 integer LSBs of the mean},
//                  imag = integer bits 8..23 of the variance; the values
//                  change only once per processed sample, so out_strobe
//                  follows clock_enable in this mode
//   MODE_BLANKED   the delayed (FIFO) data, forced to zero while blank is high
//   MODE_DATA_FLAG the delayed data unblanked, except that the imaginary LSB
//                  is replaced by the blank flag
// All outputs are registered (one clock).  out_strobe is high on every clock
// in the full-rate modes.  The mode set, the mean/variance bit positions
// (for N = L = 12: mean[26:12], variance[35:20], i.e. relative to L) and the
// blank-flag position stated for mode 4 follow the design; registering the
// blank output together with the data is this implementation's choice.
module apb_output_mux #(
  parameter int unsigned N = apb_pkg::N_DEFAULT,
  parameter int unsigned L = apb_pkg::L_DEFAULT
) (
  input  logic                clk,
  input  logic                rst,
  input  apb_pkg::apb_mode_e  mode,
  input  logic [15:0]         real_in,
  input  logic [15:0]         imag_in,
  input  logic [31:0]         fifo_q,     // {imag, real} delayed data
  input  logic                blank,
  input  logic                clock_enable,
  input  logic [2*N+L-1:0]    meanx,
  input  logic [4*N+L-1:0]    varx,
  output logic [15:0]         real_out,
  output logic [15:0]         imag_out,
  output logic                blank_out,
  output logic                out_strobe
);

  import apb_pkg::*;

  logic [15:0] real_d, imag_d;
  logic        blank_d, strobe_d;

  always_comb begin
    real_d   = real_in;
    imag_d   = imag_in;
    blank_d  = blank;
    strobe_d = 1'b1;
    unique case (mode)
      MODE_RAW: begin
        blank_d = 1'b0;
      end
      MODE_MEAN_VAR: begin
        real_d   = {blank, meanx[L+14:L]};
        imag_d   = varx[L+23:L+8];
        strobe_d = clock_enable;
      end
      MODE_BLANKED: begin
        real_d = blank ? '0 : fifo_q[15:0];
        imag_d = blank ? '0 : fifo_q[31:16];
      end
      MODE_DATA_FLAG: begin
        real_d = fifo_q[15:0];
        imag_d = {fifo_q[31:17], blank};
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      real_out   <= '0;
      imag_out   <= '0;
      blank_out  <= 1'b0;
      out_strobe <= 1'b0;
    end else begin
      real_out   <= real_d;
      imag_out   <= imag_d;
      blank_out  <= blank_d;
      out_strobe <= strobe_d;
    end
  end

endmodule
