// apb_detect: stage 4 of the pulse blanker processor, the pulse comparator.
//
// A sample is declared interference when its squared deviation from the mean
// is at least beta^2 times the current variance:
//     pulse = dev2 >= beta2 * floor(varx / 2^L)
// beta2 is an L-bit unsigned integer, the integer variance is 4N bits, so the
// product is 4N+L bits; dev2 is zero-padded with L MSBs to the same width.
// The comparison is combinational; its result is registered by the blanking
// timing register.  This 4N+L-bit compare is the critical path of the design.
// The operands, the truncation and the zero pad follow the design.
//
// Note that a variance of zero makes any dev2 (even zero) a pulse, so a
// completely quiet input keeps the blanker on; the design accepts this.
module apb_detect #(
  parameter int unsigned N = apb_pkg::N_DEFAULT,
  parameter int unsigned L = apb_pkg::L_DEFAULT
) (
  input  logic [L-1:0]     beta2,
  input  logic [4*N-1:0]   dev2,
  input  logic [4*N+L-1:0] varx,
  output logic             pulse
);

  localparam int unsigned W = 4*N + L;

  logic [W-1:0] threshold;
  logic [W-1:0] dev2_ext;

  always_comb begin
    threshold = W'(beta2) * W'(varx[W-1:L]);
    dev2_ext  = {{L{1'b0}}, dev2};
    pulse     = !(dev2_ext < threshold);
  end

endmodule
