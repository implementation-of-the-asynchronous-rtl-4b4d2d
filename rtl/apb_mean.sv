// apb_mean: stage 2 of the pulse blanker processor, the running mean of |x|^2.
//
// The mean is an exponentially weighted average with weight
// mu = (2^L - 1) / 2^L, kept in a (2N+L)-bit register whose L least
// significant bits are a fraction.  Each update computes
//     meanx <= x2 + T( (2^L - 1) * meanx )
// where T drops the L least significant bits of the (2N+2L)-bit product.  In
// units of the register's LSB (2^-L) this is meanx <= (1 - mu) x2 + mu meanx,
// so the register settles at 2^L times the mean of x2 and its top 2N bits are
// the integer mean.  No intermediate rounding happens other than T.
//
// The register loads on clock_enable when update_enable is high (updates are
// suspended while a pulse is being blanked) or when load_parm is high.  While
// load_parm is high the feedback multiplexer feeds {mean_reset, L zeros}
// instead of the register into the weight multiplier, so the register starts
// from the programmed mean.  Structure, widths and the multiplexer position
// follow the design; the reset value 0 follows it too.
module apb_mean #(
  parameter int unsigned N = apb_pkg::N_DEFAULT,
  parameter int unsigned L = apb_pkg::L_DEFAULT
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             clock_enable,
  input  logic             update_enable,  // var/mean enable from the BTR
  input  logic             load_parm,
  input  logic [2*N-1:0]   mean_reset,     // initial mean, integer part
  input  logic [2*N-1:0]   x2,             // |x|^2 from stage 1
  output logic [2*N+L-1:0] meanx           // L fractional bits
);

  localparam int unsigned MW = 2*N + L;

  logic [MW-1:0]   feedback;
  logic [MW+L-1:0] weighted;   // (2^L - 1) * feedback
  logic [MW-1:0]   next_mean;

  always_comb begin
    feedback  = load_parm ? {mean_reset, {L{1'b0}}} : meanx;
    weighted  = feedback * {{MW{1'b0}}, {L{1'b1}}};
    next_mean = MW'(x2) + weighted[MW+L-1:L];
  end

  always_ff @(posedge clk) begin
    if (rst)
      meanx <= '0;
    else if (clock_enable && (update_enable || load_parm))
      meanx <= next_mean;
  end

endmodule
