// apb_var: stage 3 of the pulse blanker processor, the running variance.
//
// |x|^2 is delayed by one enable so that it lines up with the mean register,
// the integer part of the mean (its top 2N bits, the L fraction bits
// truncated) is subtracted, the difference is squared into a 4N-bit register
// (dev2), and the squared deviation is averaged with the same exponential
// weight as the mean:
//     varx <= dev2 + T( (2^L - 1) * varx )
// The (4N+L)-bit variance register has L fractional bits, its top 4N bits are
// the integer variance.  dev2 is also the quantity the detector compares.
//
// The delay, difference and square registers load on every clock_enable; the
// variance register only when update_enable or load_parm is high, and
// load_parm feeds {var_reset, L zeros} into the weight multiplier.  The
// difference is kept 2N+1 bits wide (signed): the design's 2N-bit subtractor
// could wrap when the mean is programmed above the largest |x|^2, the wider
// difference cannot, and its square still fits 4N bits.
module apb_var #(
  parameter int unsigned N = apb_pkg::N_DEFAULT,
  parameter int unsigned L = apb_pkg::L_DEFAULT
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             clock_enable,
  input  logic             update_enable,
  input  logic             load_parm,
  input  logic [4*N-1:0]   var_reset,      // initial variance, integer part
  input  logic [2*N-1:0]   x2,             // |x|^2 from stage 1
  input  logic [2*N-1:0]   mean_int,       // integer part of the mean
  output logic [4*N-1:0]   dev2,           // (x2 - mean)^2, registered
  output logic [4*N+L-1:0] varx            // L fractional bits
);

  localparam int unsigned VW = 4*N + L;
  localparam int unsigned DW = 2*N + 1;

  logic [2*N-1:0]        x2_dly;
  logic signed [DW-1:0]  diff_reg;
  logic signed [DW-1:0]  diff;
  logic [2*N-1:0]        diff_mag;
  logic [4*N-1:0]        diff_sq;
  logic [VW-1:0]         feedback;
  logic [VW+L-1:0]       weighted;
  logic [VW-1:0]         next_var;

  always_comb begin
    diff     = signed'({1'b0, x2_dly}) - signed'({1'b0, mean_int});
    // |diff| <= 2^(2N) - 1, so its magnitude fits 2N bits.
    diff_mag = diff_reg[DW-1] ? (2*N)'(-diff_reg) : diff_reg[2*N-1:0];
    diff_sq  = (4*N)'(diff_mag) * (4*N)'(diff_mag);
    feedback = load_parm ? {var_reset, {L{1'b0}}} : varx;
    weighted = feedback * {{VW{1'b0}}, {L{1'b1}}};
    next_var = VW'(dev2) + weighted[VW+L-1:L];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      x2_dly   <= '0;
      diff_reg <= '0;
      dev2     <= '0;
    end else if (clock_enable) begin
      x2_dly   <= x2;
      diff_reg <= diff;
      dev2     <= diff_sq;
    end
  end

  always_ff @(posedge clk) begin
    if (rst)
      varx <= '0;
    else if (clock_enable && (update_enable || load_parm))
      varx <= next_var;
  end

endmodule
