// apb_power: stage 1 of the pulse blanker processor, |x|^2 = i^2 + q^2.
//
// The complex input is registered, each component is squared by a signed
// multiplier into its own register, and the two squares are added into a
// 2N-bit register.  All three register ranks load only when clock_enable is
// high, so |x|^2 of the sample taken at one enable appears on x2 after the
// third enable (3 x DECIM clocks).  The sum of two squares of N-bit two's
// complement numbers is at most 2^(2N-1) and therefore fits 2N bits without
// loss.  The structure and widths follow the design; the reset of the
// pipeline registers is this implementation's choice.
module apb_power #(
  parameter int unsigned N = apb_pkg::N_DEFAULT
) (
  input  logic               clk,
  input  logic               rst,
  input  logic               clock_enable,
  input  logic signed [N-1:0] x_real,
  input  logic signed [N-1:0] x_imag,
  output logic [2*N-1:0]     x2            // i^2 + q^2, registered
);

  logic signed [N-1:0]   real_reg, imag_reg;
  logic        [2*N-1:0] i2_reg, q2_reg;
  logic signed [2*N-1:0] i2, q2;

  // Full-width signed products (operands are sign-extended to 2N bits).
  always_comb begin
    i2 = real_reg * real_reg;
    q2 = imag_reg * imag_reg;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      real_reg <= '0;
      imag_reg <= '0;
      i2_reg   <= '0;
      q2_reg   <= '0;
      x2       <= '0;
    end else if (clock_enable) begin
      real_reg <= x_real;
      imag_reg <= x_imag;
      i2_reg   <= unsigned'(i2);
      q2_reg   <= unsigned'(q2);
      x2       <= i2_reg + q2_reg;
    end
  end

endmodule
