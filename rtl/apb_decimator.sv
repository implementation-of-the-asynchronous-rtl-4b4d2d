// apb_decimator: decimation controller of the pulse blanker processor.
//
// The arithmetic of the processor is too wide to close timing at the full
// 100 MHz sample rate, so it only looks at one sample in DECIM.  A free
// running modulo-DECIM counter produces a one-clock-wide enable when it is at
// zero; every register of the processor, the blanking timers and the
// snapshot of the read-back registers are clocked with this enable.  The
// enable is high in the clock after reset is released and then every DECIM
// clocks.  DECIM = 4 follows the design (25 % of the samples are processed);
// the synchronous active-high reset is this implementation's choice.
module apb_decimator #(
  parameter int unsigned DECIM = apb_pkg::DECIM_DEFAULT
) (
  input  logic clk,
  input  logic rst,
  output logic clock_enable   // one clock in DECIM
);

  localparam int unsigned CW = (DECIM > 1) ? $clog2(DECIM) : 1;

  logic [CW-1:0] phase;

  always_ff @(posedge clk) begin
    if (rst)                                 phase <= '0;
    else if (phase == CW'(DECIM - 1))        phase <= '0;
    else                                     phase <= phase + 1'b1;
  end

  assign clock_enable = (phase == '0);

endmodule
