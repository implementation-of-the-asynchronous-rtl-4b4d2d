// rabbit_interface: 8-bit micro-controller register interface of the blanker.
//
// The blanker is programmed and observed by an 8-bit micro-controller over a
// 5-bit address, 8-bit data, chip-select, read/write bus.  Addresses 0-17 are
// a file of read/write byte registers whose contents drive the processor
// (control word, beta^2, initial mean and variance, NWAIT, NBLANK, NSEP).
// Addresses 18-31 read a second bank of 14 byte registers that hold a
// snapshot of processor values (control read word, mean, variance); the
// snapshot is taken on every clock where get_meanvar is high.  A 32-to-1
// multiplexer selects the byte to read.
//
// Bus protocol: cs_n is active low, rd_wr is 1 for a read and 0 for a write.
// While cs_n = 0 and rd_wr = 0 the addressed register (0-17) loads data_in on
// every clock; writes to 18-31 are ignored.  While cs_n = 0 and rd_wr = 1,
// data_oe is high and data_out carries the addressed byte (combinational from
// the address); data_oe drives the enable of the board's tri-state data pad.
// The register file clears on reset, the snapshot bank does not need to.
// The structure (decoder, register file, snapshot registers, multiplexer,
// tri-state enable) follows the design; splitting the bidirectional data
// bus into data_in/data_out/data_oe is this implementation's choice.
module rabbit_interface
  import apb_pkg::*;
#(
  parameter int unsigned NW = NUM_WREGS,
  parameter int unsigned NR = NUM_RREGS
) (
  input  logic                clk,
  input  logic                rst,
  input  logic [ADDR_W-1:0]   address,
  input  logic                cs_n,
  input  logic                rd_wr,
  input  logic [7:0]          data_in,
  output logic [7:0]          data_out,
  output logic                data_oe,
  input  logic                get_meanvar,
  input  logic [NR-1:0][7:0]  from_proc,
  output logic [NW-1:0][7:0]  to_proc
);

  logic [NR-1:0][7:0] proc_reg;
  logic               wr_strobe;

  assign wr_strobe = !cs_n && !rd_wr;
  assign data_oe   = !cs_n && rd_wr;

  always_ff @(posedge clk) begin
    if (rst) begin
      to_proc <= '0;
    end else if (wr_strobe && (int'(address) < NW)) begin
      to_proc[address] <= data_in;
    end
  end

  always_ff @(posedge clk) begin
    if (rst)              proc_reg <= '0;
    else if (get_meanvar) proc_reg <= from_proc;
  end

  always_comb begin
    if (int'(address) < NW)
      data_out = to_proc[address];
    else if (int'(address) < NW + NR)
      data_out = proc_reg[int'(address) - NW];
    else
      data_out = '0;
  end

endmodule
