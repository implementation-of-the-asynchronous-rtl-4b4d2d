// apb_fifo: single-clock FIFO that delays the full-rate input data.
//
// The blanking decision for a sample is available only after the processing
// latency, and the blanker should also be able to blank data that preceded
// the sample where the pulse was detected.  Both needs are met by passing the
// data through this FIFO: once it has been filled to a known level and is
// then written and read on every clock, it is a fixed delay line of that
// length.  Words are WIDTH bits (real part in the low half, imaginary in the
// high half), DEPTH words deep, held in a memory array.
//
// Interface: wrreq writes data at the clock edge (ignored when full unless a
// read happens in the same clock); rdreq pops the oldest word, which appears
// on q after the edge (no show-ahead), and is ignored when empty.  clr empties
// the FIFO synchronously.  usedw is the fill level.  DEPTH = 1024 is the size
// of the built test design; the FIFO's internal structure is this
// implementation's own (the design used a vendor library FIFO).
module apb_fifo #(
  parameter int unsigned WIDTH = 32,
  parameter int unsigned DEPTH = 1024
) (
  input  logic                       clk,
  input  logic                       clr,
  input  logic                       wrreq,
  input  logic [WIDTH-1:0]           data,
  input  logic                       rdreq,
  output logic [WIDTH-1:0]           q,
  output logic                       empty,
  output logic                       full,
  output logic [$clog2(DEPTH+1)-1:0] usedw
);

  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  localparam int unsigned UW = $clog2(DEPTH + 1);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    wr_ptr, rd_ptr;
  logic             do_wr, do_rd;

  assign empty = (usedw == '0);
  assign full  = (usedw == UW'(DEPTH));
  assign do_rd = rdreq && !empty;
  assign do_wr = wrreq && (!full || do_rd);

  function automatic logic [AW-1:0] ptr_inc(input logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (do_wr) mem[wr_ptr] <= data;
  end

  always_ff @(posedge clk) begin
    if (clr) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
      usedw  <= '0;
      q      <= '0;
    end else begin
      if (do_wr) wr_ptr <= ptr_inc(wr_ptr);
      if (do_rd) begin
        rd_ptr <= ptr_inc(rd_ptr);
        q      <= mem[rd_ptr];
      end
      usedw <= usedw + UW'(do_wr) - UW'(do_rd);
    end
  end

endmodule
