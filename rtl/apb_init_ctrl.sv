// apb_init_ctrl: start-up and FIFO fill controller of the pulse blanker.
//
// After reset the mean and variance registers start from zero and need a
// long time to converge; during that time a pulse decision is meaningless
// and must not freeze the statistics.  The controller therefore forces
// mean/variance updates for INIT_CYCLES clocks and holds the data FIFO
// cleared.  It then clears the FIFO once more, writes (without reading) for
// FILL_LEN clocks, and from then on writes and reads on every clock, so the
// FIFO becomes a delay line of FILL_LEN samples (FILL_LEN must not exceed
// the FIFO depth).  That known delay is the reference for NWAIT.
//
// States: RESET_ALL -> FORCE -> FIFO_RST -> FILL -> RUN (then stays).
// force_updates is high in RESET_ALL and FORCE; running is high in RUN.
// INIT_CYCLES = 262144 and the state sequence follow the design; FILL_LEN
// defaults to one less than the 1024-word FIFO as in the built design.
module apb_init_ctrl #(
  parameter int unsigned INIT_CYCLES = 262144,
  parameter int unsigned FILL_LEN    = 1023
) (
  input  logic clk,
  input  logic rst,
  output logic force_updates,
  output logic fifo_clr,
  output logic fifo_wr,
  output logic fifo_rd,
  output logic running
);

  import apb_pkg::*;

  localparam int unsigned MAXC = (INIT_CYCLES > FILL_LEN) ? INIT_CYCLES : FILL_LEN;
  localparam int unsigned CW   = $clog2(MAXC + 1);

  init_state_e   state;
  logic [CW-1:0] count;

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= INIT_RESET_ALL;
      count <= '0;
    end else begin
      unique case (state)
        INIT_RESET_ALL: begin
          state <= INIT_FORCE;
          count <= '0;
        end
        INIT_FORCE: begin
          count <= count + 1'b1;
          if (count == CW'(INIT_CYCLES - 1)) state <= INIT_FIFO_RST;
        end
        INIT_FIFO_RST: begin
          state <= INIT_FILL;
          count <= '0;
        end
        INIT_FILL: begin
          count <= count + 1'b1;
          if (count == CW'(FILL_LEN - 1)) state <= INIT_RUN;
        end
        INIT_RUN: state <= INIT_RUN;
        default:  state <= INIT_RESET_ALL;
      endcase
    end
  end

  always_comb begin
    force_updates = (state == INIT_RESET_ALL) || (state == INIT_FORCE);
    fifo_clr      = (state != INIT_FILL) && (state != INIT_RUN);
    fifo_wr       = (state == INIT_FILL) || (state == INIT_RUN);
    fifo_rd       = (state == INIT_RUN);
    running       = (state == INIT_RUN);
  end

endmodule
