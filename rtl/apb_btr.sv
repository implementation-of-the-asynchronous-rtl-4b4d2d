// apb_btr: blanking timing register (BTR) of the pulse blanker.
//
// Two small state machines react to the pulse flag of the detector; both
// step only on clock_enable, so NWAIT, NBLANK and NSEP are counted in
// processed (decimated) samples, not in clocks.
//
// Update-disable machine: idle until a pulse; then the mean and variance
// registers are frozen for NBLANK+1 processed samples so that the pulse does
// not corrupt the statistics; then it waits until NSEP processed samples
// have passed since the pulse before a new pulse is accepted.  update_enable
// is high in idle when no pulse is flagged, and in the NSEP wait;
// force_updates overrides it (start-up and the FORCE_UPDATE control bit).
//
// Blanking machine: idle until a pulse; then it waits NWAIT+1 processed
// samples, then asserts blank for NBLANK+1 processed samples.  blank is a
// register loaded on clock_enable; the data it blanks comes out of a delay
// FIFO, so NWAIT positions the blanking window relative to the delayed pulse.
// Pulses arriving while a machine is busy are ignored (a single BTR).
//
// Counters are CNT_W bits.  The machines, counters and their clear
// conditions follow the design; the interval ends are detected with ">="
// (the design compares for equality, which is the same for NWAIT and NBLANK
// but would make the NSEP wait run a whole counter period if NSEP <= NBLANK).
module apb_btr #(
  parameter int unsigned CNT_W = apb_pkg::CNT_W
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             clock_enable,
  input  logic             pulse,          // from the detector, combinational
  input  logic             force_updates,
  input  logic [CNT_W-1:0] nwait,
  input  logic [CNT_W-1:0] nblank,
  input  logic [CNT_W-1:0] nsep,
  output logic             update_enable,  // mean/var register enable
  output logic             blank           // blank the FIFO output
);

  import apb_pkg::*;

  btr_state_e        dis_state, dis_next;
  btr_state_e        blk_state, blk_next;
  logic [CNT_W-1:0]  cnt_dis, cnt_sep, cnt_wait, cnt_blk;
  logic              hold_updates;

  // ---- update-disable machine -------------------------------------------
  always_comb begin
    dis_next     = dis_state;
    hold_updates = 1'b0;
    unique case (dis_state)
      BTR_IDLE: if (pulse) begin
        dis_next     = BTR_FIRST;
        hold_updates = 1'b1;
      end
      BTR_FIRST: begin
        hold_updates = 1'b1;
        if (cnt_dis >= nblank) dis_next = BTR_SECOND;
      end
      BTR_SECOND: if (cnt_sep >= nsep) dis_next = BTR_IDLE;
      default: dis_next = BTR_IDLE;
    endcase
  end

  assign update_enable = force_updates || !hold_updates;

  // ---- blanking machine ---------------------------------------------------
  always_comb begin
    blk_next = blk_state;
    unique case (blk_state)
      BTR_IDLE:   if (pulse)              blk_next = BTR_FIRST;
      BTR_FIRST:  if (cnt_wait >= nwait)  blk_next = BTR_SECOND;
      BTR_SECOND: if (cnt_blk >= nblank)  blk_next = BTR_IDLE;
      default:                            blk_next = BTR_IDLE;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      dis_state <= BTR_IDLE;
      blk_state <= BTR_IDLE;
      cnt_dis   <= '0;
      cnt_sep   <= '0;
      cnt_wait  <= '0;
      cnt_blk   <= '0;
      blank     <= 1'b0;
    end else if (clock_enable) begin
      dis_state <= dis_next;
      blk_state <= blk_next;
      // NBLANK1 and NSEP counters run from the pulse on, cleared in idle.
      cnt_dis   <= (dis_state == BTR_IDLE)   ? '0 : cnt_dis + 1'b1;
      cnt_sep   <= (dis_state == BTR_IDLE)   ? '0 : cnt_sep + 1'b1;
      // NWAIT counter is cleared in idle, NBLANK2 outside the blanking state.
      cnt_wait  <= (blk_state == BTR_IDLE)   ? '0 : cnt_wait + 1'b1;
      cnt_blk   <= (blk_state != BTR_SECOND) ? '0 : cnt_blk + 1'b1;
      blank     <= (blk_state == BTR_SECOND);
    end
  end

endmodule
