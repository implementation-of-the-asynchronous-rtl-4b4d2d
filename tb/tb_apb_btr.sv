// tb_apb_btr: checks the blanking timing register against a model written in
// terms of enable indices rather than states.  For a pulse accepted at
// enable p (the blanking machine was idle):
//   blank is high after enables p+NWAIT+2 .. p+NWAIT+NBLANK+2, and the
//   machine accepts a new pulse from enable p+NWAIT+NBLANK+3 on;
// for a pulse accepted by the update-disable machine at enable q:
//   update_enable is low before enable q and before enables q+1..q+NBLANK+1,
//   and a new pulse is accepted from enable q+2+max(NSEP, NBLANK+1) on;
// force_updates keeps update_enable high.  Random sparse and dense pulse
// trains, random gaps between enables and several NWAIT/NBLANK/NSEP sets
// (including NSEP < NBLANK and zeros) are used.
module tb_apb_btr;
  localparam int CW = 16;
  logic clk = 1'b0;
  logic rst = 1'b1;
  logic ce = 1'b0, pulse = 1'b0, force_upd = 1'b0;
  logic [CW-1:0] nwait = '0, nblank = '0, nsep = '0;
  logic upd_en, blank;
  int checks = 0, failures = 0;
  int n_blank_windows = 0, n_ignored = 0;

  always #5 clk = ~clk;

  apb_btr #(.CNT_W(CW)) dut (.clk, .rst, .clock_enable(ce), .pulse, .force_updates(force_upd),
                             .nwait, .nblank, .nsep, .update_enable(upd_en), .blank);

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint k, p, blk_end, q, dis_end;
    logic exp_blank, exp_upd, prev_blank;
    int density;
    longint nw, nb, ns;
    repeat (2) @(posedge clk);
    rst <= 1'b0;
    @(posedge clk);
    for (int set = 0; set < 12; set++) begin
      // quiesce: let both machines return to idle with the new settings
      pulse <= 1'b0;
      nwait  <= CW'($urandom_range(0, 20));
      nblank <= CW'($urandom_range(0, 30));
      nsep   <= CW'((set % 3 == 0) ? $urandom_range(0, 10) : $urandom_range(0, 80));
      if (set == 1) begin nwait <= '0; nblank <= '0; nsep <= '0; end
      ce <= 1'b1;
      repeat (400) @(posedge clk);
      ce <= 1'b0;
      @(posedge clk);
      density = (set % 2) ? 3 : 40;
      p = -1000; blk_end = -1000; q = -1000; dis_end = -1000;
      prev_blank = blank;
      nw = longint'(nwait); nb = longint'(nblank); ns = longint'(nsep);
      for (k = 0; k < 2000; k++) begin
        repeat ($urandom_range(0, 2)) begin ce <= 1'b0; @(posedge clk); end
        pulse     <= ($urandom_range(0, density - 1) == 0);
        force_upd <= ($urandom_range(0, 19) == 0);
        ce        <= 1'b1;
        #1;
        // combinational output before the edge
        exp_upd = 1'b1;
        if (k > dis_end && pulse) exp_upd = 1'b0;
        if (k > q && k <= q + nb + 1) exp_upd = 1'b0;
        if (force_upd) exp_upd = 1'b1;
        checks++;
        if (upd_en !== exp_upd) begin
          failures++;
          if (failures < 10) $display("set %0d enable %0d: update_enable=%0b expected %0b",
                                      set, k, upd_en, exp_upd);
        end
        // state of the model after this edge
        if (pulse) begin
          if (k > blk_end) begin
            p = k; blk_end = p + nw + nb + 2;
          end else n_ignored++;
          if (k > dis_end) begin
            q = k;
            dis_end = q + 1 + ((ns > nb + 1) ? ns : nb + 1);
          end
        end
        exp_blank = (k >= p + nw + 2) && (k <= p + nw + nb + 2);
        @(posedge clk);
        ce <= 1'b0;
        #1;
        checks++;
        if (blank !== exp_blank) begin
          failures++;
          if (failures < 10) $display("set %0d enable %0d: blank=%0b expected %0b",
                                      set, k, blank, exp_blank);
        end
        if (blank && !prev_blank) n_blank_windows++;
        prev_blank = blank;
      end
    end
    checks++;
    if (n_blank_windows < 10 || n_ignored == 0) begin
      failures++;
      $display("coverage: %0d windows, %0d ignored pulses", n_blank_windows, n_ignored);
    end
    $display("blank windows=%0d ignored pulses=%0d", n_blank_windows, n_ignored);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
