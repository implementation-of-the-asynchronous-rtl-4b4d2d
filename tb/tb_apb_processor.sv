// tb_apb_processor: end-to-end test of the processor at N = L = 12.
// A noise stream with periodic strong 100-clock bursts is applied at the full
// clock rate.  An independent model, stepped on each processed sample, keeps
// the pipeline (input, squares, |x|^2, delay, difference, square), the mean
// and variance recurrences, the comparator and the blanking timers, and the
// testbench compares meanx, varx, the detector output and blank after every
// enable.  It also checks the enable rate (one clock in four), the latency
// from the clock a burst sample is captured to the detector output
// (5 enables = 20 clocks) and to the start of the blank window
// ((NWAIT + 8) enables), that load_parm starts the statistics from the
// programmed values, and that blank windows and update holds happen.
module tb_apb_processor;
  localparam int N = 12, L = 12, D = 4;
  localparam logic [15:0] NWAIT = 16'd5, NBLANK = 16'd20, NSEP = 16'd40;
  logic clk = 1'b0;
  logic rst = 1'b1;
  logic [15:0] re = '0, im = '0;
  logic load = 1'b0, frc = 1'b0;
  logic [L-1:0] beta2 = L'(64);
  logic [2*N-1:0] mrst = '0;
  logic [4*N-1:0] vrst = '0;
  logic [2*N+L-1:0] meanx;
  logic [4*N+L-1:0] varx;
  logic blank, pulse, ce;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  apb_processor #(.N(N), .L(L)) dut (
    .clk, .rst, .real_in(re), .imag_in(im), .load_parm(load), .beta2, .mean_reset(mrst),
    .var_reset(vrst), .force_updates(frc), .nwait(NWAIT), .nblank(NBLANK), .nsep(NSEP),
    .meanx, .varx, .blank, .pulse, .clock_enable(ce));

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 15) $display("%t: %s", $time, what);
    end
  endtask

  function automatic logic [15:0] noise(input int sigma_shift);
    int s;
    s = 0;
    for (int i = 0; i < 4; i++) s += int'($urandom_range(0, 4095)) - 2048;
    return 16'(s <<< sigma_shift);
  endfunction

  // model state
  longint rr, ri, i2, q2, x2, x2d, dreg;
  logic [127:0] dev2_m, var_m, mean_m;
  longint k, p, blk_end, q, dis_end;
  longint nb, nw, ns;

  initial begin
    logic [127:0] thr, fb, mean_int_old;
    logic pulse_m, upd_m, blank_m;
    longint burst_at, clk_n, cap_clk, pulse_clk, blank_clk;
    int n_windows, n_holds, n_enables, n_clocks, lat_seen;
    bit in_burst, pulse_q, blank_q;
    rr = 0; ri = 0; i2 = 0; q2 = 0; x2 = 0; x2d = 0; dreg = 0;
    dev2_m = '0; var_m = '0; mean_m = '0;
    p = -1000; blk_end = -1000; q = -1000; dis_end = -1000;
    nb = longint'(NBLANK); nw = longint'(NWAIT); ns = longint'(NSEP);
    n_windows = 0; n_holds = 0; n_enables = 0; n_clocks = 0; lat_seen = 0;
    burst_at = -1; cap_clk = -1; pulse_clk = -1; blank_clk = -1;
    blank_m = 1'b0; pulse_q = 1'b0; blank_q = 1'b0;
    repeat (2) @(posedge clk);
    rst <= 1'b0;
    k = 0;
    for (clk_n = 0; clk_n < 120000; clk_n++) begin
      // stimulus for this clock: noise, a 100-clock burst every 2000 clocks
      in_burst = (clk_n % 2000) >= 1000 && (clk_n % 2000) < 1100 && clk_n > 6000;
      re <= in_burst ? 16'(16'sd28000 + 16'($signed(noise(0)))) : noise(0);
      im <= in_burst ? 16'(-16'sd28000 + 16'($signed(noise(0)))) : noise(0);
      load <= (clk_n < 8);
      mrst <= (2*N)'(6000);
      vrst <= (4*N)'(40000000);
      frc <= (clk_n >= 60000 && clk_n < 64000);
      #1;
      n_clocks++;
      if (ce) begin
        n_enables++;
        // ---- model: combinational values before the edge ----
        thr     = 128'(beta2) * (var_m >> L);
        pulse_m = (dev2_m >= thr);
        chk(pulse === pulse_m, $sformatf("enable %0d: pulse=%0b expected %0b", k, pulse, pulse_m));
        upd_m = 1'b1;
        if (k > dis_end && pulse_m) upd_m = 1'b0;
        if (k > q && k <= q + nb + 1) upd_m = 1'b0;
        if (frc) upd_m = 1'b1;
        if (!upd_m) n_holds++;
        // ---- model: the edge ----
        mean_int_old = mean_m >> L;
        if (pulse_m) begin
          if (k > blk_end) begin p = k; blk_end = p + nw + nb + 2; end
          if (k > dis_end) begin q = k; dis_end = q + 1 + ((ns > nb + 1) ? ns : nb + 1); end
        end
        blank_m = (k >= p + nw + 2) && (k <= p + nw + nb + 2);
        if (upd_m || load) begin
          fb    = load ? (128'(vrst) << L) : var_m;
          var_m = dev2_m + ((fb * ((128'(1) << L) - 1)) >> L);
          fb    = load ? (128'(mrst) << L) : mean_m;
          mean_m = 128'(x2) + ((fb * ((128'(1) << L) - 1)) >> L);
        end
        dev2_m = 128'(dreg * dreg);
        dreg   = x2d - longint'(mean_int_old);
        x2d    = x2;
        x2     = i2 + q2;
        i2     = rr * rr;
        q2     = ri * ri;
        rr     = longint'($signed(re[15 -: N]));
        ri     = longint'($signed(im[15 -: N]));
        if (in_burst && cap_clk < 0 && clk_n > 6000) cap_clk = clk_n;
        k++;
      end
      @(posedge clk);
      #1;
      // outputs after the edge
      if (k > 0) begin
        chk(128'(meanx) == mean_m, $sformatf("enable %0d: meanx=%0d expected %0d", k, meanx, mean_m));
        chk(128'(varx) == var_m, $sformatf("enable %0d: varx=%0d expected %0d", k, varx, var_m));
        chk(blank === blank_m, $sformatf("enable %0d: blank=%0b expected %0b", k, blank, blank_m));
      end
      if (cap_clk >= 0 && pulse_clk < 0 && pulse && !pulse_q) pulse_clk = clk_n + 1;
      if (cap_clk >= 0 && blank_clk < 0 && blank && !blank_q) blank_clk = clk_n + 1;
      pulse_q = pulse;
      blank_q = blank;
    end
    // latency of the first burst (clock numbers count edges from the capture)
    chk(pulse_clk - cap_clk - 1 == 5 * D,
        $sformatf("detector latency %0d clocks, expected %0d", pulse_clk - cap_clk - 1, 5 * D));
    chk(blank_clk - cap_clk - 1 == (longint'(NWAIT) + 8) * D,
        $sformatf("blank latency %0d clocks, expected %0d", blank_clk - cap_clk - 1,
                  (longint'(NWAIT) + 8) * D));
    chk(n_enables * D == n_clocks, $sformatf("%0d enables in %0d clocks", n_enables, n_clocks));
    chk(n_holds > 0, "updates were never held");
    chk(p > 0, "no blank window");
    $display("enables=%0d holds=%0d detector latency=%0d blank latency=%0d", n_enables, n_holds,
             pulse_clk - cap_clk - 1, blank_clk - cap_clk - 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
