// tb_apb_radar_pulse: the radar-pulse scenario of the first bench test, at
// the default sizes.  The blanker is programmed as in that test (beta^2 = 100,
// NWAIT = 128, NBLANK = 1024, NSEP = 1152, all in processed samples) and fed
// low-level noise with a 100-clock radar pulse followed 1300 clocks later by a
// weaker 100-clock reflection, repeated every 20000 clocks.  In the
// data-with-flag mode every pulse and reflection sample that leaves the FIFO
// must carry the blank flag; in the blanked mode every such sample must be
// zero.  Also checked: the window opens about 4 x (NWAIT + 8) clocks after
// the pulse reaches the processor (up to one decimation period later,
// depending on where the pulse starts relative to the enable), so about
// (FILL_LEN + 2) - 4 x (NWAIT + 8) clocks of data before the pulse are
// blanked as well; outside windows the output is the input delayed by
// FILL_LEN + 2 clocks.
module tb_apb_radar_pulse;
  import apb_pkg::*;
  localparam int FILL = 1023;
  localparam int NWAIT_V = 128, NBLANK_V = 1024, NSEP_V = 1152, BETA2_V = 100;
  localparam int PERIOD = 20000;

  logic clk = 1'b0;
  logic rst = 1'b1;
  logic [15:0] re = '0, im = '0, ro, io;
  logic stb, blank;
  logic [4:0] addr = '0;
  logic cs_n = 1'b1, rd_wr = 1'b1;
  logic [7:0] din = '0, dout;
  logic oe;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  apb_top dut (
    .clk, .rst, .real_in(re), .imag_in(im), .real_out(ro), .imag_out(io), .out_strobe(stb),
    .blank, .address(addr), .cs_n, .rd_wr, .data_in(din), .data_out(dout), .data_oe(oe),
    .snapshot(1'b0), .parm_reset(1'b0), .apb_tmp(1'b0));

  longint cyc = 0;
  logic [31:0] hist [longint];
  bit pulse_hist [longint];
  bit pulses_on = 1'b0;
  longint pulse_start = -1;

  task automatic chk(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 15) $display("cyc %0d: %s", cyc, what);
    end
  endtask

  initial begin
    repeat (1500000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int noise();
    int s;
    s = 0;
    for (int i = 0; i < 4; i++) s += int'($urandom_range(0, 511)) - 256;
    return s;
  endfunction

  always @(posedge clk) begin
    int ph, r, i;
    bit in_pulse;
    cyc <= cyc + 1;
    ph = int'((cyc - pulse_start) % PERIOD);
    in_pulse = pulses_on && ((ph < 100) || (ph >= 1300 && ph < 1400));
    r = noise(); i = noise();
    if (pulses_on && ph < 100) begin
      r += (ph % 2) ? 6000 : -6000; i += (ph % 4 < 2) ? 5000 : -5000;
    end else if (pulses_on && ph >= 1300 && ph < 1400) begin
      r += (ph % 2) ? 3000 : -3000; i += (ph % 4 < 2) ? 2500 : -2500;
    end
    re <= 16'(r); im <= 16'(i);
    hist[cyc + 1] = {16'(i), 16'(r)};
    pulse_hist[cyc + 1] = in_pulse;
    if (hist.exists(cyc - 3000)) begin hist.delete(cyc - 3000); pulse_hist.delete(cyc - 3000); end
  end

  task automatic bus_write(input int a, input logic [7:0] d);
    @(negedge clk);
    addr = 5'(a); din = d; rd_wr = 1'b0; cs_n = 1'b0;
    @(negedge clk);
    cs_n = 1'b1; rd_wr = 1'b1;
  endtask

  task automatic write16(input int a, input int v);
    bus_write(a, 8'(v)); bus_write(a + 1, 8'(v >> 8));
  endtask

  initial begin
    int n_flagged, n_zeroed, n_pulse_out, n_clean, n_windows, pre_blank;
    longint win_open, first_pulse_out;
    logic [31:0] d;
    logic blank_q;
    n_flagged = 0; n_zeroed = 0; n_pulse_out = 0; n_clean = 0; n_windows = 0;
    win_open = -1; first_pulse_out = -1; blank_q = 1'b0;
    repeat (4) @(posedge clk);
    rst <= 1'b0;
    write16(REG_BETA2, BETA2_V);
    write16(REG_NWAIT, NWAIT_V);
    write16(REG_NBLANK, NBLANK_V);
    write16(REG_NSEP, NSEP_V);
    bus_write(REG_CTRL_W, {6'b0, 2'(MODE_DATA_FLAG)});
    wait (dut.u_init.running);
    repeat (20) @(posedge clk);
    pulse_start = cyc + 2000;
    pulses_on = 1'b1;
    for (int t = 0; t < 4 * PERIOD; t++) begin
      if (t == 2 * PERIOD) bus_write(REG_CTRL_W, {6'b0, 2'(MODE_BLANKED)});
      @(posedge clk);
      #1;
      if (t < 10 || (t >= 2 * PERIOD && t < 2 * PERIOD + 10)) continue;
      d = hist[cyc - 1 - FILL - 1];
      if (blank && !blank_q) begin n_windows++; if (win_open < 0) win_open = cyc; end
      blank_q = blank;
      if (pulse_hist[cyc - 1 - FILL - 1]) begin
        n_pulse_out++;
        if (first_pulse_out < 0) first_pulse_out = cyc;
        if (t < 2 * PERIOD) begin
          chk(io[0] == 1'b1, "pulse sample without blank flag");
          n_flagged += int'(io[0]);
        end else begin
          chk(ro == 16'h0 && io == 16'h0, "pulse sample not zeroed");
          n_zeroed += int'(ro == 16'h0 && io == 16'h0);
        end
      end else if (!blank) begin
        if (t < 2 * PERIOD) chk(ro == d[15:0] && io == {d[31:17], 1'b0}, "delayed data (flag mode)");
        else chk({io, ro} == d, "delayed data (blanked mode)");
        n_clean++;
      end
    end
    pre_blank = int'(first_pulse_out - win_open);
    // up to DECIM clocks pass before the first pulse sample is taken in,
    // plus one clock for the phase of the capture within the enable period
    chk(pre_blank <= (FILL + 2) - 4 * (NWAIT_V + 8) && pre_blank >= (FILL + 1) - 4 * (NWAIT_V + 9),
        $sformatf("window opened %0d clocks before the delayed pulse, expected %0d..%0d",
                  pre_blank, (FILL + 1) - 4 * (NWAIT_V + 9), (FILL + 2) - 4 * (NWAIT_V + 8)));
    chk(n_windows >= 4, $sformatf("only %0d blank windows", n_windows));
    chk(n_flagged > 0 && n_zeroed > 0 && n_clean > 0, "a case was not exercised");
    $display("windows=%0d pulse samples out=%0d flagged=%0d zeroed=%0d clean=%0d pre-blank=%0d clocks",
             n_windows, n_pulse_out, n_flagged, n_zeroed, n_clean, pre_blank);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
