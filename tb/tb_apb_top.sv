// tb_apb_top: end-to-end test of the pulse blanker at its default sizes
// (N = L = 12, 1024-word FIFO, 262144 start-up clocks, decimation 4).
//
// The micro-controller bus programs beta^2 = 64, NWAIT, NBLANK, NSEP and the
// mode, and every programmed register is read back.  Noise with strong
// 100-clock bursts is applied.  The testbench checks: the raw mode (output =
// input one clock later); the forced-update start-up and the FIFO fill (the
// delayed output appears exactly FILL_LEN + 2 clocks after the input); that
// in the blanked mode every output is either the delayed input or zero while
// blank is high, and that no burst sample reaches the output; the flag mode
// (blank in the imaginary LSB); the mean/variance mode (strobe one clock in
// four, bit fields of the mean and variance); the snapshot read-back of the
// mean and variance over the bus; the FORCE_UPDATE control bit (no update
// holds while it is set); and parm_reset loading the initial mean.  Each
// mechanism is counted and one that never happened is a failure.
module tb_apb_top;
  import apb_pkg::*;
  localparam int FILL       = 1023;   // the top's default FIFO fill length
  localparam int INIT       = 262144; // the top's default start-up length
  localparam int NWAIT_V    = (FILL + 2 - 100) / 4 - 8;
  localparam int NBLANK_V   = 80;
  localparam int NSEP_V     = 120;
  localparam int BETA2_V    = 64;

  logic clk = 1'b0;
  logic rst = 1'b1;
  logic [15:0] re = '0, im = '0, ro, io;
  logic stb, blank;
  logic [4:0] addr = '0;
  logic cs_n = 1'b1, rd_wr = 1'b1, snapshot = 1'b0, parm_reset = 1'b0, tmp = 1'b1;
  logic [7:0] din = '0, dout;
  logic oe;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  apb_top dut (
    .clk, .rst, .real_in(re), .imag_in(im), .real_out(ro), .imag_out(io), .out_strobe(stb),
    .blank, .address(addr), .cs_n, .rd_wr, .data_in(din), .data_out(dout), .data_oe(oe),
    .snapshot, .parm_reset, .apb_tmp(tmp));

  // ---- stimulus history and mechanism counters ----
  longint cyc = 0;
  logic [31:0] hist [longint];
  bit burst_hist [longint];
  bit in_burst = 1'b0;
  bit burst_on = 1'b0;
  int n_raw = 0, n_delay = 0, n_blanked_out = 0, n_flag = 0, n_meanvar = 0;
  int n_windows = 0, n_holds = 0, n_forced_holdfree = 0, n_leaks = 0, n_burst_out = 0;
  int n_force_init = 0, n_readback = 0, n_load = 0;
  logic blank_q = 1'b0;

  task automatic chk(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 15) $display("%t cyc %0d: %s", $time, cyc, what);
    end
  endtask

  initial begin
    repeat (1500000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [15:0] noise();
    int s;
    s = 0;
    for (int i = 0; i < 4; i++) s += int'($urandom_range(0, 4095)) - 2048;
    return 16'(s);
  endfunction

  // Drive a new sample every clock and remember it.
  always @(posedge clk) begin
    logic [15:0] r, i;
    cyc <= cyc + 1;
    in_burst = burst_on && ((cyc % 3000) >= 1500) && ((cyc % 3000) < 1600);
    r = noise(); i = noise();
    if (in_burst) begin r = 16'(30000 + $signed(r)); i = 16'(-30000 + $signed(i)); end
    re <= r; im <= i;
    hist[cyc + 1]       = {i, r};
    burst_hist[cyc + 1] = in_burst;
    if (hist.exists(cyc - 3000)) begin hist.delete(cyc - 3000); burst_hist.delete(cyc - 3000); end
  end

  // Mechanism monitors.
  always @(posedge clk) begin
    if (!rst) begin
      if (dut.u_init.force_updates) n_force_init++;
      if (dut.u_proc.clock_enable && !dut.u_proc.u_btr.update_enable) n_holds++;
      if (blank && !blank_q) n_windows++;
      blank_q <= blank;
    end
  end

  task automatic bus_write(input int a, input logic [7:0] d);
    @(negedge clk);
    addr = 5'(a); din = d; rd_wr = 1'b0; cs_n = 1'b0;
    @(negedge clk);
    cs_n = 1'b1; rd_wr = 1'b1;
  endtask

  task automatic bus_read(input int a, output logic [7:0] d);
    @(negedge clk);
    addr = 5'(a); rd_wr = 1'b1; cs_n = 1'b0;
    #1;
    chk(oe === 1'b1, "data_oe low during a read");
    d = dout;
    @(negedge clk);
    cs_n = 1'b1;
  endtask

  task automatic write16(input int a, input int v);
    bus_write(a, 8'(v)); bus_write(a + 1, 8'(v >> 8));
  endtask

  task automatic set_mode(input apb_mode_e m, input bit force_bit);
    bus_write(REG_CTRL_W, {5'b0, force_bit, 2'(m)});
  endtask

  // Check the output bus for n clocks in the current mode.
  task automatic watch(input apb_mode_e m, input int n);
    logic [31:0] d;
    logic [35:0] mx_prev;
    logic [59:0] vx_prev;
    int strobes;
    strobes = 0;
    repeat (3) @(posedge clk);  // let the mode reach the output register
    #1;
    for (int t = 0; t < n; t++) begin
      mx_prev = dut.meanx;      // value the output register samples next
      vx_prev = dut.varx;
      @(posedge clk);
      #1;
      case (m)
        MODE_RAW: begin
          chk({io, ro} == hist[cyc - 1], "raw mode output is not the previous input");
          n_raw++;
        end
        MODE_BLANKED: begin
          d = hist[cyc - 1 - FILL - 1];
          if (blank) begin
            chk(ro == 16'h0 && io == 16'h0, "blanked sample is not zero");
            n_blanked_out++;
          end else begin
            chk({io, ro} == d, $sformatf("delayed output %h expected %h", {io, ro}, d));
            n_delay++;
            if (burst_hist[cyc - 1 - FILL - 1]) n_leaks++;
          end
          if (burst_hist[cyc - 1 - FILL - 1]) n_burst_out++;
        end
        MODE_DATA_FLAG: begin
          d = hist[cyc - 1 - FILL - 1];
          chk(ro == d[15:0] && io[15:1] == d[31:17] && io[0] == blank, "flag mode output");
          n_flag++;
        end
        MODE_MEAN_VAR: begin
          strobes += int'(stb);
          if (stb) begin
            chk(ro[14:0] == mx_prev[26:12] && ro[15] == blank, "mean field of mode 2");
            chk(io == vx_prev[35:20], "variance field of mode 2");
            n_meanvar++;
          end
        end
        default: ;
      endcase
    end
    if (m == MODE_MEAN_VAR) chk(strobes == n / 4, $sformatf("%0d strobes in %0d clocks", strobes, n));
  endtask

  initial begin
    logic [7:0] b;
    logic [63:0] v;
    logic [35:0] mean_snap;
    logic [59:0] var_snap;
    repeat (4) @(posedge clk);
    rst <= 1'b0;
    // ---- programming and read-back -----------------------------------------
    write16(REG_BETA2, BETA2_V);
    write16(REG_NWAIT, NWAIT_V);
    write16(REG_NBLANK, NBLANK_V);
    write16(REG_NSEP, NSEP_V);
    for (int i = 0; i < 3; i++) bus_write(REG_MEAN_RST + i, 8'(i == 1 ? 8'h20 : 8'h00)); // 8192
    for (int i = 0; i < 6; i++) bus_write(REG_VAR_RST + i, 8'h00);
    set_mode(MODE_RAW, 1'b0);
    bus_read(REG_BETA2, b);     chk(b == 8'(BETA2_V), "beta2 read-back");
    bus_read(REG_NWAIT, b);     chk(b == 8'(NWAIT_V), "nwait read-back");
    bus_read(REG_NBLANK, b);    chk(b == 8'(NBLANK_V), "nblank read-back");
    bus_read(REG_NSEP, b);      chk(b == 8'(NSEP_V), "nsep read-back");
    bus_read(REG_MEAN_RST + 1, b); chk(b == 8'h20, "mean reset read-back");
    bus_read(REG_CTRL_R, b);    chk(b == 8'h00, "control read before a snapshot");
    // ---- raw mode during start-up -------------------------------------------
    watch(MODE_RAW, 2000);
    chk(dut.u_init.force_updates, "start-up force phase not active");
    // ---- wait for start-up and FIFO fill ------------------------------------
    wait (dut.u_init.running);
    chk(cyc >= INIT + FILL, $sformatf("running after only %0d clocks", cyc));
    repeat (10) @(posedge clk);
    burst_on = 1'b1;
    // ---- blanked mode with bursts -------------------------------------------
    set_mode(MODE_BLANKED, 1'b0);
    watch(MODE_BLANKED, 15000);
    // ---- flag mode ----------------------------------------------------------
    set_mode(MODE_DATA_FLAG, 1'b0);
    watch(MODE_DATA_FLAG, 6000);
    // ---- mean/variance mode and snapshot read-back --------------------------
    set_mode(MODE_MEAN_VAR, 1'b0);
    watch(MODE_MEAN_VAR, 2000);
    @(negedge clk);
    snapshot = 1'b1;
    repeat (12) @(posedge clk);
    #1;
    @(negedge clk);
    snapshot = 1'b0;
    // the last snapshot was the last enable before snapshot fell
    mean_snap = dut.u_regs.proc_reg[5:1];
    var_snap  = dut.u_regs.proc_reg[13:6];
    v = '0;
    for (int i = 0; i < 5; i++) begin bus_read(REG_MEANX + i, b); v[8*i +: 8] = b; end
    chk(v[39:0] == 40'(mean_snap), "mean read-back");
    chk(v[35:12] > 24'd1000, $sformatf("mean %0d implausibly small", v[35:12]));
    v = '0;
    for (int i = 0; i < 8; i++) begin bus_read(REG_VARX + i, b); v[8*i +: 8] = b; end
    chk(v[59:0] == var_snap, "variance read-back");
    bus_read(REG_CTRL_R, b);
    chk(b == 8'h01, "control read carries apb_tmp");
    n_readback++;
    // ---- forced updates: with FORCE_UPDATE set no update is held ------------
    set_mode(MODE_BLANKED, 1'b1);
    n_forced_holdfree = n_holds;
    watch(MODE_BLANKED, 6000);
    chk(n_holds == n_forced_holdfree, "updates held although FORCE_UPDATE is set");
    // ---- parm_reset loads the initial mean ----------------------------------
    set_mode(MODE_RAW, 1'b0);
    @(negedge clk);
    parm_reset = 1'b1;
    repeat (8) @(posedge clk);
    @(negedge clk);
    parm_reset = 1'b0;
    #1;
    // loaded: mean = x2 + 8192 * (2^12 - 1) on the last enable of the pulse
    chk(dut.meanx[35:12] >= 24'd8190 && dut.meanx[35:12] <= 24'd8192 + 24'd600,
        $sformatf("mean after parm_reset %0d", dut.meanx[35:12]));
    n_load++;
    watch(MODE_RAW, 100);
    // ---- mechanism coverage -------------------------------------------------
    chk(n_force_init >= INIT, "start-up forcing shorter than INIT_CYCLES");
    chk(n_raw > 0 && n_delay > 0 && n_flag > 0 && n_meanvar > 0, "a mode was not exercised");
    chk(n_windows > 0, "no blank window");
    chk(n_blanked_out > 0, "no blanked output sample");
    chk(n_holds > 0, "mean/variance updates were never held");
    chk(n_burst_out > 0, "no burst reached the delayed output");
    chk(n_leaks == 0, $sformatf("%0d burst samples passed unblanked", n_leaks));
    $display("modes: raw=%0d blanked-mode delayed=%0d zeroed=%0d flag=%0d meanvar=%0d",
             n_raw, n_delay, n_blanked_out, n_flag, n_meanvar);
    $display("blank windows=%0d update holds=%0d burst samples=%0d leaked=%0d init force clocks=%0d",
             n_windows, n_holds, n_burst_out, n_leaks, n_force_init);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
