// tb_apb_init_ctrl: runs the start-up controller with INIT_CYCLES = 100 and
// FILL_LEN = 20 and checks the duration of each phase in clocks: forced
// updates for 1 + INIT_CYCLES clocks after reset, one FIFO-clear clock,
// FILL_LEN write-only clocks, then write and read for ever.  A second
// instance checks the default INIT_CYCLES = 262144.
module tb_apb_init_ctrl;
  logic clk = 1'b0;
  logic rst = 1'b1;
  logic frc, clr, wr, rd, run;
  logic frc_d, clr_d, wr_d, rd_d, run_d;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  apb_init_ctrl #(.INIT_CYCLES(100), .FILL_LEN(20)) dut (
    .clk, .rst, .force_updates(frc), .fifo_clr(clr), .fifo_wr(wr), .fifo_rd(rd), .running(run));
  apb_init_ctrl dut_def (
    .clk, .rst, .force_updates(frc_d), .fifo_clr(clr_d), .fifo_wr(wr_d), .fifo_rd(rd_d),
    .running(run_d));

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
      if (failures < 10) $display("%t: %s", $time, what);
    end
  endtask

  initial begin
    int n_force, n_def;
    bit exp_frc, exp_clr, exp_wr, exp_rd;
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    #1;
    // clock index t counts clocks since reset was released
    for (int t = 0; t < 300; t++) begin
      exp_frc = (t < 101);
      exp_clr = (t < 102);
      exp_wr  = (t >= 102);
      exp_rd  = (t >= 122);
      chk(frc == exp_frc, $sformatf("t=%0d force=%0b", t, frc));
      chk(clr == exp_clr, $sformatf("t=%0d clr=%0b", t, clr));
      chk(wr == exp_wr,   $sformatf("t=%0d wr=%0b", t, wr));
      chk(rd == exp_rd,   $sformatf("t=%0d rd=%0b", t, rd));
      chk(run == exp_rd,  $sformatf("t=%0d running=%0b", t, run));
      @(posedge clk);
      #1;
    end
    // default size: forced updates last 262144 clocks after the reset state
    n_def = 300;
    while (frc_d) begin @(posedge clk); #1; n_def++; end
    chk(n_def == 262145, $sformatf("default force phase %0d clocks", n_def));
    repeat (1100) @(posedge clk);
    #1;
    chk(run_d && rd_d && wr_d, "default controller not running after the fill");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
