// tb_apb_mean: checks the running mean register against an exact integer
// model of  meanx <= x2 + floor((2^L - 1) * meanx / 2^L), with random x2,
// random gaps between enables, update_enable dropped at random (register must
// hold) and load_parm pulses (feedback taken from {mean_reset, L zeros}).
// A second instance with L = 4 checks convergence: a constant input c drives
// the integer mean to within one LSB of c.
module tb_apb_mean;
  localparam int N = 12, L = 12;
  logic clk = 1'b0;
  logic rst = 1'b1;
  logic ce = 1'b0, upd = 1'b1, load = 1'b0;
  logic [2*N-1:0] mrst = '0, x2 = '0;
  logic [2*N+L-1:0] meanx;
  logic [2*N+4-1:0] meanx4;
  int checks = 0, failures = 0;
  int n_load = 0, n_hold = 0;

  always #5 clk = ~clk;

  apb_mean #(.N(N), .L(L)) dut (.clk, .rst, .clock_enable(ce), .update_enable(upd),
                                .load_parm(load), .mean_reset(mrst), .x2, .meanx);
  apb_mean #(.N(N), .L(4)) dut4 (.clk, .rst, .clock_enable(ce), .update_enable(1'b1),
                                 .load_parm(1'b0), .mean_reset('0), .x2, .meanx(meanx4));

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint m, fb, xv;
    m = 0;
    repeat (2) @(posedge clk);
    rst <= 1'b0;
    for (int k = 0; k < 5000; k++) begin
      repeat ($urandom_range(0, 2)) begin ce <= 1'b0; @(posedge clk); end
      xv = longint'($urandom_range(0, 2**(2*N-1)));
      x2   <= (2*N)'(xv);
      upd  <= ($urandom_range(0, 9) != 0);
      load <= ($urandom_range(0, 49) == 0);
      mrst <= (2*N)'($urandom_range(0, 2**(2*N-1)));
      ce   <= 1'b1;
      #1;
      if (load) begin fb = longint'(mrst) << L; n_load++; end
      else fb = m;
      if (upd || load) m = xv + ((fb * ((1 << L) - 1)) >> L);
      else n_hold++;
      @(posedge clk);
      ce <= 1'b0;
      #1;
      checks++;
      if (longint'(meanx) != m) begin
        failures++;
        if (failures < 10) $display("update %0d: meanx=%0d expected %0d", k, meanx, m);
      end
    end
    checks++;
    if (n_load == 0 || n_hold == 0) begin failures++; $display("load/hold never exercised"); end
    // convergence of the L = 4 instance to a constant input
    x2 <= 24'd5000;
    repeat (400) begin ce <= 1'b1; @(posedge clk); end
    ce <= 1'b0;
    #1;
    checks++;
    if (meanx4[2*N+4-1:4] < 24'd4999 || meanx4[2*N+4-1:4] > 24'd5000) begin
      failures++; $display("L=4 mean did not converge: %0d", meanx4[2*N+4-1:4]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
