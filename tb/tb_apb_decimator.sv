// tb_apb_decimator: checks that the decimation controller produces exactly
// one enable every DECIM clocks, starting in the first clock after reset,
// for the default DECIM = 4 and for DECIM = 3.
module tb_apb_decimator;
  logic clk = 1'b0;
  logic rst = 1'b1;
  logic ce4, ce3;
  int   checks = 0, failures = 0;

  always #5 clk = ~clk;

  apb_decimator               dut4 (.clk, .rst, .clock_enable(ce4));
  apb_decimator #(.DECIM(3))  dut3 (.clk, .rst, .clock_enable(ce3));

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n4, n3;
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    n4 = 0; n3 = 0;
    for (int t = 0; t < 400; t++) begin
      @(posedge clk);
      #1;
      // after t+1 clocks out of reset the phase is (t+1) mod DECIM
      checks++;
      if (ce4 !== (((t + 1) % 4) == 0)) begin
        failures++; $display("DECIM=4 clock %0d: ce=%0b", t, ce4);
      end
      checks++;
      if (ce3 !== (((t + 1) % 3) == 0)) begin
        failures++; $display("DECIM=3 clock %0d: ce=%0b", t, ce3);
      end
      n4 += int'(ce4);
      n3 += int'(ce3);
    end
    checks++;
    if (n4 != 100) begin failures++; $display("rate: %0d enables in 400 clocks", n4); end
    checks++;
    if (n3 != 133) begin failures++; $display("rate: %0d enables in 400 clocks (DECIM=3)", n3); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
