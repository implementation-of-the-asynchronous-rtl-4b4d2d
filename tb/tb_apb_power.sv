// tb_apb_power: drives random signed I/Q samples with an irregular enable and
// checks that |x|^2 = i^2 + q^2 of the sample captured at one enable appears
// on x2 after the third enable.  Extreme values (-2^(N-1)) are included.
module tb_apb_power;
  localparam int N = 12;
  logic clk = 1'b0;
  logic rst = 1'b1;
  logic ce = 1'b0;
  logic signed [N-1:0] xr = '0, xi = '0;
  logic [2*N-1:0] x2;
  int checks = 0, failures = 0;
  longint hist[$];

  always #5 clk = ~clk;

  apb_power #(.N(N)) dut (.clk, .rst, .clock_enable(ce), .x_real(xr), .x_imag(xi), .x2);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint r, i, exp_p;
    repeat (2) @(posedge clk);
    rst <= 1'b0;
    for (int k = 0; k < 3000; k++) begin
      // idle clocks between enables must not advance the pipeline
      repeat ($urandom_range(0, 3)) begin
        xr <= N'($urandom); xi <= N'($urandom); ce <= 1'b0;
        @(posedge clk);
      end
      if (k % 97 == 5) begin
        r = -(2**(N-1)); i = -(2**(N-1));
      end else begin
        r = longint'($signed(N'($urandom))); i = longint'($signed(N'($urandom)));
      end
      xr <= N'(r); xi <= N'(i); ce <= 1'b1;
      hist.push_back(r*r + i*i);
      @(posedge clk);
      ce <= 1'b0;
      #1;
      if (hist.size() >= 3) begin
        exp_p = hist[hist.size()-3];
        checks++;
        if (longint'(x2) != exp_p) begin
          failures++;
          if (failures < 10) $display("enable %0d: x2=%0d expected %0d", k, x2, exp_p);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
