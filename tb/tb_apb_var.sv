// tb_apb_var: checks stage 3 against a 128-bit integer model: |x|^2 delayed
// by one enable, minus the integer mean, squared (dev2), then
// varx <= dev2 + floor((2^L - 1) * varx / 2^L), with update holds and
// load_parm pulses.  The mean input is random, including values above |x|^2,
// so negative differences are covered.
module tb_apb_var;
  localparam int N = 12, L = 12;
  logic clk = 1'b0;
  logic rst = 1'b1;
  logic ce = 1'b0, upd = 1'b1, load = 1'b0;
  logic [4*N-1:0]   vrst = '0;
  logic [2*N-1:0]   x2 = '0, mint = '0;
  logic [4*N-1:0]   dev2;
  logic [4*N+L-1:0] varx;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  apb_var #(.N(N), .L(L)) dut (.clk, .rst, .clock_enable(ce), .update_enable(upd),
                               .load_parm(load), .var_reset(vrst), .x2, .mean_int(mint),
                               .dev2, .varx);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [127:0] v, fb, d2, x2d, d2_next;
    longint diff, dreg;
    int n_neg;
    v = '0; d2 = '0; dreg = 0; x2d = '0; d2_next = '0; n_neg = 0;
    repeat (2) @(posedge clk);
    rst <= 1'b0;
    for (int k = 0; k < 5000; k++) begin
      repeat ($urandom_range(0, 2)) begin ce <= 1'b0; @(posedge clk); end
      x2   <= (2*N)'($urandom_range(0, 2**(2*N-1)));
      mint <= (k % 5 == 0) ? (2*N)'($urandom) : (2*N)'($urandom_range(0, 2**(2*N-1)));
      vrst <= {$urandom, $urandom};
      upd  <= ($urandom_range(0, 9) != 0);
      load <= ($urandom_range(0, 49) == 0);
      ce   <= 1'b1;
      #1;
      // model of the edge: all registers use pre-edge values
      diff    = longint'(x2d) - longint'(mint);
      if (diff < 0) n_neg++;
      fb      = load ? (128'(vrst) << L) : v;
      if (upd || load) v = d2 + ((fb * ((128'(1) << L) - 1)) >> L);
      d2_next = 128'(dreg * dreg);
      d2      = d2_next;
      dreg    = diff;
      x2d     = 128'(x2);
      @(posedge clk);
      ce <= 1'b0;
      #1;
      checks++;
      if (128'(dev2) != d2) begin
        failures++;
        if (failures < 10) $display("update %0d: dev2=%0d expected %0d", k, dev2, d2);
      end
      checks++;
      if (128'(varx) != v) begin
        failures++;
        if (failures < 10) $display("update %0d: varx=%0d expected %0d", k, varx, v);
      end
    end
    checks++;
    if (n_neg == 0) begin failures++; $display("no negative difference exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
