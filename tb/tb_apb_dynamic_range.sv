// tb_apb_dynamic_range: how small an input the running mean and variance can
// still follow, at N = L = 12.
//
// Ten processors each get their own complex Gaussian stream, quantized so
// that it occupies b = 1..10 bits of the 12-bit processed word: the
// components are scaled so that their peak is about 2^(b-1) - 1 (sigma =
// (2^(b-1) - 1) / 4.3) and truncated toward zero, then placed in the 12
// MSBs of the 16-bit bus.  All processors start from zero with updates
// always on, run 20000 processed samples to converge and are then averaged
// over 20000 more.  The testbench computes the true mean of |x|^2 and
// variance of |x|^2 of each stream.
//
// Expected behaviour: every update drops the L fraction bits of the weighted
// feedback (2^L - 1) * r, i.e. subtracts ceil(r / 2^L) instead of r / 2^L.
// In steady state E[ceil(r / 2^L)] equals the true mean, so the integer part
// floor(r / 2^L) sits about one LSB below it.  For b >= 4 the average integer
// mean must be the true mean minus 1 (+-0.5 LSB and +-2 %), the average
// integer variance within 1 LSB + 10 % of the true variance, and the mean
// must grow by about 2 bits per extra input bit.  For b <= 3 the true mean of
// |x|^2 is below one LSB and the integer mean must read zero: small inputs
// vanish from the statistics rather than being carried by the fraction
// bits.  The printout gives log2 of each value.
module tb_apb_dynamic_range;
  localparam int NB = 10;
  localparam int CONV = 20000, WINDOW = 20000;

  logic clk = 1'b0;
  logic rst = 1'b1;
  logic [15:0] re [NB];
  logic [15:0] im [NB];
  int checks = 0, failures = 0;
  logic measuring = 1'b0;

  real sum_m [NB], sum_v [NB];
  int  cnt   [NB];

  always #5 clk = ~clk;

  logic [NB-1:0] ce;

  for (genvar g = 0; g < NB; g++) begin : g_b
    logic [35:0] meanx;
    logic [59:0] varx;
    apb_processor #(.N(12), .L(12)) u_proc (
      .clk, .rst, .real_in(re[g]), .imag_in(im[g]), .load_parm(1'b0),
      .beta2(12'd16), .mean_reset('0), .var_reset('0),
      .force_updates(1'b1), .nwait(16'd0), .nblank(16'd0), .nsep(16'd0),
      .meanx, .varx, .blank(), .pulse(), .clock_enable(ce[g]));
    always @(posedge clk)
      if (measuring && ce[g]) begin
        sum_m[g] += real'(meanx[35:12]);
        sum_v[g] += real'(varx[59:12]);
        cnt[g]++;
      end
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", msg);
    end
  endtask

  function automatic real log2r(input real v);
    return (v > 0.0) ? $ln(v) / $ln(2.0) : -99.0;
  endfunction

  initial begin
    real u1, u2, r, th, sigma, pm, pv;
    int  qr, qi, enables, pk;
    real s1 [NB], s2 [NB];
    longint x2, nsamp;
    foreach (re[g]) begin re[g] = '0; im[g] = '0; end
    foreach (s1[g]) begin
      s1[g] = 0.0; s2[g] = 0.0; sum_m[g] = 0.0; sum_v[g] = 0.0; cnt[g] = 0;
    end
    enables = 0;
    nsamp = 0;
    repeat (2) @(posedge clk);
    rst <= 1'b0;
    while (enables < CONV + WINDOW) begin
      for (int g = 0; g < NB; g++) begin
        pk    = (1 << g) - 1;                  // b = g + 1 bits occupied
        sigma = real'(pk) / 4.3;
        u1 = (real'($urandom) + 1.0) / 4294967296.0;
        u2 = real'($urandom) / 4294967296.0;
        r  = $sqrt(-2.0 * $ln(u1)) * sigma;
        th = 6.283185307179586 * u2;
        qr = int'($rtoi(r * $cos(th)));
        qi = int'($rtoi(r * $sin(th)));
        if (qr > pk) qr = pk;
        if (qr < -pk) qr = -pk;
        if (qi > pk) qi = pk;
        if (qi < -pk) qi = -pk;
        re[g] <= 16'(qr * 16);
        im[g] <= 16'(qi * 16);
        x2 = longint'(qr * qr + qi * qi);
        s1[g] += real'(x2);
        s2[g] += real'(x2) * real'(x2);
      end
      nsamp++;
      measuring <= (enables >= CONV);
      #1;
      if (ce[0]) enables++;
      @(posedge clk);
    end
    measuring <= 1'b0;

    $display(" bits | log2 true mean | log2 est. mean | log2 true var | log2 est. var");
    for (int g = 0; g < NB; g++) begin
      real tm, tv;
      tm = s1[g] / real'(nsamp);
      tv = s2[g] / real'(nsamp) - tm * tm;
      pm = sum_m[g] / real'(cnt[g]);
      pv = sum_v[g] / real'(cnt[g]);
      $display(" %4d | %14.2f | %14.2f | %13.2f | %13.2f   (mean %0.2f vs %0.2f)",
               g + 1, log2r(tm), log2r(pm), log2r(tv), log2r(pv), pm, tm);
      chk(cnt[g] > WINDOW - 10, $sformatf("b=%0d: %0d samples in window", g + 1, cnt[g]));
      if (g + 1 >= 4) begin
        chk(pm > tm - 1.5 - 0.02 * tm && pm < tm - 0.5 + 0.02 * tm,
            $sformatf("b=%0d: mean %0.3f, true %0.3f (expected about 1 LSB low)", g + 1, pm, tm));
        chk(pv > 0.9 * tv - 1.0 && pv < 1.1 * tv + 1.0,
            $sformatf("b=%0d: variance %0.3f, true %0.3f", g + 1, pv, tv));
      end
      if (g + 1 <= 3) begin
        chk(tm < 1.0, $sformatf("b=%0d: true mean %0.3f not below one LSB", g + 1, tm));
        chk(pm == 0.0, $sformatf("b=%0d: integer mean %0.3f, expected 0", g + 1, pm));
      end
      if (g >= 4)
        chk(log2r(sum_m[g] / real'(cnt[g])) - log2r(sum_m[g-1] / real'(cnt[g-1])) > 1.5,
            $sformatf("b=%0d: mean did not grow by about 2 bits", g + 1));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
