// tb_apb_convergence: convergence and steady-state ripple of the running
// mean and variance, for the time-constant widths L = 9..16 (at N = 12) and
// for the processed widths N = 8, 10, 14, 16 (at L = 12).
//
// Thirteen processors see one complex Gaussian stream on the 16-bit input
// bus (sigma = 7440 per component, i.e. 465 LSB at N = 12, about the level
// of a full-scale 12-bit Gaussian whose peak over 40000 samples just fits).
// Each processor takes the top N bits.  force_updates is held high, so the
// averages are never frozen.  The testbench works out the true mean of |x|^2
// and of (|x|^2 - mean)^2 for every N from the samples it generates.
//
//  * L = 9..16 (N = 12) and N = 8, 10, 14, 16 (L = 12) start from preset
//    values (the true expectations, loaded through load_parm).  Over a window
//    of 20000 processed samples after 20000 more of settling, the integer
//    parts of mean and variance must average to the true values (within 5 %
//    and 12 %), and their peak-to-peak ripple, 100 (max - min) / average, is
//    compared with the published ripple table (9: 16 % / 62 %, 10: 13 / 35,
//    11: 7 / 17, 12: 4 / 13, 13: 2 / 6, 14: 1 / 3, 15: 0.5 / 1.0,
//    16: 0.3 / 0.9 % for mean / variance).  The check is a factor of three
//    either way, since the ripple of one noise record is itself random; the
//    ripple must also shrink as L grows (each step at most 1.3 x the last).
//  * One L = 12, N = 12 processor starts from zero.  After one time constant
//    (4096 processed samples) its mean must be 1 - 1/e = 63 % of the true
//    value (+-8 %), and after 20000 samples, the published convergence time,
//    within 5 % of it.
// The expected values are statistics of the stimulus, independent of the
// design; the ripple bounds are deliberately loose.
module tb_apb_convergence;
  localparam int NL = 8;                        // L = 9 .. 16 at N = 12
  localparam int NN = 4;                        // N = 8, 10, 14, 16 at L = 12
  localparam int N_LIST [NN] = '{8, 10, 14, 16};
  localparam int CONV = 20000, WINDOW = 20000;
  localparam real SIGMA16 = 7440.0;
  localparam real REF_MEAN [NL] = '{16.0, 13.0, 7.0, 4.0, 2.0, 1.0, 0.5, 0.3};
  localparam real REF_VAR  [NL] = '{62.0, 35.0, 17.0, 13.0, 6.0, 3.0, 1.0, 0.9};

  logic clk = 1'b0;
  logic rst = 1'b1;
  logic [15:0] re = '0, im = '0;
  logic load = 1'b0;
  logic measuring = 1'b0;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  // True statistics per N, filled in by the stimulus process.
  real true_mean [17];
  real true_var  [17];

  // Window statistics: index 0..7 for L = 9..16, 8..11 for the N list.
  real w_min_m [NL+NN], w_max_m [NL+NN], w_sum_m [NL+NN];
  real w_min_v [NL+NN], w_max_v [NL+NN], w_sum_v [NL+NN];
  int  w_cnt   [NL+NN];

  logic ce;

  task automatic record(input int k, input real m, input real v);
    if (w_cnt[k] == 0) begin
      w_min_m[k] = m; w_max_m[k] = m; w_min_v[k] = v; w_max_v[k] = v;
      w_sum_m[k] = 0.0; w_sum_v[k] = 0.0;
    end
    if (m < w_min_m[k]) w_min_m[k] = m;
    if (m > w_max_m[k]) w_max_m[k] = m;
    if (v < w_min_v[k]) w_min_v[k] = v;
    if (v > w_max_v[k]) w_max_v[k] = v;
    w_sum_m[k] += m;
    w_sum_v[k] += v;
    w_cnt[k]++;
  endtask

  // Preset values for N = 12 (the presets of the other sizes scale by 4^(N-12)).
  localparam real S12 = SIGMA16 / 16.0;
  localparam real M12 = 2.0 * S12 * S12;

  for (genvar g = 0; g < NL; g++) begin : g_l
    localparam int L = 9 + g;
    logic [2*12+L-1:0] meanx;
    logic [4*12+L-1:0] varx;
    logic              ce_l;
    apb_processor #(.N(12), .L(L)) u_proc (
      .clk, .rst, .real_in(re), .imag_in(im), .load_parm(load),
      .beta2(L'(16)),
      .mean_reset(24'(longint'(M12))), .var_reset(48'(longint'(M12 * M12))),
      .force_updates(1'b1), .nwait(16'd0), .nblank(16'd0), .nsep(16'd0),
      .meanx, .varx, .blank(), .pulse(), .clock_enable(ce_l));
    always @(posedge clk)
      if (measuring && ce_l)
        record(g, real'(meanx[2*12+L-1:L]), real'(varx[4*12+L-1:L]));
  end

  for (genvar g = 0; g < NN; g++) begin : g_n
    localparam int N = N_LIST[g];
    localparam real SN = SIGMA16 / real'(1 << (16 - N));
    localparam real MN = 2.0 * SN * SN;
    logic [2*N+12-1:0] meanx;
    logic [4*N+12-1:0] varx;
    logic              ce_n;
    apb_processor #(.N(N), .L(12)) u_proc (
      .clk, .rst, .real_in(re), .imag_in(im), .load_parm(load),
      .beta2(12'd16),
      .mean_reset((2*N)'(longint'(MN))), .var_reset((4*N)'(longint'(MN * MN))),
      .force_updates(1'b1), .nwait(16'd0), .nblank(16'd0), .nsep(16'd0),
      .meanx, .varx, .blank(), .pulse(), .clock_enable(ce_n));
    always @(posedge clk)
      if (measuring && ce_n)
        record(NL + g, real'(meanx[2*N+11:12]), real'(varx[4*N+11:12]));
  end

  // Processor that starts from zero (never loaded).
  logic [35:0] z_meanx;
  logic [59:0] z_varx;
  apb_processor #(.N(12), .L(12)) u_zero (
    .clk, .rst, .real_in(re), .imag_in(im), .load_parm(1'b0),
    .beta2(12'd16), .mean_reset('0), .var_reset('0),
    .force_updates(1'b1), .nwait(16'd0), .nblank(16'd0), .nsep(16'd0),
    .meanx(z_meanx), .varx(z_varx), .blank(), .pulse(), .clock_enable(ce));

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

  function automatic int clip16(input real v);
    int q;
    q = int'($rtoi(v));            // truncation toward zero
    if (q > 32767) q = 32767;
    if (q < -32767) q = -32767;
    return q;
  endfunction

  initial begin
    real u1, u2, r, th, pm, pv, rm, rv, prev_m, prev_v, z_at_tau;
    int  qr, qi, enables;
    real s1 [17], s2 [17];        // sums of x2 and x2^2 per N
    longint x2, nsamp;
    foreach (w_cnt[k]) w_cnt[k] = 0;
    foreach (s1[n]) begin s1[n] = 0.0; s2[n] = 0.0; end
    enables = 0;
    nsamp = 0;
    z_at_tau = 0.0;
    repeat (2) @(posedge clk);
    rst <= 1'b0;
    while (enables < CONV + WINDOW) begin
      u1 = (real'($urandom) + 1.0) / 4294967296.0;
      u2 = real'($urandom) / 4294967296.0;
      r  = $sqrt(-2.0 * $ln(u1)) * SIGMA16;
      th = 6.283185307179586 * u2;
      qr = clip16(r * $cos(th));
      qi = clip16(r * $sin(th));
      re <= 16'(qr);
      im <= 16'(qi);
      for (int n = 8; n <= 16; n += 2) begin
        x2 = (longint'(qr) >>> (16 - n)) * (longint'(qr) >>> (16 - n))
           + (longint'(qi) >>> (16 - n)) * (longint'(qi) >>> (16 - n));
        s1[n] += real'(x2);
        s2[n] += real'(x2) * real'(x2);
      end
      nsamp++;
      load      <= (enables < 2);
      measuring <= (enables >= CONV);
      #1;
      if (ce) begin
        enables++;
        if (enables == 4096) z_at_tau = real'(z_meanx[35:12]);
      end
      @(posedge clk);
    end
    measuring <= 1'b0;

    for (int n = 8; n <= 16; n += 2) begin
      true_mean[n] = s1[n] / real'(nsamp);
      true_var[n]  = s2[n] / real'(nsamp) - true_mean[n] * true_mean[n];
    end

    // Start from zero: one time constant and the published convergence time.
    chk(z_at_tau > 0.55 * true_mean[12] && z_at_tau < 0.71 * true_mean[12],
        $sformatf("from zero: mean after 4096 samples %0.0f, expected 63 %% of %0.0f",
                  z_at_tau, true_mean[12]));
    $display("from zero: mean after 4096 samples is %0.1f %% of the true mean",
             100.0 * z_at_tau / true_mean[12]);
    chk(real'(z_meanx[35:12]) > 0.95 * true_mean[12] && real'(z_meanx[35:12]) < 1.05 * true_mean[12],
        $sformatf("from zero: mean after %0d samples %0d, true %0.0f",
                  CONV + WINDOW, z_meanx[35:12], true_mean[12]));

    prev_m = 1.0e9;
    prev_v = 1.0e9;
    for (int k = 0; k < NL + NN; k++) begin
      int n, l;
      n  = (k < NL) ? 12 : N_LIST[k - NL];
      l  = (k < NL) ? 9 + k : 12;
      pm = w_sum_m[k] / real'(w_cnt[k]);
      pv = w_sum_v[k] / real'(w_cnt[k]);
      rm = 100.0 * (w_max_m[k] - w_min_m[k]) / pm;
      rv = 100.0 * (w_max_v[k] - w_min_v[k]) / pv;
      $display("N=%0d L=%0d: mean %0.1f (true %0.1f), variance %0.4g (true %0.4g), ripple %0.2f %% / %0.2f %%",
               n, l, pm, true_mean[n], pv, true_var[n], rm, rv);
      chk(w_cnt[k] > WINDOW - 10, $sformatf("N=%0d L=%0d: %0d samples in window", n, l, w_cnt[k]));
      chk(pm > 0.95 * true_mean[n] && pm < 1.05 * true_mean[n],
          $sformatf("N=%0d L=%0d: average mean %0.1f, true %0.1f", n, l, pm, true_mean[n]));
      chk(pv > 0.88 * true_var[n] && pv < 1.12 * true_var[n],
          $sformatf("N=%0d L=%0d: average variance %0.4g, true %0.4g", n, l, pv, true_var[n]));
      if (k < NL) begin
        chk(rm < 3.0 * REF_MEAN[k] && rm > REF_MEAN[k] / 3.0,
            $sformatf("L=%0d: mean ripple %0.2f %%, published %0.1f %%", l, rm, REF_MEAN[k]));
        chk(rv < 3.0 * REF_VAR[k] && rv > REF_VAR[k] / 3.0,
            $sformatf("L=%0d: variance ripple %0.2f %%, published %0.1f %%", l, rv, REF_VAR[k]));
        chk(rm < 1.3 * prev_m && rv < 1.3 * prev_v,
            $sformatf("L=%0d: ripple did not shrink (%0.2f / %0.2f after %0.2f / %0.2f)",
                      l, rm, rv, prev_m, prev_v));
        prev_m = rm;
        prev_v = rv;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
