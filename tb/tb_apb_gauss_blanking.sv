// tb_apb_gauss_blanking: fraction of a Gaussian input that the detector
// flags, for beta = 1..8 (beta^2 = 1, 4, ..., 64), N = L = 12, variance always
// updated (force_updates = 1), 20000 processed samples after convergence.
// Eight processors see the same complex Gaussian stream (sigma = 400 LSB per
// component at 12 bits, generated by the Box-Muller method and truncated
// toward zero).  Their mean and variance are preloaded with the expected
// values (2 sigma^2 and (2 sigma^2)^2) through load_parm, then 8000 processed
// samples settle the averages before counting.
// For |x|^2 exponentially distributed the flagged fraction is about
// exp(-(1 + beta)); the reference values below are the measured percentages
// published for this experiment: 13.4, 4.84, 1.91, 0.74, 0.33, 0.13, 0.05,
// 0.01 %.  A result passes when it lies within four binomial standard
// deviations plus 15 % of the reference.
module tb_apb_gauss_blanking;
  localparam int N = 12, L = 12;
  localparam int SETTLE = 8000, COUNT = 20000;
  localparam real SIGMA = 400.0;
  localparam real REF_PCT [8] = '{13.4, 4.84, 1.91, 0.74, 0.33, 0.13, 0.05, 0.01};

  logic clk = 1'b0;
  logic rst = 1'b1;
  logic [15:0] re = '0, im = '0;
  logic load = 1'b0;
  logic [7:0] pulse, ce, blank;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  for (genvar b = 0; b < 8; b++) begin : g_beta
    logic [2*N+L-1:0] meanx;
    logic [4*N+L-1:0] varx;
    apb_processor #(.N(N), .L(L)) u_proc (
      .clk, .rst, .real_in(re), .imag_in(im), .load_parm(load),
      .beta2(L'((b + 1) * (b + 1))),
      .mean_reset((2*N)'(longint'(2.0 * SIGMA * SIGMA))),
      .var_reset((4*N)'(longint'(4.0 * SIGMA * SIGMA * SIGMA * SIGMA))),
      .force_updates(1'b1), .nwait(16'd0), .nblank(16'd0), .nsep(16'd0),
      .meanx, .varx, .blank(blank[b]), .pulse(pulse[b]), .clock_enable(ce[b]));
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [15:0] quant(input real v);
    int q;
    q = int'($rtoi(v));            // truncation toward zero
    if (q > 2047) q = 2047;
    if (q < -2047) q = -2047;
    return 16'(q <<< 4);           // N MSBs of the 16-bit bus
  endfunction

  initial begin
    real u1, u2, r, th, pct, tol, p;
    int hits [8];
    int enables;
    foreach (hits[i]) hits[i] = 0;
    enables = 0;
    repeat (2) @(posedge clk);
    rst <= 1'b0;
    while (enables < SETTLE + COUNT) begin
      u1 = (real'($urandom) + 1.0) / 4294967296.0;
      u2 = real'($urandom) / 4294967296.0;
      r  = $sqrt(-2.0 * $ln(u1)) * SIGMA;
      th = 6.283185307179586 * u2;
      re   <= quant(r * $cos(th));
      im   <= quant(r * $sin(th));
      load <= (enables < 2);
      #1;
      if (ce[0]) begin
        if (enables >= SETTLE) for (int b = 0; b < 8; b++) hits[b] += int'(pulse[b]);
        enables++;
      end
      @(posedge clk);
    end
    for (int b = 0; b < 8; b++) begin
      pct = 100.0 * real'(hits[b]) / real'(COUNT);
      p   = REF_PCT[b] / 100.0;
      tol = 100.0 * (4.0 * $sqrt(p * (1.0 - p) / real'(COUNT))) + 0.15 * REF_PCT[b];
      checks++;
      if (pct > REF_PCT[b] + tol || pct < REF_PCT[b] - tol) begin
        failures++;
        $display("beta=%0d: %0.3f %% flagged, reference %0.2f %% (tolerance %0.3f)",
                 b + 1, pct, REF_PCT[b], tol);
      end else
        $display("beta=%0d: %0.3f %% flagged, reference %0.2f %%", b + 1, pct, REF_PCT[b]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
