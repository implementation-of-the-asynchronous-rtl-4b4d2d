// tb_apb_detect: random and boundary checks of the pulse comparator:
// pulse = dev2 >= beta2 * floor(varx / 2^L), computed here with 128-bit
// arithmetic.
module tb_apb_detect;
  localparam int N = 12, L = 12;
  logic [L-1:0]     beta2;
  logic [4*N-1:0]   dev2;
  logic [4*N+L-1:0] varx;
  logic             pulse;
  int checks = 0, failures = 0;

  apb_detect #(.N(N), .L(L)) dut (.beta2, .dev2, .varx, .pulse);

  function automatic logic [127:0] rnd128();
    return {$urandom, $urandom, $urandom, $urandom};
  endfunction

  task automatic check_one();
    logic [127:0] thr, d;
    logic exp_p;
    #1;
    thr   = 128'(beta2) * (128'(varx) >> L);
    d     = 128'(dev2);
    exp_p = (d >= thr);
    checks++;
    if (pulse !== exp_p) begin
      failures++;
      if (failures < 10) $display("beta2=%0d dev2=%0d varx=%0d pulse=%0b exp=%0b",
                                  beta2, dev2, varx, pulse, exp_p);
    end
  endtask

  initial begin
    logic [127:0] thr;
    for (int k = 0; k < 20000; k++) begin
      beta2 = L'($urandom_range(0, 70));
      varx  = (4*N+L)'(rnd128() >> $urandom_range(64, 127));
      case (k % 4)
        0: dev2 = (4*N)'(rnd128() >> $urandom_range(80, 127));
        default: begin
          // place dev2 at, just below or just above the threshold
          thr  = 128'(beta2) * (128'(varx) >> L);
          dev2 = (4*N)'(thr + 128'($signed($urandom_range(0, 2)) - 1));
          if (thr >= (128'(1) << (4*N))) dev2 = '1;
        end
      endcase
      check_one();
    end
    // zero variance: everything is a pulse
    beta2 = 5; varx = '0; dev2 = '0; check_one();
    // largest values
    beta2 = '1; varx = '1; dev2 = '1; check_one();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
