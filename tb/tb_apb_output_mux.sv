// tb_apb_output_mux: random inputs in all four modes; each registered output
// is compared one clock later with the mode's definition (raw pass-through;
// {blank, mean[L+14:L]} and variance[L+23:L+8] with the enable as strobe;
// zeroed FIFO data while blank; FIFO data with the blank flag in the
// imaginary LSB).
module tb_apb_output_mux;
  import apb_pkg::*;
  localparam int N = 12, L = 12;
  logic clk = 1'b0;
  logic rst = 1'b1;
  apb_mode_e mode = MODE_RAW;
  logic [15:0] ri = '0, ii = '0, ro, io;
  logic [31:0] fq = '0;
  logic bl = 1'b0, ce = 1'b0, blo, stb;
  logic [2*N+L-1:0] mx = '0;
  logic [4*N+L-1:0] vx = '0;
  int checks = 0, failures = 0;
  int seen[4] = '{0, 0, 0, 0};

  always #5 clk = ~clk;

  apb_output_mux #(.N(N), .L(L)) dut (.clk, .rst, .mode, .real_in(ri), .imag_in(ii),
    .fifo_q(fq), .blank(bl), .clock_enable(ce), .meanx(mx), .varx(vx),
    .real_out(ro), .imag_out(io), .blank_out(blo), .out_strobe(stb));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] er, ei;
    logic eb, es;
    repeat (2) @(posedge clk);
    rst <= 1'b0;
    for (int k = 0; k < 4000; k++) begin
      mode <= apb_mode_e'(2'($urandom));
      ri <= 16'($urandom); ii <= 16'($urandom); fq <= $urandom;
      bl <= 1'($urandom); ce <= 1'($urandom);
      mx <= {$urandom, $urandom}; vx <= {$urandom, $urandom};
      #1;
      unique case (mode)
        MODE_RAW:       begin er = ri; ei = ii; eb = 1'b0; es = 1'b1; end
        MODE_MEAN_VAR:  begin er = {bl, mx[26:12]}; ei = vx[35:20]; eb = bl; es = ce; end
        MODE_BLANKED:   begin er = bl ? 16'h0 : fq[15:0]; ei = bl ? 16'h0 : fq[31:16];
                              eb = bl; es = 1'b1; end
        MODE_DATA_FLAG: begin er = fq[15:0]; ei = {fq[31:17], bl}; eb = bl; es = 1'b1; end
      endcase
      seen[int'(mode)]++;
      @(posedge clk);
      #1;
      checks++;
      if (ro !== er || io !== ei || blo !== eb || stb !== es) begin
        failures++;
        if (failures < 10) $display("mode %0d: out %h %h %b %b expected %h %h %b %b",
                                    mode, ro, io, blo, stb, er, ei, eb, es);
      end
    end
    for (int m = 0; m < 4; m++) begin
      checks++;
      if (seen[m] == 0) begin failures++; $display("mode %0d never used", m); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
