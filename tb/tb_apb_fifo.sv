// tb_apb_fifo: random write/read traffic against a queue model (contents,
// usedw, empty, full, ignored writes when full and reads when empty, clear),
// then the delay-line use: fill to DEPTH-1 words, write and read every clock,
// and check that q is the word written DEPTH-1 clocks earlier.
module tb_apb_fifo;
  localparam int W = 32, D = 16;
  logic clk = 1'b0;
  logic clr = 1'b1, wr = 1'b0, rd = 1'b0;
  logic [W-1:0] din = '0, q;
  logic empty, full;
  logic [$clog2(D+1)-1:0] usedw;
  int checks = 0, failures = 0;
  int n_full = 0, n_empty_rd = 0;
  logic [W-1:0] model[$];
  logic [W-1:0] exp_q;

  always #5 clk = ~clk;

  apb_fifo #(.WIDTH(W), .DEPTH(D)) dut (.clk, .clr, .wrreq(wr), .data(din), .rdreq(rd),
                                        .q, .empty, .full, .usedw);

  initial begin
    repeat (100000) @(posedge clk);
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
    bit do_rd, do_wr;
    exp_q = '0;
    repeat (2) @(posedge clk);
    clr <= 1'b0;
    for (int k = 0; k < 5000; k++) begin
      wr  <= ($urandom_range(0, 99) < ((k / 500) % 2 ? 70 : 30));
      rd  <= ($urandom_range(0, 99) < ((k / 500) % 2 ? 30 : 70));
      din <= $urandom;
      clr <= (k == 2500);
      #1;
      do_rd = rd && model.size() > 0;
      do_wr = wr && (model.size() < D || do_rd);
      if (full) n_full++;
      if (rd && empty) n_empty_rd++;
      @(posedge clk);
      if (clr) begin
        model.delete(); exp_q = '0;
      end else begin
        if (do_rd) exp_q = model.pop_front();
        if (do_wr) model.push_back(din);
      end
      #1;
      chk(int'(usedw) == model.size(), $sformatf("usedw %0d expected %0d", usedw, model.size()));
      chk(empty == (model.size() == 0), "empty flag");
      chk(full == (model.size() == D), "full flag");
      chk(q == exp_q, $sformatf("q %h expected %h", q, exp_q));
    end
    chk(n_full > 0 && n_empty_rd > 0, "full and empty never reached");
    // delay line: fill D-1, then write and read every clock
    clr <= 1'b1; wr <= 1'b0; rd <= 1'b0;
    @(posedge clk);
    clr <= 1'b0;
    for (int t = 0; t < 200; t++) begin
      wr  <= 1'b1;
      rd  <= (t >= D - 1);
      din <= W'(t);
      @(posedge clk);
      #1;
      if (t >= D - 1) chk(q == W'(t - (D - 1)), $sformatf("delay: q=%0d at t=%0d", q, t));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
