// tb_rabbit_interface: bus-level test of the register interface.  Random
// writes to all 32 addresses (18-31 must be ignored), read-back of every
// address compared with a model of the register file and of the snapshot
// bank, snapshot refresh only while get_meanvar is high, data_oe only for a
// selected read, and writes ignored while the chip is not selected.
module tb_rabbit_interface;
  logic clk = 1'b0;
  logic rst = 1'b1;
  logic [4:0] addr = '0;
  logic cs_n = 1'b1, rd_wr = 1'b1, getmv = 1'b0;
  logic [7:0] din = '0, dout;
  logic oe;
  logic [13:0][7:0] from_proc;
  logic [17:0][7:0] to_proc;
  logic [7:0] wmodel [18];
  logic [7:0] rmodel [14];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  rabbit_interface dut (.clk, .rst, .address(addr), .cs_n, .rd_wr, .data_in(din),
                        .data_out(dout), .data_oe(oe), .get_meanvar(getmv),
                        .from_proc, .to_proc);

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

  task automatic bus_write(input logic [4:0] a, input logic [7:0] d, input bit sel);
    addr <= a; din <= d; rd_wr <= 1'b0; cs_n <= !sel;
    @(posedge clk);
    if (sel && a < 18) wmodel[a] = d;
    cs_n <= 1'b1; rd_wr <= 1'b1;
    @(posedge clk);
  endtask

  task automatic bus_read_check(input logic [4:0] a);
    logic [7:0] e;
    addr <= a; rd_wr <= 1'b1; cs_n <= 1'b0;
    #1;
    @(posedge clk);
    #1;
    e = (a < 18) ? wmodel[a] : rmodel[a - 18];
    chk(oe === 1'b1, "data_oe low during read");
    chk(dout === e, $sformatf("read addr %0d: %h expected %h", a, dout, e));
    cs_n <= 1'b1;
    @(posedge clk);
    #1;
    chk(oe === 1'b0, "data_oe high while deselected");
  endtask

  initial begin
    foreach (wmodel[i]) wmodel[i] = '0;
    foreach (rmodel[i]) rmodel[i] = '0;
    from_proc = '0;
    repeat (2) @(posedge clk);
    rst <= 1'b0;
    @(posedge clk);
    for (int k = 0; k < 2000; k++) begin
      case ($urandom_range(0, 3))
        0, 1: bus_write(5'($urandom), 8'($urandom), $urandom_range(0, 7) != 0);
        2: bus_read_check(5'($urandom));
        3: begin
          // new processor values; snapshot them on some clocks only
          for (int i = 0; i < 14; i++) from_proc[i] = 8'($urandom);
          getmv <= ($urandom_range(0, 1) == 1);
          @(posedge clk);
          if (getmv) for (int i = 0; i < 14; i++) rmodel[i] = from_proc[i];
          getmv <= 1'b0;
          @(posedge clk);
        end
      endcase
      for (int i = 0; i < 18; i++)
        chk(to_proc[i] === wmodel[i], $sformatf("to_proc[%0d]=%h expected %h", i, to_proc[i], wmodel[i]));
    end
    for (int a = 0; a < 32; a++) bus_read_check(5'(a));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
