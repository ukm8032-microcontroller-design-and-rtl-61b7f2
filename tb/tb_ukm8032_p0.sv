// tb_ukm8032_p0: self-checking testbench for Port 0.
// Drives random SFR writes and random external-bus states and compares the
// pin level and per-bit drive enable with a reference of the 8051 Port 0
// rules: open drain from the latch when idle, low address during ALE, write
// data during WR_n, released during RD_n or PSEN_n. Counts each mode.
module tb_ukm8032_p0;
  import ukm8032_pkg::*;
  logic       clk = 1'b0;
  logic       rst_n;
  logic       we;
  logic [7:0] wdata;
  mem_bus_t   mem;
  logic [7:0] latch_q, pin_o, pin_drv;
  logic [7:0] model, exp_o, exp_drv;
  int checks = 0, failures = 0;
  int n_idle = 0, n_ale = 0, n_wr = 0, n_rd = 0;

  ukm8032_p0 dut (.*);

  always #5 clk = ~clk;

  task automatic check(string what, logic [7:0] got, logic [7:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %02h expected %02h", what, got, exp);
    end
  endtask

  initial begin
    #200000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0; we = 1'b0; wdata = 8'h00;
    mem = '{addr: 16'h0000, wdata: 8'h00, ale: 1'b0, psrd_n: 1'b1, rd_n: 1'b1, wr_n: 1'b1};
    repeat (2) @(posedge clk);
    #1 check("reset latch", latch_q, 8'hFF);
    check("reset drv", pin_drv, 8'h00);
    rst_n = 1'b1;
    model = 8'hFF;
    for (int i = 0; i < 400; i++) begin
      @(negedge clk);
      we        = ($urandom % 3) == 0;
      wdata     = 8'($urandom);
      mem.addr  = 16'($urandom);
      mem.wdata = 8'($urandom);
      mem.ale = 1'b0; mem.psrd_n = 1'b1; mem.rd_n = 1'b1; mem.wr_n = 1'b1;
      case ($urandom % 5)
        0: mem.ale    = 1'b1;
        1: mem.wr_n   = 1'b0;
        2: mem.rd_n   = 1'b0;
        3: mem.psrd_n = 1'b0;
        default: ;
      endcase
      #1;
      if (mem.ale)                        begin exp_o = mem.addr[7:0]; exp_drv = 8'hFF; n_ale++;  end
      else if (!mem.wr_n)                 begin exp_o = mem.wdata;     exp_drv = 8'hFF; n_wr++;   end
      else if (!mem.rd_n || !mem.psrd_n)  begin exp_o = 8'hFF;         exp_drv = 8'h00; n_rd++;   end
      else                                begin exp_o = model;         exp_drv = ~model; n_idle++; end
      check("pin_drv", pin_drv, exp_drv);
      // only driven bits carry a meaningful level
      check("pin_o", pin_o & exp_drv, exp_o & exp_drv);
      @(posedge clk);
      if (we) model = wdata;
      #1 check("latch", latch_q, model);
    end
    checks++;
    if (n_idle == 0 || n_ale == 0 || n_wr == 0 || n_rd == 0) begin
      failures++;
      $display("FAIL a bus mode never occurred");
    end
    $display("modes: idle=%0d ale=%0d wr=%0d rd/psen=%0d", n_idle, n_ale, n_wr, n_rd);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
