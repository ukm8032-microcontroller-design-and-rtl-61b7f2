// tb_ukm8032_p2: self-checking testbench for Port 2.
// Random SFR writes and random bus states; the pins must show the latch
// when no external cycle runs and the high address byte while ALE, PSEN_n,
// RD_n or WR_n is active, without disturbing the latch.
module tb_ukm8032_p2;
  import ukm8032_pkg::*;
  logic       clk = 1'b0;
  logic       rst_n;
  logic       we;
  logic [7:0] wdata;
  mem_bus_t   mem;
  logic [7:0] latch_q, pin_o;
  logic [7:0] model;
  int checks = 0, failures = 0;
  int n_bus = 0, n_idle = 0;

  ukm8032_p2 dut (.*);

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
    rst_n = 1'b1;
    model = 8'hFF;
    for (int i = 0; i < 400; i++) begin
      @(negedge clk);
      we        = ($urandom % 3) == 0;
      wdata     = 8'($urandom);
      mem.addr  = 16'($urandom);
      mem.ale = 1'b0; mem.psrd_n = 1'b1; mem.rd_n = 1'b1; mem.wr_n = 1'b1;
      case ($urandom % 5)
        0: mem.ale    = 1'b1;
        1: mem.wr_n   = 1'b0;
        2: mem.rd_n   = 1'b0;
        3: mem.psrd_n = 1'b0;
        default: ;
      endcase
      #1;
      if (mem.ale || !mem.wr_n || !mem.rd_n || !mem.psrd_n) begin
        check("pin (bus)", pin_o, mem.addr[15:8]); n_bus++;
      end else begin
        check("pin (latch)", pin_o, model); n_idle++;
      end
      @(posedge clk);
      if (we) model = wdata;
      #1 check("latch", latch_q, model);
    end
    checks++;
    if (n_bus == 0 || n_idle == 0) begin failures++; $display("FAIL a mode never occurred"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
