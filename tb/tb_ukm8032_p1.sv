// tb_ukm8032_p1: self-checking testbench for Port 1.
// Checks the FFh reset value, random SFR writes (latch and pin level),
// that the latch holds while we=0, and that the write lands on the clock
// edge (one cycle after we is raised the new value is visible).
module tb_ukm8032_p1;
  logic       clk = 1'b0;
  logic       rst_n;
  logic       we;
  logic [7:0] wdata;
  logic [7:0] latch_q, pin_o;
  logic [7:0] model;
  int checks = 0, failures = 0;

  ukm8032_p1 dut (.*);

  always #5 clk = ~clk;

  task automatic check(string what, logic [7:0] got, logic [7:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %02h expected %02h", what, got, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0; we = 1'b0; wdata = 8'h00;
    repeat (2) @(posedge clk);
    #1 check("reset latch", latch_q, 8'hFF);
    check("reset pin", pin_o, 8'hFF);
    rst_n = 1'b1;
    model = 8'hFF;
    for (int i = 0; i < 200; i++) begin
      @(negedge clk);
      we    = ($urandom % 2) == 0;
      wdata = 8'($urandom);
      // before the edge the old value is still shown
      check("before edge", latch_q, model);
      @(posedge clk);
      if (we) model = wdata;
      #1;
      check("latch", latch_q, model);
      check("pin", pin_o, model);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
