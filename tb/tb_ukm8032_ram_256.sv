// tb_ukm8032_ram_256: self-checking testbench for the 256-byte internal RAM.
// Writes every location with a pattern, reads all back, overwrites random
// locations against a reference array, and checks that rd_n gates the
// output and that we_n=1 leaves the contents alone.
module tb_ukm8032_ram_256;
  logic       clk = 1'b0;
  logic [7:0] addr, wdata, rdata;
  logic       we_n, rd_n;
  logic [7:0] ref_mem [256];
  int checks = 0, failures = 0;

  ukm8032_ram_256 dut (.*);

  always #5 clk = ~clk;

  task automatic check(string what, logic [7:0] got, logic [7:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s addr=%02h: got %02h expected %02h", what, addr, got, exp);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we_n = 1'b1; rd_n = 1'b1; addr = 8'h00; wdata = 8'h00;
    for (int a = 0; a < 256; a++) begin
      @(negedge clk);
      addr = 8'(a); wdata = 8'(a * 7 + 3); we_n = 1'b0;
      ref_mem[a] = wdata;
    end
    @(negedge clk) we_n = 1'b1;
    for (int a = 0; a < 256; a++) begin
      @(negedge clk);
      addr = 8'(a); rd_n = 1'b0;
      #1 check("readback", rdata, ref_mem[a]);
      rd_n = 1'b1;
      #1 check("rd_n gate", rdata, 8'h00);
    end
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      addr  = 8'($urandom);
      wdata = 8'($urandom);
      we_n  = 1'($urandom);
      rd_n  = ~we_n;
      if (!rd_n) #1 check("random read", rdata, ref_mem[addr]);
      @(posedge clk);
      if (!we_n) ref_mem[addr] = wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
