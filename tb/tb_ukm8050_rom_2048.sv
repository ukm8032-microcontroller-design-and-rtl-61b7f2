// tb_ukm8050_rom_2048: self-checking testbench for the internal program ROM.
// Checks the default program image byte by byte, the FFh fill of the rest
// of the 2 kB, the cs_n/rd_n gating and the out-of-range response. A second
// instance at 16 kB checks that the top of the larger ROM is reachable and
// that the image is shared.
module tb_ukm8050_rom_2048;
  logic [15:0] addr;
  logic        cs_n, rd_n;
  logic [7:0]  rdata, rdata16;
  logic [7:0]  prog [10] = '{8'h74, 8'hFE, 8'hF5, 8'h90, 8'h7F, 8'h03, 8'hDF, 8'hFE, 8'h23, 8'h80};
  int checks = 0, failures = 0;

  ukm8050_rom_2048 dut (.addr, .cs_n, .rd_n, .rdata);
  ukm8050_rom_2048 #(.ROM_BYTES(16384)) dut16 (.addr, .cs_n, .rd_n, .rdata(rdata16));

  task automatic check(string what, logic [7:0] got, logic [7:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s addr=%04h: got %02h expected %02h", what, addr, got, exp);
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
    cs_n = 1'b0; rd_n = 1'b0;
    for (int a = 0; a < 2048; a++) begin
      addr = 16'(a);
      #1;
      if (a < 10)       check("program", rdata, prog[a]);
      else if (a == 10) check("program", rdata, 8'hF7);
      else              check("fill", rdata, 8'hFF);
    end
    addr = 16'h0000; #1 check("16k program", rdata16, 8'h74);
    addr = 16'h0009; #1 check("16k program", rdata16, 8'h80);
    // beyond 2 kB: small ROM answers FFh, large ROM still holds erased bytes
    addr = 16'h0800; #1 check("out of range", rdata, 8'hFF);
    addr = 16'h0801; #1 check("no alias", rdata, 8'hFF);  // would alias 0001 (FEh) if wrapped
    addr = 16'h0802; #1 check("no alias", rdata, 8'hFF);  // would alias 0002 (F5h)
    addr = 16'h4002; #1 check("16k out of range", rdata16, 8'hFF);
    addr = 16'h0002;
    cs_n = 1'b1; #1 check("cs_n gate", rdata, 8'hFF);
    cs_n = 1'b0; rd_n = 1'b1; #1 check("rd_n gate", rdata, 8'hFF);
    rd_n = 1'b0; #1 check("enabled", rdata, 8'hF5);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
