// tb_ukm8032_p3: self-checking testbench for Port 3.
// Checks that every pin is the AND of its latch bit and its alternate
// output (RXD, TXD, WR_n on P3.6, RD_n on P3.7, 1 elsewhere) and that the
// alternate inputs are taken from the right pins.
module tb_ukm8032_p3;
  import ukm8032_pkg::*;
  logic        clk = 1'b0;
  logic        rst_n;
  logic        we;
  logic [7:0]  wdata;
  p3_alt_out_t alt_out;
  logic        mem_wr_n, mem_rd_n;
  logic [7:0]  pin_i;
  logic [7:0]  latch_q, pin_o;
  p3_alt_in_t  alt_in;
  logic [7:0]  model, alt;
  int checks = 0, failures = 0;

  ukm8032_p3 dut (.*);

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
    alt_out = '{rxd_out: 1'b1, txd: 1'b1}; mem_wr_n = 1'b1; mem_rd_n = 1'b1; pin_i = 8'hFF;
    repeat (2) @(posedge clk);
    #1 check("reset pins", pin_o, 8'hFF);
    rst_n = 1'b1;
    model = 8'hFF;
    for (int i = 0; i < 400; i++) begin
      @(negedge clk);
      we = ($urandom % 3) == 0;
      // mostly all-ones latch values so the alternate outputs show through
      wdata = ($urandom % 2) ? 8'hFF : 8'($urandom);
      alt_out.rxd_out = 1'($urandom); alt_out.txd = 1'($urandom);
      mem_wr_n = 1'($urandom); mem_rd_n = 1'($urandom);
      pin_i = 8'($urandom);
      #1;
      alt = {mem_rd_n, mem_wr_n, 4'b1111, alt_out.txd, alt_out.rxd_out};
      check("pins", pin_o, model & alt);
      check("alt_in", {3'b000, alt_in}, {3'b000, pin_i[0], pin_i[2], pin_i[3], pin_i[4], pin_i[5]});
      @(posedge clk);
      if (we) model = wdata;
      #1 check("latch", latch_q, model);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
