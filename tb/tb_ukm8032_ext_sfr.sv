// tb_ukm8032_ext_sfr: self-checking testbench for the external SFR block.
// Sweeps every SFR address with random write/read strobes, random latch and
// pin values and both settings of pin_reg_n; the write enables, hit flag and
// read data are compared with a table of the four port addresses.
module tb_ukm8032_ext_sfr;
  import ukm8032_pkg::*;
  sfr_bus_t   sfr;
  logic [7:0] port_latch [4];
  logic [7:0] port_pin   [4];
  logic [3:0] port_we;
  logic [7:0] rdata;
  logic       hit;
  int checks = 0, failures = 0;
  int n_pin = 0, n_latch = 0;

  ukm8032_ext_sfr dut (.*);

  task automatic check(string what, logic [7:0] got, logic [7:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s addr=%02h: got %02h expected %02h", what, sfr.addr, got, exp);
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
    int k;
    logic [7:0] exp_rd;
    for (int rep = 0; rep < 4; rep++) begin
      for (int a = 8'h80; a <= 8'hFF; a++) begin
        for (int p = 0; p < 4; p++) begin
          port_latch[p] = 8'($urandom);
          port_pin[p]   = 8'($urandom);
        end
        sfr.addr      = 8'(a);
        sfr.wdata     = 8'($urandom);
        sfr.wr        = 1'($urandom);
        sfr.rd        = ~sfr.wr;
        sfr.pin_reg_n = 1'($urandom);
        #1;
        case (a)
          8'h80: k = 0;
          8'h90: k = 1;
          8'hA0: k = 2;
          8'hB0: k = 3;
          default: k = -1;
        endcase
        check("hit", {7'd0, hit}, {7'd0, k >= 0});
        check("we", {4'd0, port_we}, (k >= 0 && sfr.wr) ? 8'(1 << k) : 8'h00);
        if (k < 0)              exp_rd = 8'h00;
        else if (sfr.pin_reg_n) begin exp_rd = port_pin[k];   n_pin++;   end
        else                    begin exp_rd = port_latch[k]; n_latch++; end
        check("rdata", rdata, exp_rd);
        #1;
      end
    end
    checks++;
    if (n_pin == 0 || n_latch == 0) begin failures++; $display("FAIL a read kind never occurred"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
