// tb_ukm8032: self-checking testbench of the UKM8032 microcontroller shell
// (ports, external SFR block, internal RAM and pin multiplexing) driven
// directly on its core-side buses.
//
// Checks: the reset synchroniser (asserts at once, releases on the second
// xtal1 edge after rst falls); random SFR writes to all four ports, seen on
// the pins and read back either from the pins or from the latch while
// random bits are pulled low from outside; SFR addresses that are not
// ports; external memory strobes on ALE, PSEN_n, P3.6 and P3.7 with the
// address on P0/P2 and data returned through P0; and the internal RAM.
module tb_ukm8032;
  import ukm8032_pkg::*;

  logic        xtal1 = 1'b0;
  logic        xtal2, rst, ea_n, ale, psen_n;
  logic [7:0]  p0_i, p0_o, p0_drv, p1_i, p1_o, p2_i, p2_o, p3_i, p3_o;
  logic        core_rst_n, core_ea_n;
  sfr_bus_t    sfr;
  logic [7:0]  sfr_rdata;
  logic        sfr_hit;
  logic [7:0]  iram_addr, iram_wdata, iram_rdata;
  logic        iram_we_n, iram_rd_n;
  mem_bus_t    mem;
  logic [7:0]  mem_rdata;
  p3_alt_out_t p3_alt_out;
  p3_alt_in_t  p3_alt_in;

  ukm8032 dut (.*);

  always #5 xtal1 = ~xtal1;

  int checks = 0, failures = 0;
  logic [7:0] latch [4];
  logic [7:0] pull  [4];     // 0 bits are held low from outside
  logic [7:0] ram   [256];
  logic [7:0] ext_drive;

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h (t=%0t)", what, got, exp, $time);
    end
  endtask

  // pads: quasi-bidirectional P1..P3, open-drain P0 with pull-ups; during a
  // read strobe the outside world drives ext_drive onto P0
  always_comb begin
    if (!mem.psrd_n || !mem.rd_n) p0_i = ext_drive;
    else                     p0_i = (p0_o | ~p0_drv) & pull[0];
  end
  assign p1_i = p1_o & pull[1];
  assign p2_i = p2_o & pull[2];
  assign p3_i = p3_o & pull[3];

  function automatic logic [7:0] pins_of(int k);
    case (k)
      0: return (p0_o | ~p0_drv) & pull[0];
      1: return p1_i;
      2: return p2_i;
      default: return p3_i;
    endcase
  endfunction

  function automatic logic [7:0] addr_of(int k);
    case (k)
      0: return SFR_P0;
      1: return SFR_P1;
      2: return SFR_P2;
      default: return SFR_P3;
    endcase
  endfunction

  task automatic idle();
    sfr  = '{addr: 8'h00, wdata: 8'h00, wr: 1'b0, rd: 1'b0, pin_reg_n: 1'b1};
    mem  = '{addr: 16'h0000, wdata: 8'h00, ale: 1'b0, psrd_n: 1'b1, rd_n: 1'b1, wr_n: 1'b1};
    iram_addr = 8'h00; iram_wdata = 8'h00; iram_we_n = 1'b1; iram_rd_n = 1'b1;
  endtask

  initial begin
    #2000000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int k;
    logic [7:0] a, v;
    idle();
    p3_alt_out = '{rxd_out: 1'b1, txd: 1'b1};
    ext_drive = 8'h00;
    for (int i = 0; i < 4; i++) begin pull[i] = 8'hFF; latch[i] = 8'hFF; end
    rst = 1'b1; ea_n = 1'b0;
    #1 check("core reset asserted", int'(core_rst_n), 0);
    check("ea_n passed to core", int'(core_ea_n), 0);
    check("xtal2", int'(xtal2 != xtal1), 1);
    repeat (3) @(posedge xtal1);
    @(negedge xtal1) rst = 1'b0;
    @(posedge xtal1); #1 check("reset held", int'(core_rst_n), 0);
    @(posedge xtal1); #1 check("reset released", int'(core_rst_n), 1);
    check("p1 reset", int'(p1_o), 8'hFF);
    check("p2 reset", int'(p2_o), 8'hFF);
    check("p3 reset", int'(p3_o), 8'hFF);
    check("p0 reset released", int'(p0_drv), 0);

    // ports through the SFR bus
    for (int i = 0; i < 300; i++) begin
      @(negedge xtal1);
      idle();
      k = $urandom % 4;
      for (int j = 0; j < 4; j++) pull[j] = ($urandom % 4 == 0) ? ~(8'h1 << ($urandom % 8)) : 8'hFF;
      case ($urandom % 3)
        0: begin
          sfr.addr = addr_of(k); sfr.wdata = 8'($urandom); sfr.wr = 1'b1;
          @(posedge xtal1); latch[k] = sfr.wdata;
          #1;
          check("p0 drive", int'(p0_drv), int'(latch[0] ^ 8'hFF));
          check("p0 level", int'(p0_o & p0_drv), int'(latch[0] & p0_drv));
          check("p1", int'(p1_o), int'(latch[1]));
          check("p2", int'(p2_o), int'(latch[2]));
          check("p3", int'(p3_o), int'(latch[3]));
        end
        1: begin
          sfr.addr = addr_of(k); sfr.rd = 1'b1; sfr.pin_reg_n = 1'($urandom);
          #1;
          check("sfr hit", int'(sfr_hit), 1);
          check(sfr.pin_reg_n ? "pin read" : "latch read", int'(sfr_rdata),
                int'(sfr.pin_reg_n ? pins_of(k) : latch[k]));
        end
        default: begin
          a = 8'($urandom) | 8'h80;
          sfr.addr = a; sfr.rd = 1'b1; sfr.wr = 1'($urandom); sfr.wdata = 8'($urandom);
          #1;
          if (a != SFR_P0 && a != SFR_P1 && a != SFR_P2 && a != SFR_P3) begin
            check("no hit", int'(sfr_hit), 0);
            check("no data", int'(sfr_rdata), 0);
            @(posedge xtal1); #1;
            for (int j = 0; j < 4; j++) begin
              sfr.addr = addr_of(j); sfr.pin_reg_n = 1'b0; sfr.wr = 1'b0;
              #1 check("latch untouched", int'(sfr_rdata), int'(latch[j]));
            end
          end
        end
      endcase
    end
    for (int j = 0; j < 4; j++) pull[j] = 8'hFF;

    // external memory strobes
    for (int i = 0; i < 200; i++) begin
      @(negedge xtal1);
      idle();
      mem.addr = 16'($urandom); mem.wdata = 8'($urandom); ext_drive = 8'($urandom);
      case ($urandom % 4)
        0: begin
          mem.ale = 1'b1; #1;
          check("ALE pin", int'(ale), 1);
          check("P0 low address", int'(p0_o), int'(mem.addr[7:0]));
          check("P0 drive", int'(p0_drv), 8'hFF);
          check("P2 high address", int'(p2_o), int'(mem.addr[15:8]));
        end
        1: begin
          mem.psrd_n = 1'b0; #1;
          check("PSEN_n pin", int'(psen_n), 0);
          check("P0 float", int'(p0_drv), 0);
          check("code byte in", int'(mem_rdata), int'(ext_drive));
          check("P2 high address", int'(p2_o), int'(mem.addr[15:8]));
        end
        2: begin
          mem.rd_n = 1'b0; #1;
          check("RD_n on P3.7", int'(p3_o[7]), 0);
          check("P3.6 idle", int'(p3_o[6]), int'(latch[3][6]));
          check("data byte in", int'(mem_rdata), int'(ext_drive));
        end
        default: begin
          mem.wr_n = 1'b0; #1;
          check("WR_n on P3.6", int'(p3_o[6]), 0);
          check("P0 data out", int'(p0_o), int'(mem.wdata));
          check("P0 drive", int'(p0_drv), 8'hFF);
        end
      endcase
      @(posedge xtal1);
    end

    // internal RAM
    for (int i = 0; i < 256; i++) begin
      @(negedge xtal1);
      idle();
      iram_addr = 8'(i); iram_wdata = 8'($urandom); iram_we_n = 1'b0; ram[i] = iram_wdata;
    end
    for (int i = 0; i < 256; i++) begin
      @(negedge xtal1);
      idle();
      iram_addr = 8'($urandom); iram_rd_n = 1'b0;
      #1 check("iram", int'(iram_rdata), int'(ram[iram_addr]));
    end

    // alternate inputs from P3
    @(negedge xtal1);
    idle();
    pull[3] = 8'b1100_0010;
    #1 check("alt inputs", int'(p3_alt_in), 0);
    pull[3] = 8'hFF;
    sfr.addr = SFR_P3; sfr.wdata = 8'hFF; sfr.wr = 1'b1;
    @(posedge xtal1); #1;
    check("alt inputs high", int'(p3_alt_in), 5'h1F);
    sfr.wdata = 8'b1110_1011;  // P3.2 and P3.4 low from the latch
    @(posedge xtal1); #1;
    check("alt inputs follow pins", int'(p3_alt_in), 5'b1_0_1_0_1);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
