// tb_ukm8050: end-to-end testbench of the UKM8050 testing module (the
// UKM8032 microcontroller with its 2 kB internal program ROM), at the
// default parameters.
//
// The CPU core is not part of this RTL, so the testbench contains a small
// instruction-level model of it that drives the core-side buses the way an
// 8051 core does, one bus transaction per clock. It understands only the
// opcodes used by the two programs below (MOV A,#d; MOV dir,A; MOV A,dir;
// MOV R7,#d; DJNZ R7,rel; RL A; SJMP; LJMP; ANL dir,#d; MOV DPTR,#d16;
// MOVX @DPTR,A; MOVX A,@DPTR). Direct addresses below 80h go to the
// internal RAM, the others over the SFR bus. Around the chip the testbench
// models an external 64 kB program ROM and 64 kB data RAM behind a
// transparent address latch on P0/P2/ALE/PSEN_n/RD_n/WR_n, and pull-ups on
// the port pins.
//
// Phase 1 (ea_n=1): the LED running-light program stored in the internal
// ROM. Port 1 must step through FE, FD, FB, ... , 7F, FE.
// Phase 2 (after a reset, ea_n=0): a program fetched from the external ROM
// that writes and reads the external RAM, performs a read-modify-write on
// Port 1 while a pin is held low from outside, reads the pins, and uses the
// internal RAM. Port 3's alternate serial outputs and the reset
// synchroniser are also exercised. Every mechanism is counted and a
// mechanism that never happened counts as a failure.
module tb_ukm8050;
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
  logic [15:0] irom_addr;
  logic        irom_cs_n, irom_rd_n;
  logic [7:0]  irom_rdata;
  mem_bus_t    mem;
  logic [7:0]  mem_rdata;
  p3_alt_out_t p3_alt_out;
  p3_alt_in_t  p3_alt_in;

  ukm8050 dut (.*);

  always #5 xtal1 = ~xtal1;

  int checks = 0, failures = 0;

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h (t=%0t)", what, got, exp, $time);
    end
  endtask

  // ---------------- mechanism counters ----------------
  int n_reset_sync = 0, n_irom_fetch = 0, n_ext_fetch = 0, n_ext_wr = 0, n_ext_rd = 0;
  int n_sfr_wr = 0, n_pin_rd = 0, n_latch_rd = 0, n_iram_wr = 0, n_iram_rd = 0;
  int n_p3_alt = 0, n_led_steps = 0;

  // ---------------- board model ----------------
  logic [7:0] ext_rom [65536];
  logic [7:0] ext_ram [65536];
  logic [7:0] addr_lo;          // transparent address latch on P0
  logic [7:0] p1_ext_pull;      // 0 bits are held low by something outside

  always_latch if (ale) addr_lo = p0_o;

  always_comb begin
    if (!psen_n)         p0_i = ext_rom[{p2_o, addr_lo}];
    else if (!p3_o[7])   p0_i = ext_ram[{p2_o, addr_lo}];
    else                 p0_i = p0_o | ~p0_drv;      // pull-ups on P0
  end
  assign p1_i = p1_o & p1_ext_pull;
  assign p2_i = p2_o;
  assign p3_i = p3_o;

  always @(posedge xtal1) if (!p3_o[6]) ext_ram[{p2_o, addr_lo}] <= p0_o;

  // ---------------- core model: bus transactions ----------------
  task automatic bus_idle();
    sfr        = '{addr: 8'h00, wdata: 8'h00, wr: 1'b0, rd: 1'b0, pin_reg_n: 1'b1};
    mem        = '{addr: 16'h0000, wdata: 8'h00, ale: 1'b0, psrd_n: 1'b1, rd_n: 1'b1, wr_n: 1'b1};
    iram_addr  = 8'h00; iram_wdata = 8'h00; iram_we_n = 1'b1; iram_rd_n = 1'b1;
    irom_addr  = 16'h0000; irom_cs_n = 1'b1; irom_rd_n = 1'b1;
  endtask

  // address phase of an external cycle: low byte on P0 with ALE, high on P2
  task automatic ext_address(logic [15:0] a);
    @(negedge xtal1);
    bus_idle();
    mem.addr = a; mem.ale = 1'b1;
    #1;
    check("ALE pin", int'(ale), 1);
    check("P0 address", int'(p0_o), int'(a[7:0]));
    check("P0 driven", int'(p0_drv), 8'hFF);
    check("P2 address", int'(p2_o), int'(a[15:8]));
    @(posedge xtal1);
  endtask

  task automatic fetch(input logic [15:0] pc, output logic [7:0] b);
    if (core_ea_n && pc < 16'd2048) begin
      @(negedge xtal1);
      bus_idle();
      irom_addr = pc; irom_cs_n = 1'b0; irom_rd_n = 1'b0;
      @(posedge xtal1);
      b = irom_rdata;
      n_irom_fetch++;
    end else begin
      ext_address(pc);
      @(negedge xtal1);
      mem.ale = 1'b0; mem.psrd_n = 1'b0;
      #1;
      check("PSEN_n pin", int'(psen_n), 0);
      check("P0 released", int'(p0_drv), 0);
      @(posedge xtal1);
      b = mem_rdata;
      check("ext fetch data", int'(b), int'(ext_rom[pc]));
      n_ext_fetch++;
    end
  endtask

  task automatic movx_write(logic [15:0] a, logic [7:0] d);
    ext_address(a);
    @(negedge xtal1);
    mem.ale = 1'b0; mem.wr_n = 1'b0; mem.wdata = d;
    #1;
    check("WR_n on P3.6", int'(p3_o[6]), 0);
    check("P0 data", int'(p0_o), int'(d));
    @(posedge xtal1);
    n_ext_wr++;
  endtask

  task automatic movx_read(input logic [15:0] a, output logic [7:0] d);
    ext_address(a);
    @(negedge xtal1);
    mem.ale = 1'b0; mem.rd_n = 1'b0;
    #1;
    check("RD_n on P3.7", int'(p3_o[7]), 0);
    @(posedge xtal1);
    d = mem_rdata;
    n_ext_rd++;
  endtask

  task automatic dir_write(logic [7:0] a, logic [7:0] d);
    @(negedge xtal1);
    bus_idle();
    if (a[7]) begin
      sfr.addr = a; sfr.wdata = d; sfr.wr = 1'b1; n_sfr_wr++;
    end else begin
      iram_addr = a; iram_wdata = d; iram_we_n = 1'b0; n_iram_wr++;
    end
    @(posedge xtal1);
  endtask

  task automatic dir_read(input logic [7:0] a, input logic rmw, output logic [7:0] d);
    @(negedge xtal1);
    bus_idle();
    if (a[7]) begin
      sfr.addr = a; sfr.rd = 1'b1; sfr.pin_reg_n = ~rmw;
      if (rmw) n_latch_rd++; else n_pin_rd++;
    end else begin
      iram_addr = a; iram_rd_n = 1'b0; n_iram_rd++;
    end
    @(posedge xtal1);
    d = a[7] ? sfr_rdata : iram_rdata;
  endtask

  // ---------------- core model: instruction interpreter ----------------
  logic [15:0] pc, dptr;
  logic [7:0]  acc;
  logic [7:0]  p1_writes [$];

  task automatic step();
    logic [7:0] op, b1, b2, t;
    fetch(pc, op); pc++;
    case (op)
      8'h74: begin fetch(pc, b1); pc++; acc = b1; end
      8'hF5: begin fetch(pc, b1); pc++; dir_write(b1, acc); if (b1 == SFR_P1) p1_writes.push_back(acc); end
      8'hE5: begin fetch(pc, b1); pc++; dir_read(b1, 1'b0, acc); end
      8'h7F: begin fetch(pc, b1); pc++; dir_write(8'h07, b1); end
      8'hDF: begin
        fetch(pc, b1); pc++;
        dir_read(8'h07, 1'b1, t); t--; dir_write(8'h07, t);
        if (t != 0) pc = pc + {{8{b1[7]}}, b1};
      end
      8'h23: acc = {acc[6:0], acc[7]};
      8'h80: begin fetch(pc, b1); pc++; pc = pc + {{8{b1[7]}}, b1}; end
      8'h02: begin fetch(pc, b1); pc++; fetch(pc, b2); pc = {b1, b2}; end
      8'h53: begin
        fetch(pc, b1); pc++; fetch(pc, b2); pc++;
        dir_read(b1, 1'b1, t); dir_write(b1, t & b2);
        if (b1 == SFR_P1) p1_writes.push_back(t & b2);
      end
      8'h90: begin fetch(pc, b1); pc++; fetch(pc, b2); pc++; dptr = {b1, b2}; end
      8'hF0: movx_write(dptr, acc);
      8'hE0: movx_read(dptr, acc);
      default: begin failures++; $display("FAIL unsupported opcode %02h at %04h", op, pc - 1); end
    endcase
  endtask

  task automatic do_reset(logic ea);
    @(negedge xtal1);
    bus_idle();
    rst = 1'b1; ea_n = ea;
    #1 check("reset asserts at once", int'(core_rst_n), 0);
    repeat (3) @(posedge xtal1);
    @(negedge xtal1) rst = 1'b0;
    @(posedge xtal1); #1 check("reset held 1st edge", int'(core_rst_n), 0);
    @(posedge xtal1); #1 check("reset released 2nd edge", int'(core_rst_n), 1);
    n_reset_sync++;
    check("P1 after reset", int'(p1_o), 8'hFF);
    check("P0 released after reset", int'(p0_drv), 8'h00);
    check("EA_n to core", int'(core_ea_n), int'(ea));
    pc = 16'h0000; acc = 8'h00; dptr = 16'h0000;
    p1_writes.delete();
  endtask

  initial begin
    #2000000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] led, d;
    int irom_phase1;
    bus_idle();
    p3_alt_out = '{rxd_out: 1'b1, txd: 1'b1};
    p1_ext_pull = 8'hFF;
    rst = 1'b1; ea_n = 1'b1;
    for (int i = 0; i < 65536; i++) begin ext_rom[i] = 8'hFF; ext_ram[i] = 8'h00; end

    // clock inverter
    #1 check("xtal2 inverts xtal1", int'(xtal2 != xtal1), 1);

    // ---------------- phase 1: LED program from internal ROM ----------------
    do_reset(1'b1);
    while (p1_writes.size() < 10 && checks < 100000) begin
      step();
      check("pc stays in ROM", int'(pc < 16'h000B), 1);
    end
    led = 8'hFE;
    foreach (p1_writes[i]) begin
      check("LED pattern written", int'(p1_writes[i]), int'(led));
      led = {led[6:0], led[7]};
      n_led_steps++;
    end
    #1 check("LED pattern on pins", int'(p1_o), int'(p1_writes[p1_writes.size() - 1]));
    check("no external fetch in phase 1", n_ext_fetch, 0);

    // ---------------- phase 2: program from external ROM ----------------
    begin
      logic [7:0] prog [] = '{
        8'h90, 8'h12, 8'h34,   // 0000 MOV  DPTR,#1234h
        8'h74, 8'h5A,          // 0003 MOV  A,#5Ah
        8'hF0,                 // 0005 MOVX @DPTR,A
        8'h74, 8'h00,          // 0006 MOV  A,#0
        8'hE0,                 // 0008 MOVX A,@DPTR
        8'hF5, 8'h90,          // 0009 MOV  P1,A
        8'h53, 8'h90, 8'h0F,   // 000B ANL  P1,#0Fh
        8'hE5, 8'h90,          // 000E MOV  A,P1
        8'h7F, 8'h05,          // 0010 MOV  R7,#5
        8'hDF, 8'hFE,          // 0012 DJNZ R7,$
        8'hF5, 8'h7F,          // 0014 MOV  7Fh,A
        8'h02, 8'h08, 8'h00    // 0016 LJMP 0800h
      };
      foreach (prog[i]) ext_rom[i] = prog[i];
      ext_rom[16'h0800] = 8'h80; ext_rom[16'h0801] = 8'hFE;   // SJMP $
    end
    do_reset(1'b0);
    irom_phase1 = n_irom_fetch;
    p1_ext_pull = 8'hF7;     // P1.3 held low from outside
    while (pc != 16'h0800 && checks < 100000) step();
    check("ext RAM written", int'(ext_ram[16'h1234]), 8'h5A);
    check("RMW used the latch", int'(p1_o), 8'h0A);
    check("pin read sees the pulled-down pin", int'(acc), 8'h02);
    dir_read(8'h07, 1'b0, d);
    check("R7 counted down", int'(d), 0);
    dir_read(8'h7F, 1'b0, d);
    check("internal RAM stored A", int'(d), 8'h02);
    check("no internal ROM fetch with EA_n=0", n_irom_fetch, irom_phase1);
    begin
      int fetched_before;
      fetched_before = n_irom_fetch;
      step();
      check("SJMP $ stays", int'(pc), 16'h0800);
      check("still external", n_irom_fetch, fetched_before);
    end

    // ---------------- Port 3 alternate outputs ----------------
    dir_write(SFR_P3, 8'hFF);
    @(negedge xtal1);
    p3_alt_out = '{rxd_out: 1'b0, txd: 1'b0};
    #1 check("TXD/RXD on P3.1/P3.0", int'(p3_o[1:0]), 0);
    check("alt input RXD", int'(p3_alt_in.rxd_in), 0);
    p3_alt_out = '{rxd_out: 1'b1, txd: 1'b1};
    #1 check("TXD/RXD released", int'(p3_o[1:0]), 3);
    n_p3_alt++;

    // ---------------- every mechanism happened ----------------
    $display("reset_sync=%0d irom_fetch=%0d ext_fetch=%0d ext_wr=%0d ext_rd=%0d sfr_wr=%0d pin_rd=%0d latch_rd=%0d iram_wr=%0d iram_rd=%0d p3_alt=%0d led_steps=%0d",
             n_reset_sync, n_irom_fetch, n_ext_fetch, n_ext_wr, n_ext_rd, n_sfr_wr, n_pin_rd,
             n_latch_rd, n_iram_wr, n_iram_rd, n_p3_alt, n_led_steps);
    begin
      int    counts [12];
      string names  [12];
      counts = '{n_reset_sync, n_irom_fetch, n_ext_fetch, n_ext_wr, n_ext_rd, n_sfr_wr,
                          n_pin_rd, n_latch_rd, n_iram_wr, n_iram_rd, n_p3_alt, n_led_steps};
      names = '{"reset synchroniser", "internal ROM fetch", "external code fetch", "MOVX write",
                "MOVX read", "port SFR write", "pin read", "latch read (RMW)", "internal RAM write",
                "internal RAM read", "P3 alternate output", "LED step"};
      foreach (counts[k]) check({"mechanism happened: ", names[k]}, int'(counts[k] > 0), 1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
