// ukm8032_pkg: constants and bus types shared by the UKM8032 microcontroller
// peripherals.
//
// The UKM8032 is an Intel 8032-compatible microcontroller built around an
// 8051-class CPU core. The core keeps its own SFRs (ACC, B, PSW, SP, DPTR,
// timers, serial port, interrupt control) and reaches every SFR it does not
// implement over an "external SFR" bus. In this design those are the four
// I/O port latches P0..P3, which sit at their standard 8051 direct addresses.
// The bus bundles below are the core-side buses: SFR bus, external memory
// bus (multiplexed onto P0/P2/P3 and the ALE/PSEN pins) and the Port 3
// alternate-function signals. Signal names follow the 8051 core's usual
// naming (sfr_*, mem_*, iram_*, irom_*); the bundling into structs is this
// design's own choice.
package ukm8032_pkg;

  // Standard 8051 direct addresses of the port SFRs.
  localparam logic [7:0] SFR_P0 = 8'h80;
  localparam logic [7:0] SFR_P1 = 8'h90;
  localparam logic [7:0] SFR_P2 = 8'hA0;
  localparam logic [7:0] SFR_P3 = 8'hB0;

  // Value of every port latch after reset (8051: all ports read 1s).
  localparam logic [7:0] PORT_RESET = 8'hFF;

  // Index of each port in the per-port arrays used between blocks.
  typedef enum logic [1:0] {PORT0 = 2'd0, PORT1 = 2'd1, PORT2 = 2'd2, PORT3 = 2'd3} port_idx_e;

  // SFR bus from the core towards the SFRs outside it.
  typedef struct packed {
    logic [7:0] addr;       // direct address 80h..FFh
    logic [7:0] wdata;      // write data
    logic       wr;         // write strobe, one clock, active high
    logic       rd;         // read strobe, active high
    logic       pin_reg_n;  // 1: a read returns the port pins, 0: the port latch (read-modify-write)
  } sfr_bus_t;

  // External memory bus from the core (8051 MOVX and external code fetch).
  typedef struct packed {
    logic [15:0] addr;      // 16-bit external address
    logic [7:0]  wdata;     // MOVX write data
    logic        ale;       // address latch enable, high while the low address is on P0
    logic        psrd_n;    // program store read (drives the PSEN_n pin), active low
    logic        rd_n;      // external data read (P3.7 RD_n), active low
    logic        wr_n;      // external data write (P3.6 WR_n), active low
  } mem_bus_t;

  // Port 3 alternate outputs produced inside the core.
  typedef struct packed {
    logic rxd_out;          // P3.0: serial data out in shift-register mode
    logic txd;              // P3.1: serial transmit data / shift clock
  } p3_alt_out_t;

  // Port 3 alternate inputs delivered to the core (taken from the pins).
  typedef struct packed {
    logic rxd_in;           // P3.0
    logic int0_n;           // P3.2
    logic int1_n;           // P3.3
    logic t0;               // P3.4
    logic t1;               // P3.5
  } p3_alt_in_t;

  // True while the core is running an external bus cycle.
  function automatic logic mem_cycle_active(mem_bus_t m);
    return m.ale | ~m.psrd_n | ~m.rd_n | ~m.wr_n;
  endfunction

endpackage
