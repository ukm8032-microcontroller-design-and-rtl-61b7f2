// ukm8050: UKM8050 testing module, the UKM8032 microcontroller with an
// internal program ROM.
//
// The testing module puts the complete UKM8032 (ukm8032) next to an
// internal program ROM (ukm8050_rom_2048) on the CPU core's internal ROM
// bus, so that test programs are part of the device image instead of an
// external EPROM, and all 32 port lines stay free for I/O. The core is
// configured for an internal ROM of ROM_BYTES; its irom bus is brought out
// here (irom_addr/irom_cs_n/irom_rd_n in, irom_rdata out) together with all
// of ukm8032's core-side and pin ports.
//
// ROM_BYTES = 2048 is the 2 kB testing module; 16384 is the 16 kB variant
// that fills the FPGA's block memories. Timing is that of the parts: the
// ROM read is asynchronous, everything else as in ukm8032.
module ukm8050
  import ukm8032_pkg::*;
#(
  parameter int unsigned ROM_BYTES = 2048,
  parameter string       ROM_INIT  = "rtl/ukm8050_led_prog.hex"
) (
  // package pins
  input  logic        xtal1,
  output logic        xtal2,
  input  logic        rst,
  input  logic        ea_n,
  output logic        ale,
  output logic        psen_n,
  input  logic [7:0]  p0_i,
  output logic [7:0]  p0_o,
  output logic [7:0]  p0_drv,
  input  logic [7:0]  p1_i,
  output logic [7:0]  p1_o,
  input  logic [7:0]  p2_i,
  output logic [7:0]  p2_o,
  input  logic [7:0]  p3_i,
  output logic [7:0]  p3_o,
  // CPU core side
  output logic        core_rst_n,
  output logic        core_ea_n,
  input  sfr_bus_t    sfr,
  output logic [7:0]  sfr_rdata,
  output logic        sfr_hit,
  input  logic [7:0]  iram_addr,
  input  logic [7:0]  iram_wdata,
  input  logic        iram_we_n,
  input  logic        iram_rd_n,
  output logic [7:0]  iram_rdata,
  input  logic [15:0] irom_addr,
  input  logic        irom_cs_n,
  input  logic        irom_rd_n,
  output logic [7:0]  irom_rdata,
  input  mem_bus_t    mem,
  output logic [7:0]  mem_rdata,
  input  p3_alt_out_t p3_alt_out,
  output p3_alt_in_t  p3_alt_in
);

  ukm8032 u_mcu (
    .xtal1      (xtal1),
    .xtal2      (xtal2),
    .rst        (rst),
    .ea_n       (ea_n),
    .ale        (ale),
    .psen_n     (psen_n),
    .p0_i       (p0_i),
    .p0_o       (p0_o),
    .p0_drv     (p0_drv),
    .p1_i       (p1_i),
    .p1_o       (p1_o),
    .p2_i       (p2_i),
    .p2_o       (p2_o),
    .p3_i       (p3_i),
    .p3_o       (p3_o),
    .core_rst_n (core_rst_n),
    .core_ea_n  (core_ea_n),
    .sfr        (sfr),
    .sfr_rdata  (sfr_rdata),
    .sfr_hit    (sfr_hit),
    .iram_addr  (iram_addr),
    .iram_wdata (iram_wdata),
    .iram_we_n  (iram_we_n),
    .iram_rd_n  (iram_rd_n),
    .iram_rdata (iram_rdata),
    .mem        (mem),
    .mem_rdata  (mem_rdata),
    .p3_alt_out (p3_alt_out),
    .p3_alt_in  (p3_alt_in)
  );

  ukm8050_rom_2048 #(
    .ROM_BYTES (ROM_BYTES),
    .INIT_FILE (ROM_INIT)
  ) u_irom (
    .addr  (irom_addr),
    .cs_n  (irom_cs_n),
    .rd_n  (irom_rd_n),
    .rdata (irom_rdata)
  );

endmodule
