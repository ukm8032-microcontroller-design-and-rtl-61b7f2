// ukm8050_rom_2048: internal program ROM of the UKM8050 testing module.
//
// A read-only program store on the core's internal ROM bus (irom bus). It
// lets test programs run on the board without an external EPROM: the
// program image is loaded into the ROM when the device is configured, from
// the hex file named by INIT_FILE. The default image is a small LED
// "running light" on Port 1 (rtl/ukm8050_led_prog.hex):
//   0000: 74 FE     MOV  A,#0FEh
//   0002: F5 90     MOV  P1,A
//   0004: 7F 03     MOV  R7,#3
//   0006: DF FE     DJNZ R7,$
//   0008: 23        RL   A
//   0009: 80 F7     SJMP 0002h
// Bytes not given by the file read as FFh, as in an erased EPROM.
//
// Interface: addr (16-bit program address), cs_n and rd_n (active low) from
// the core; rdata back. An access is served when cs_n=0, rd_n=0 and
// addr < ROM_BYTES; otherwise rdata is FFh.
// Timing: asynchronous read, rdata follows addr in the same cycle.
//
// ROM_BYTES defaults to the 2 kB of the testing module; 16384 gives the
// 16 kB variant. The read timing and the FFh fill are this design's choices.
module ukm8050_rom_2048 #(
  parameter int unsigned ROM_BYTES = 2048,
  parameter string       INIT_FILE = "rtl/ukm8050_led_prog.hex"
) (
  input  logic [15:0] addr,
  input  logic        cs_n,
  input  logic        rd_n,
  output logic [7:0]  rdata
);

  localparam int unsigned AW = $clog2(ROM_BYTES);

  logic [7:0] rom [ROM_BYTES];
  logic       in_range;

  initial begin
    for (int i = 0; i < ROM_BYTES; i++) rom[i] = 8'hFF;
    if (INIT_FILE != "") $readmemh(INIT_FILE, rom);
  end

  assign in_range = (32'(addr) < ROM_BYTES);
  assign rdata    = (!cs_n && !rd_n && in_range) ? rom[addr[AW-1:0]] : 8'hFF;

endmodule
