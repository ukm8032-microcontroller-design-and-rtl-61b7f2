// ukm8032: the UKM8032 microcontroller, an Intel 8032-compatible 8-bit
// microcontroller assembled around an 8051-class CPU core.
//
// The CPU core is a licensed, separately delivered block; this module holds
// everything around it and brings the core's buses out as ports, so the
// core is attached by connecting those ports one to one:
//   * ukm8032_ext_sfr  serves SFR accesses to the four port SFRs
//   * ukm8032_p0..p3   the four 8-bit I/O ports (32 I/O lines)
//   * ukm8032_ram_256  the 256-byte internal data RAM
//   * the external memory bus is multiplexed onto the pins the 8051 way:
//     P0 = low address / data, P2 = high address, P3.6 = WR_n, P3.7 = RD_n,
//     plus the ALE and PSEN_n pins
//   * a reset synchroniser for the active-high RST pin
// The 40 pins of the package are xtal1, xtal2, rst, ea_n, ale, psen_n and
// p0..p3. Each bidirectional port pin is split into a sensed level (pN_i)
// and a driven level (pN_o); Port 0, being open drain, also has a per-bit
// drive enable p0_drv. P1..P3 are quasi-bidirectional: the pad is a strong
// pull-down for a 0 and a weak pull-up for a 1.
//
// Clocking: xtal1 is the single clock; xtal2 is its inversion, the output
// of the crystal oscillator's inverting amplifier. Reset: rst is asserted
// asynchronously and released two xtal1 edges after the pin falls; the
// synchronised active-low reset goes to the peripherals and to the core
// (core_rst_n). The external-access pin ea_n is handed to the core, which
// decides between internal and external program memory.
//
// The block list, the pin list and the port drive signal follow the
// original design; the bus multiplexing is the standard 8051 pin-out; the
// reset synchroniser, the split pin representation and the bus-rule
// assertions are this design's choices.
module ukm8032
  import ukm8032_pkg::*;
(
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
  input  mem_bus_t    mem,
  output logic [7:0]  mem_rdata,
  input  p3_alt_out_t p3_alt_out,
  output p3_alt_in_t  p3_alt_in
);

  logic       clk;
  logic [1:0] rst_sync;
  logic       rst_n;
  logic [3:0] port_we;
  logic [7:0] port_latch [4];
  logic [7:0] port_pin   [4];

  assign clk   = xtal1;
  assign xtal2 = ~xtal1;

  // Reset: asynchronous assertion, synchronous release.
  always_ff @(posedge clk or posedge rst) begin
    if (rst) rst_sync <= 2'b00;
    else     rst_sync <= {rst_sync[0], 1'b1};
  end
  assign rst_n      = rst_sync[1];
  assign core_rst_n = rst_n;
  assign core_ea_n  = ea_n;

  assign port_pin[PORT0] = p0_i;
  assign port_pin[PORT1] = p1_i;
  assign port_pin[PORT2] = p2_i;
  assign port_pin[PORT3] = p3_i;

  ukm8032_ext_sfr u_ext_sfr (
    .sfr        (sfr),
    .port_latch (port_latch),
    .port_pin   (port_pin),
    .port_we    (port_we),
    .rdata      (sfr_rdata),
    .hit        (sfr_hit)
  );

  ukm8032_p0 u_p0 (
    .clk     (clk),
    .rst_n   (rst_n),
    .we      (port_we[PORT0]),
    .wdata   (sfr.wdata),
    .mem     (mem),
    .latch_q (port_latch[PORT0]),
    .pin_o   (p0_o),
    .pin_drv (p0_drv)
  );

  ukm8032_p1 u_p1 (
    .clk     (clk),
    .rst_n   (rst_n),
    .we      (port_we[PORT1]),
    .wdata   (sfr.wdata),
    .latch_q (port_latch[PORT1]),
    .pin_o   (p1_o)
  );

  ukm8032_p2 u_p2 (
    .clk     (clk),
    .rst_n   (rst_n),
    .we      (port_we[PORT2]),
    .wdata   (sfr.wdata),
    .mem     (mem),
    .latch_q (port_latch[PORT2]),
    .pin_o   (p2_o)
  );

  ukm8032_p3 u_p3 (
    .clk      (clk),
    .rst_n    (rst_n),
    .we       (port_we[PORT3]),
    .wdata    (sfr.wdata),
    .alt_out  (p3_alt_out),
    .mem_wr_n (mem.wr_n),
    .mem_rd_n (mem.rd_n),
    .pin_i    (p3_i),
    .latch_q  (port_latch[PORT3]),
    .pin_o    (p3_o),
    .alt_in   (p3_alt_in)
  );

  ukm8032_ram_256 #(.DEPTH(256)) u_iram (
    .clk   (clk),
    .addr  (iram_addr),
    .wdata (iram_wdata),
    .we_n  (iram_we_n),
    .rd_n  (iram_rd_n),
    .rdata (iram_rdata)
  );

  // External memory bus pins. Data comes back through the P0 pins.
  assign ale       = mem.ale;
  assign psen_n    = mem.psrd_n;
  assign mem_rdata = p0_i;

  // Bus rules: at most one of the external strobes at a time, and no strobe
  // while the address is being latched.
  a_one_strobe: assert property (@(posedge clk) disable iff (!rst_n)
    $onehot0({~mem.psrd_n, ~mem.rd_n, ~mem.wr_n}));
  a_ale_alone: assert property (@(posedge clk) disable iff (!rst_n)
    mem.ale |-> (mem.psrd_n && mem.rd_n && mem.wr_n));
  a_iram_rw: assert property (@(posedge clk) disable iff (!rst_n)
    !(!iram_we_n && !iram_rd_n));

endmodule
