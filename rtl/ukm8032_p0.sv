// ukm8032_p0: Port 0 of the UKM8032, the open-drain port that doubles as
// the multiplexed low-address / data bus for external memory.
//
// As a plain port, P0 is an open-drain output: a latch bit of 0 drives the
// pin low, a 1 releases it (pin_drv=0) so that an external pull-up or device
// sets the level. While the core runs an external memory cycle the port is
// taken over by the bus:
//   * ALE high            : the low address byte mem.addr[7:0] is driven
//   * WR_n low            : the MOVX write data mem.wdata is driven
//   * RD_n or PSEN_n low  : the port is released so memory can drive data
// pin_drv gives, per bit, whether the chip actively drives that pin; a pad
// combines pin_o and pin_drv into the bidirectional pin.
//
// Interface: we/wdata from the SFR decoder, mem from the core. latch_q is
// the SFR value (direct address 80h, reset FFh).
// Timing: latch written on the rising clock edge; pin_o/pin_drv are
// combinational from the latch and the bus strobes.
//
// The per-bit drive enable follows the p0 drive signal of the original
// design; the bus multiplexing rules are the standard 8051 ones. The
// priority ALE > WR_n > RD_n/PSEN_n, and keeping the latch unchanged after a
// bus cycle, are this design's choices.
module ukm8032_p0
  import ukm8032_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       we,
  input  logic [7:0] wdata,
  input  mem_bus_t   mem,
  output logic [7:0] latch_q,
  output logic [7:0] pin_o,
  output logic [7:0] pin_drv
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  latch_q <= PORT_RESET;
    else if (we) latch_q <= wdata;
  end

  always_comb begin
    if (mem.ale) begin
      pin_o   = mem.addr[7:0];
      pin_drv = 8'hFF;
    end else if (!mem.wr_n) begin
      pin_o   = mem.wdata;
      pin_drv = 8'hFF;
    end else if (!mem.rd_n || !mem.psrd_n) begin
      pin_o   = 8'hFF;
      pin_drv = 8'h00;
    end else begin
      pin_o   = latch_q;
      pin_drv = ~latch_q;   // open drain: only the 0 bits are driven
    end
  end

endmodule
