// ukm8032_p2: Port 2 of the UKM8032, the quasi-bidirectional port that
// carries the high address byte during external memory cycles.
//
// Outside bus cycles the pins show the SFR latch (direct address A0h, reset
// FFh) like Port 1. While the core runs an external cycle (ALE, PSEN_n, RD_n
// or WR_n active) the pins show mem.addr[15:8] instead; the latch keeps its
// value and reappears when the cycle ends.
//
// Interface: we/wdata from the SFR decoder, mem from the core; pin_o goes to
// the pads. Timing: latch written on the rising clock edge; pin_o is
// combinational. Reset is asynchronous, active low.
//
// The address/latch multiplexing follows the 8051 architecture. Driving
// mem.addr[15:8] also for 8-bit MOVX @Ri cycles relies on the core putting
// the P2 contents in that byte, which this design assumes.
module ukm8032_p2
  import ukm8032_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       we,
  input  logic [7:0] wdata,
  input  mem_bus_t   mem,
  output logic [7:0] latch_q,
  output logic [7:0] pin_o
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  latch_q <= PORT_RESET;
    else if (we) latch_q <= wdata;
  end

  assign pin_o = mem_cycle_active(mem) ? mem.addr[15:8] : latch_q;

endmodule
