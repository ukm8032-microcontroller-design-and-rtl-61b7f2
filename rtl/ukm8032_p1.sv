// ukm8032_p1: Port 1 of the UKM8032, a general-purpose 8-bit I/O port.
//
// The port is an 8051 quasi-bidirectional port: an SFR latch (direct
// address 90h) whose bits drive the pins low when 0 and leave them on a weak
// pull-up when 1, so a pin whose latch holds 1 can be read as an input. The
// latch is written by the external SFR decoder with a one-clock strobe and
// resets to FFh. Pin reading is done in ukm8032_ext_sfr, which chooses
// between this latch and the pin levels.
//
// Interface: we/wdata from the SFR decoder; latch_q is the SFR value and
// pin_o the level the port pushes onto the pads (strong 0, weak 1).
// Timing: the latch updates on the rising clock edge that samples we=1;
// pin_o follows in the same cycle. Reset is asynchronous, active low.
//
// The existence of a separate Port 1 block is the design's; the 8051 port
// behaviour and reset value are taken from the 8051 architecture it is
// compatible with.
module ukm8032_p1
  import ukm8032_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       we,
  input  logic [7:0] wdata,
  output logic [7:0] latch_q,
  output logic [7:0] pin_o
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  latch_q <= PORT_RESET;
    else if (we) latch_q <= wdata;
  end

  assign pin_o = latch_q;

endmodule
