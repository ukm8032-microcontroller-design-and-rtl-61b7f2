// ukm8032_p3: Port 3 of the UKM8032, the quasi-bidirectional port whose
// pins also carry the 8051 alternate functions.
//
// Each pin is driven by the AND of its SFR latch bit (direct address B0h,
// reset FFh) and its alternate output, so either source can pull it low and
// software enables an alternate function by leaving the latch bit at 1:
//   P3.0 RXD   serial data (output only in shift-register mode)
//   P3.1 TXD   serial transmit
//   P3.2 INT0_n, P3.3 INT1_n, P3.4 T0, P3.5 T1   inputs only (alt output 1)
//   P3.6 WR_n  external data write strobe
//   P3.7 RD_n  external data read strobe
// The pin levels are returned to the core as the alternate inputs.
//
// Interface: we/wdata from the SFR decoder; alt_out from the core's serial
// port; mem_wr_n/mem_rd_n from the core's memory bus; pin_i are the sensed
// pin levels. Timing: latch written on the rising clock edge, everything
// else combinational. Reset is asynchronous, active low.
//
// Pin assignment follows the 8051 architecture; passing the pins to the
// core without a synchroniser is this design's choice (the core samples
// them itself).
module ukm8032_p3
  import ukm8032_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        we,
  input  logic [7:0]  wdata,
  input  p3_alt_out_t alt_out,
  input  logic        mem_wr_n,
  input  logic        mem_rd_n,
  input  logic [7:0]  pin_i,
  output logic [7:0]  latch_q,
  output logic [7:0]  pin_o,
  output p3_alt_in_t  alt_in
);

  logic [7:0] alt_bits;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  latch_q <= PORT_RESET;
    else if (we) latch_q <= wdata;
  end

  assign alt_bits = {mem_rd_n, mem_wr_n, 4'hF, alt_out.txd, alt_out.rxd_out};
  assign pin_o    = latch_q & alt_bits;

  assign alt_in.rxd_in = pin_i[0];
  assign alt_in.int0_n = pin_i[2];
  assign alt_in.int1_n = pin_i[3];
  assign alt_in.t0     = pin_i[4];
  assign alt_in.t1     = pin_i[5];

endmodule
