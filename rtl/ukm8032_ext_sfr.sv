// ukm8032_ext_sfr: external SFR block of the UKM8032.
//
// The CPU core implements its own SFRs and sends every access to an SFR it
// does not hold out on its SFR bus. This block serves that bus for the four
// port SFRs P0 (80h), P1 (90h), P2 (A0h) and P3 (B0h):
//   * a write strobe to one of those addresses becomes a one-clock write
//     enable for that port's latch (port_we, one-hot, indexed by port number);
//   * a read returns either the port's pin levels or its latch, as selected
//     by sfr.pin_reg_n (1 = pins for ordinary reads, 0 = latch for the
//     read-modify-write instructions such as ANL/ORL/XRL/CPL/INC/DEC/DJNZ on
//     a port), so read-modify-write never picks up a pin held low from
//     outside;
//   * hit tells the core that an external SFR answered; data of an address
//     that is not decoded here reads as 00h.
//
// Interface: sfr bus from the core, latch/pin arrays from the port blocks;
// rdata/hit to the core, port_we to the ports.
// Timing: purely combinational; the port latches register the write.
//
// The block's existence and name are the original design's; its contents
// (decoder plus read multiplexer) are the simplest logic that gives the
// 8051 port read semantics, and the 00h default is this design's choice.
module ukm8032_ext_sfr
  import ukm8032_pkg::*;
(
  input  sfr_bus_t   sfr,
  input  logic [7:0] port_latch [4],
  input  logic [7:0] port_pin   [4],
  output logic [3:0] port_we,
  output logic [7:0] rdata,
  output logic       hit
);

  logic [1:0] idx;

  always_comb begin
    hit = 1'b1;
    idx = 2'd0;
    unique case (sfr.addr)
      SFR_P0:  idx = PORT0;
      SFR_P1:  idx = PORT1;
      SFR_P2:  idx = PORT2;
      SFR_P3:  idx = PORT3;
      default: hit = 1'b0;
    endcase
  end

  always_comb begin
    port_we = '0;
    if (sfr.wr && hit) port_we[idx] = 1'b1;
  end

  always_comb begin
    if (!hit)               rdata = 8'h00;
    else if (sfr.pin_reg_n) rdata = port_pin[idx];
    else                    rdata = port_latch[idx];
  end

endmodule
