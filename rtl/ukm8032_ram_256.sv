// ukm8032_ram_256: internal data RAM of the UKM8032 (256 bytes).
//
// Holds the 8032's on-chip data memory: register banks, bit-addressable
// area and scratch-pad at 00h..7Fh, and the indirect-only upper 128 bytes at
// 80h..FFh that distinguish an 8032 from an 8031. It is a plain array on the
// core's internal RAM bus.
//
// Interface: addr, wdata, we_n (active-low write) and rd_n (active-low read
// enable) from the core; rdata back to the core.
// Timing: synchronous write on the rising clock edge with we_n=0; read is
// asynchronous, rdata = mem[addr] while rd_n=0 and 00h otherwise. A read of
// the address being written shows the old byte until the clock edge.
// Contents are not reset (an 8051's internal RAM is undefined at power-up).
//
// The 256-byte size is the original design's. The single write enable,
// asynchronous read and gating by rd_n are this design's choices. On an
// FPGA whose block RAM reads synchronously this maps to distributed RAM.
module ukm8032_ram_256 #(
  parameter int unsigned DEPTH = 256
) (
  input  logic                     clk,
  input  logic [$clog2(DEPTH)-1:0] addr,
  input  logic [7:0]               wdata,
  input  logic                     we_n,
  input  logic                     rd_n,
  output logic [7:0]               rdata
);

  logic [7:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (!we_n) mem[addr] <= wdata;
  end

  assign rdata = rd_n ? 8'h00 : mem[addr];

endmodule
