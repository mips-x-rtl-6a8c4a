// bus_latch: the external address latch in front of the coprocessors.
//
// The processor drives a bus cycle (address or coprocessor word, MemCycle,
// CopCycle, Read/Write_b, BypassCache, FPReg) during its ALU cycle; this latch
// captures it at the clock edge that ends that cycle, so that the coprocessors
// see it, stable, for the whole of the following MEM cycle (AdrLatch and
// FPRegLatch in the timing diagrams). While Miss is high no state changes, so
// the latch holds. Reset clears the cycle flags so that no coprocessor sees a
// phantom cycle after reset.
//
// The latch itself and its place between the address bus and the
// coprocessors follow the source description; holding on Miss and the reset
// are this design's choice (the latch only matters to devices that watch Miss).
module bus_latch
  import mipsx_pkg::*;
(
  input  logic     clk,
  input  logic     rst,
  input  logic     miss,
  input  bus_ctl_t bus,   // pins during the ALU cycle
  output bus_ctl_t lat    // the same, during the MEM cycle
);
  always_ff @(posedge clk) begin
    if (rst) begin
      lat <= '0;
    end else if (!miss) begin
      lat <= bus;
    end
  end
endmodule
