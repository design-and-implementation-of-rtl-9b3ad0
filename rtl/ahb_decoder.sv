// ahb_decoder: central address decoder of the AHB system.
//
// Looks at the address of the transfer currently in its address phase and
// raises the one HSELx line of the slave that owns that address. It is purely
// combinational, as the bus description asks. The memory map is this design's
// own choice: the address space is cut into NUM_SLAVES equal regions by the
// top address bits, so with four slaves slave s owns
// 0x4000_0000*s .. 0x4000_0000*s + 0x3FFF_FFFF. When NUM_SLAVES is not a power
// of two, the regions with no slave select nothing.
//
// Interface: haddr in, hsel[NUM_SLAVES-1:0] out (one-hot or zero).
// Timing: zero-cycle; the multiplexer registers hsel for the data phase.
module ahb_decoder
  import ahb_pkg::*;
#(
  parameter int unsigned NUM_SLAVES = 4
) (
  input  logic [ADDR_W-1:0]     haddr,
  output logic [NUM_SLAVES-1:0] hsel
);

  localparam int unsigned SEL_W = (NUM_SLAVES > 1) ? $clog2(NUM_SLAVES) : 1;

  logic [SEL_W-1:0] region;

  always_comb begin
    region = (NUM_SLAVES > 1) ? haddr[ADDR_W-1 -: SEL_W] : '0;
    hsel   = '0;
    for (int unsigned s = 0; s < NUM_SLAVES; s++)
      if (region == SEL_W'(s)) hsel[s] = 1'b1;
  end

endmodule
