// ahb_decoder: AHB address decoder.
//
// A direct, combinational decode: the top log2(N_SLAVES) bits of the address
// pick exactly one slave, and the remaining bits are left to that slave to
// choose its registers. With the default 16 slaves and 32-bit addresses,
// HADDR[31:28] is the slave number, so each slave owns a 256 MB window.
// Using the highest address bits follows the model this design is based on;
// the exact window size is this design's choice.
// Interface: haddr in, one-hot hsel out; no clock, no state.
module ahb_decoder #(
  parameter int unsigned N_SLAVES = 16,
  parameter int unsigned ADDR_W   = 32,
  localparam int unsigned SW = (N_SLAVES > 1) ? $clog2(N_SLAVES) : 1
) (
  input  logic [ADDR_W-1:0]   haddr,
  output logic [N_SLAVES-1:0] hsel
);

  logic [SW-1:0] idx;

  assign idx = haddr[ADDR_W-1 -: SW];

  always_comb begin
    hsel = '0;
    if (int'(idx) < int'(N_SLAVES)) hsel[idx] = 1'b1;
  end

endmodule
