// inject_map: where each of the 16 switch ports enters the 8x8 mesh.
//
// The switch ports are wired to routers through the FPGA's programmable
// interconnect, so the attachment point is a design choice.  Four
// placements are supported (CFG): two-sided (the 8 west-most and 8
// east-most routers), four-sided (spread around the perimeter), diamond,
// and dense (a 4x4 block at the centre).  Ports 0-7 sit on the west
// transceiver column and ports 8-15 on the east one.  The coordinates of
// the first three placements are read from the document's placement
// drawing; the dense raster order and which links carry a pipeline stage
// are this design's own reading.  `pipelined` tells whether the soft link
// of that port is long enough to need one register stage at 160 MHz.
//
// Purely combinational: port in, (x,y) of the router and the stage flag out.
module inject_map
  import hns_pkg::*;
#(
  parameter cfg_e CFG = CFG_DIAMOND
) (
  input  logic [PW-1:0] port,
  output coord_t        xy,
  output logic          pipelined
);

  always_comb begin
    xy        = port_place(CFG, port);
    pipelined = port_pipelined(CFG, port);
  end

endmodule
