// route_compute: per-hop output port of a head flit.
//
// The router steers a packet YX (first along Y = north/south, then along
// X = east/west) towards its current target.  The target is the
// intermediate router while the header's phase bit is 0 and the
// destination router afterwards; the phase turns to 1 at the router whose
// coordinates equal the intermediate (also at the source when the packet
// has no intermediate).  The router writes new_phase back into the header
// as the flit leaves.  Two-phase packets must use VC0 in phase 0 and VC1
// in phase 1, which breaks the cyclic channel dependencies two-phase
// routing can create; plain YX packets may use either VC.
//
// For minimal adaptive packets (header bit adaptive) out_port is the YX
// port, which is also the route on the escape VC, and alt_port is the other
// productive direction (the X move when the packet still has to move in
// both dimensions, otherwise the same as out_port).  The router chooses
// between them; this module only lists the minimal choices.
// Rows (y) grow southwards, columns (x) grow eastwards.  Combinational.
module route_compute
  import hns_pkg::*;
(
  input  coord_t              cur,
  input  noc_hdr_t            hdr,
  output port_e               out_port,
  output port_e               alt_port,
  output logic                new_phase,
  output logic [NUM_VC-1:0]   vc_mask
);

  coord_t tgt;

  always_comb begin
    new_phase = hdr.phase || (cur.x == hdr.mid_x && cur.y == hdr.mid_y);
    tgt       = new_phase ? '{y: hdr.dst_y, x: hdr.dst_x} : '{y: hdr.mid_y, x: hdr.mid_x};
    if      (tgt.y < cur.y) out_port = P_NORTH;
    else if (tgt.y > cur.y) out_port = P_SOUTH;
    else if (tgt.x > cur.x) out_port = P_EAST;
    else if (tgt.x < cur.x) out_port = P_WEST;
    else                    out_port = P_LOCAL;
    if      (tgt.y != cur.y && tgt.x > cur.x) alt_port = P_EAST;
    else if (tgt.y != cur.y && tgt.x < cur.x) alt_port = P_WEST;
    else                                      alt_port = out_port;
    if (hdr.two_phase) vc_mask = new_phase ? 2'b10 : 2'b01;
    else               vc_mask = 2'b11;
  end

endmodule
