// mid_select: picks the intermediate router of a packet at its source.
//
// All routing in the switch is YX dimension order (first north/south, then
// east/west).  The custom algorithms spread traffic by first sending a
// packet YX to an intermediate router and from there YX to its destination
// (two-phase routing, one VC per phase):
//
//  * RT_YX: no intermediate (mid = src), plain YX, either VC may be used.
//  * RT_COLUMN_SELECT (two-sided layout): the intermediate stays in the
//    source row.  Source and destination on the same side: fewer than 4
//    hops apart -> source column; otherwise the source column or the one
//    next to it towards the middle, chosen at random.  Different sides: a
//    random inner column 1..6.  This follows the document's pseudo-code.
//  * RT_SMART_DOR (four-sided layout): of the two corner routers of the
//    minimal rectangle, the XY corner (source row, destination column) is
//    taken if it is not on the mesh perimeter, else the YX corner if it is
//    not, else none (plain YX).  Taking the YX corner gives the plain YX
//    path, so in effect the packet goes XY when that keeps it off the
//    perimeter.
//
// rnd is a free-running pseudo-random word from the caller; the mapping of
// 16 random bits onto 1..6 (rnd*6 >> 16) is this design's choice.
// Combinational.
module mid_select
  import hns_pkg::*;
#(
  parameter routing_e ROUTING = RT_YX
) (
  input  coord_t        src,
  input  coord_t        dst,
  input  logic [15:0]   rnd,
  output coord_t        mid,
  output logic          two_phase
);

  logic [CW-1:0] dy;
  logic [18:0]   scaled;
  coord_t        xy_corner, yx_corner;

  function automatic logic on_perimeter(input coord_t c);
    return (c.x == '0) || (c.x == CW'(MESH_W - 1)) ||
           (c.y == '0) || (c.y == CW'(MESH_H - 1));
  endfunction

  always_comb begin
    dy        = (src.y > dst.y) ? src.y - dst.y : dst.y - src.y;
    scaled    = 19'(rnd) * 19'd6;
    xy_corner = '{y: src.y, x: dst.x};
    yx_corner = '{y: dst.y, x: src.x};
    mid       = src;
    two_phase = 1'b0;
    unique case (ROUTING)
      RT_COLUMN_SELECT: begin
        two_phase = 1'b1;
        mid.y     = src.y;
        if (src.x == dst.x) begin
          if (dy < CW'(4))       mid.x = src.x;
          else if (rnd[0])       mid.x = (src.x < CW'(MESH_W / 2)) ? src.x + 1'b1 : src.x - 1'b1;
          else                   mid.x = src.x;
        end else begin
          mid.x = CW'(scaled[18:16]) + CW'(1);
        end
      end
      RT_SMART_DOR: begin
        two_phase = 1'b1;
        if (!on_perimeter(xy_corner))      mid = xy_corner;
        else if (!on_perimeter(yx_corner)) mid = yx_corner;
        else                               mid = src;
      end
      default: begin
        mid       = src;
        two_phase = 1'b0;
      end
    endcase
  end

endmodule
