// hns_pkg: types and constants shared by the hard-NoC switch (HNS).
//
// The switch is a 16x16 Ethernet crossbar built on an 8x8 mesh network-on-chip.
// Sizes follow the document: 64 routers, 64-bit links, five router ports,
// two virtual channels (VCs) of ten flits each, 16 switch ports.
// The flit sideband (valid/head/tail/vc), the header flit layout and the
// credit wires are this design's own choices.
package hns_pkg;

  // ---------------- sizes ----------------
  localparam int MESH_W    = 8;                 // routers per row (8x8 = 64 nodes)
  localparam int MESH_H    = 8;                 // routers per column
  localparam int CW        = 3;                 // coordinate width
  localparam int NPORTS    = 16;                // switch ports
  localparam int PW        = 4;                 // switch port index width
  localparam int DATA_W    = 64;                // link / flit width
  localparam int NUM_VC    = 2;                 // virtual channels per router port
  localparam int VC_W      = 1;
  localparam int BUF_DEPTH = 10;                // flits per VC input buffer
  localparam int RPORTS    = 5;                 // router ports N,E,S,W,Local
  localparam int LEN_W     = 16;                // frame length field (bytes)

  // Router port numbering. Rows (y) count from the top (north) edge.
  typedef enum logic [2:0] {
    P_NORTH = 3'd0,
    P_EAST  = 3'd1,
    P_SOUTH = 3'd2,
    P_WEST  = 3'd3,
    P_LOCAL = 3'd4
  } port_e;

  // Injection-point placements of Fig. "switch configurations".
  typedef enum logic [1:0] {
    CFG_TWO_SIDED  = 2'd0,
    CFG_FOUR_SIDED = 2'd1,
    CFG_DIAMOND    = 2'd2,
    CFG_DENSE      = 2'd3
  } cfg_e;

  // Routing algorithms.
  typedef enum logic [1:0] {
    RT_YX            = 2'd0,   // dimension order, Y (north/south) first
    RT_COLUMN_SELECT = 2'd1,   // two-phase, for the two-sided layout
    RT_SMART_DOR     = 2'd2,   // two-phase, for the four-sided layout
    RT_MIN_ADAPTIVE  = 2'd3    // minimal adaptive on VC0, YX escape on VC1
  } routing_e;

  // One flit on a link: 64 data bits plus sideband control.
  typedef struct packed {
    logic              valid;
    logic              head;
    logic              tail;
    logic [VC_W-1:0]   vc;
    logic [DATA_W-1:0] data;
  } flit_t;

  // Credit returned upstream when a flit leaves an input buffer.
  typedef struct packed {
    logic            valid;
    logic [VC_W-1:0] vc;
  } credit_t;

  // Payload of the head flit (the NoC packet header).
  typedef struct packed {
    logic [24:0]      rsvd;
    logic             adaptive;   // 1: minimal adaptive routing with YX escape VC
    logic [LEN_W-1:0] len;        // Ethernet frame length in bytes
    logic [PW-1:0]    dst_port;   // switch output port
    logic [PW-1:0]    src_port;   // switch input port
    logic             two_phase;  // 1: VC chosen by phase (deadlock avoidance)
    logic             phase;      // 0: heading to intermediate, 1: to destination
    logic [CW-1:0]    mid_y;
    logic [CW-1:0]    mid_x;
    logic [CW-1:0]    dst_y;
    logic [CW-1:0]    dst_x;
  } noc_hdr_t;

  typedef struct packed {
    logic [CW-1:0] y;
    logic [CW-1:0] x;
  } coord_t;

  // One 64-bit word of an Ethernet frame on the 160 MHz fabric side.
  // sop marks the first word; len (bytes) is valid with it.
  typedef struct packed {
    logic              sop;
    logic              eop;
    logic [LEN_W-1:0]  len;
    logic [PW-1:0]     port;      // destination port at ingress, source port at egress
    logic [DATA_W-1:0] data;
  } eth_word_t;

  function automatic int unsigned frame_words(input logic [LEN_W-1:0] len);
    return (int'(len) + 7) / 8;
  endfunction

  // ---------------- injection-point placement ----------------
  // (y,x) of each port, packed as {y,x} with 3 bits each.
  function automatic coord_t port_place(input cfg_e c, input logic [PW-1:0] p);
    coord_t r;
    logic [2:0] q;
    q = p[2:0];
    unique case (c)
      CFG_TWO_SIDED: begin
        r.y = q;
        r.x = p[3] ? 3'd7 : 3'd0;
      end
      CFG_FOUR_SIDED: begin
        unique case (q)
          3'd0: r = '{y: 3'd0, x: 3'd3};
          3'd1: r = '{y: 3'd0, x: 3'd1};
          3'd2: r = '{y: 3'd1, x: 3'd0};
          3'd3: r = '{y: 3'd3, x: 3'd0};
          3'd4: r = '{y: 3'd4, x: 3'd0};
          3'd5: r = '{y: 3'd6, x: 3'd0};
          3'd6: r = '{y: 3'd7, x: 3'd1};
          default: r = '{y: 3'd7, x: 3'd3};
        endcase
        if (p[3]) r.x = 3'd7 - r.x;   // east half mirrors the west half
      end
      CFG_DIAMOND: begin
        r.y = q;
        r.x = (q < 3'd4) ? 3'd3 - q : q - 3'd4;
        if (p[3]) r.x = 3'd7 - r.x;
      end
      default: begin // CFG_DENSE: 4x4 block, rows 2..5, cols 2..5
        r.y = 3'd2 + {1'b0, q[2:1]};
        r.x = (p[3] ? 3'd4 : 3'd2) + {2'b00, q[0]};
      end
    endcase
    return r;
  endfunction

  // One register stage on the soft link: the links reaching the top and
  // bottom rows (four-sided), rows 0,1,6,7 (diamond), every link (dense).
  function automatic logic port_pipelined(input cfg_e c, input logic [PW-1:0] p);
    coord_t r;
    r = port_place(c, p);
    unique case (c)
      CFG_TWO_SIDED:  return 1'b0;
      CFG_FOUR_SIDED: return (r.y == 3'd0) || (r.y == 3'd7);
      CFG_DIAMOND:    return (r.y <= 3'd1) || (r.y >= 3'd6);
      default:        return 1'b1;
    endcase
  endfunction

endpackage
