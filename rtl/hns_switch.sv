// hns_switch: 16x16 Ethernet switch fabric whose crossbar is a hard
// network-on-chip (the "hard-NoC switch").
//
// Instead of building a crossbar from FPGA logic or block RAM, every
// switch port is attached to one router of a 64-node (8x8) mesh NoC with
// 64-bit links running at 926 MHz, and the NoC carries each Ethernet frame
// from its input port to its output port.  Per port the datapath is
//
//   rx words -> pkt_ingress -> soft_link -> fabric_port -> mesh_noc
//   mesh_noc -> fabric_port -> soft_link -> pkt_egress -> tx words
//
// pkt_ingress adds a NoC header with the destination router and the
// intermediate router of the chosen routing algorithm; the fabric port
// crosses from the 160 MHz fabric clock to the NoC clock and back,
// releasing each packet into the NoC whole so it travels at the NoC rate;
// pkt_egress gathers each frame and sends it out without gaps.
//
// CFG selects where the 16 ports attach to the mesh (two-sided,
// four-sided, diamond, dense); ROUTING selects plain YX, minimal adaptive
// with a YX escape VC, Column-Select (meant for two-sided) or Smart DOR
// (meant for four-sided).  The default,
// diamond with YX routing, is the placement the document finds best.
// Soft links of ports whose router is far from the transceiver column get
// one pipeline stage (inject_map / port_pipelined).
//
// Interface: clk_f/rst_f_n is the fabric clock domain of all rx_*/tx_*
// streams, clk_n/rst_n_n the NoC clock.  Each port's rx stream carries a
// frame as 64-bit words, valid/ready, sop with the output port and frame
// length, eop on the last word; tx streams carry frames the same way with
// the source port in `port`.  Resets are synchronous, active low, and must
// overlap in both domains.
module hns_switch
  import hns_pkg::*;
#(
  parameter cfg_e     CFG      = CFG_DIAMOND,
  parameter routing_e ROUTING  = RT_YX,
  parameter int       EG_WORDS = 256
) (
  input  logic      clk_f,
  input  logic      rst_f_n,
  input  logic      clk_n,
  input  logic      rst_n_n,
  input  logic      rx_valid [NPORTS],
  output logic      rx_ready [NPORTS],
  input  eth_word_t rx_word  [NPORTS],
  output logic      tx_valid [NPORTS],
  input  logic      tx_ready [NPORTS],
  output eth_word_t tx_word  [NPORTS]
);

  localparam int NN = MESH_W * MESH_H;

  flit_t   inj_flit   [NN];
  credit_t inj_credit [NN];
  flit_t   ej_flit    [NN];
  credit_t ej_credit  [NN];

  // node -> attached switch port (or none), fixed at elaboration
  function automatic int port_at(input int n);
    coord_t c;
    for (int p = 0; p < NPORTS; p++) begin
      c = port_place(CFG, PW'(p));
      if (int'(c.y) * MESH_W + int'(c.x) == n) return p;
    end
    return -1;
  endfunction

  mesh_noc u_noc (
    .clk        (clk_n),
    .rst_n      (rst_n_n),
    .inj_flit   (inj_flit),
    .inj_credit (inj_credit),
    .ej_flit    (ej_flit),
    .ej_credit  (ej_credit)
  );

  // routers with no switch port: local port idle
  for (genvar n = 0; n < NN; n++) begin : g_node
    if (port_at(n) < 0) begin : g_idle
      assign inj_flit[n]  = '0;
      assign ej_credit[n] = '0;
    end
  end

  for (genvar p = 0; p < NPORTS; p++) begin : g_port
    localparam coord_t XY     = port_place(CFG, PW'(p));
    localparam int     NODE   = int'(XY.y) * MESH_W + int'(XY.x);
    localparam int     STAGES = port_pipelined(CFG, PW'(p)) ? 1 : 0;

    logic  ig_v, ig_r, sl_a_v, sl_a_r, fp_o_v, fp_o_r, sl_b_v, sl_b_r;
    flit_t ig_f, sl_a_f, fp_o_f, sl_b_f;

    pkt_ingress #(.SRC_PORT(p), .CFG(CFG), .ROUTING(ROUTING)) u_ingress (
      .clk       (clk_f),
      .rst_n     (rst_f_n),
      .in_valid  (rx_valid[p]),
      .in_ready  (rx_ready[p]),
      .in_word   (rx_word[p]),
      .out_valid (ig_v),
      .out_ready (ig_r),
      .out_flit  (ig_f)
    );

    soft_link #(.STAGES(STAGES)) u_link (
      .clk         (clk_f),
      .rst_n       (rst_f_n),
      .a_in_valid  (ig_v),
      .a_in_ready  (ig_r),
      .a_in_flit   (ig_f),
      .a_out_valid (sl_a_v),
      .a_out_ready (sl_a_r),
      .a_out_flit  (sl_a_f),
      .b_in_valid  (fp_o_v),
      .b_in_ready  (fp_o_r),
      .b_in_flit   (fp_o_f),
      .b_out_valid (sl_b_v),
      .b_out_ready (sl_b_r),
      .b_out_flit  (sl_b_f)
    );

    fabric_port u_fport (
      .clk_f       (clk_f),
      .rst_f_n     (rst_f_n),
      .f_in_valid  (sl_a_v),
      .f_in_ready  (sl_a_r),
      .f_in_flit   (sl_a_f),
      .f_out_valid (fp_o_v),
      .f_out_ready (fp_o_r),
      .f_out_flit  (fp_o_f),
      .clk_n       (clk_n),
      .rst_n_n     (rst_n_n),
      .inj_flit    (inj_flit[NODE]),
      .inj_credit  (inj_credit[NODE]),
      .ej_flit     (ej_flit[NODE]),
      .ej_credit   (ej_credit[NODE])
    );

    pkt_egress #(.EG_WORDS(EG_WORDS)) u_egress (
      .clk       (clk_f),
      .rst_n     (rst_f_n),
      .in_valid  (sl_b_v),
      .in_ready  (sl_b_r),
      .in_flit   (sl_b_f),
      .out_valid (tx_valid[p]),
      .out_ready (tx_ready[p]),
      .out_word  (tx_word[p])
    );
  end

endmodule
