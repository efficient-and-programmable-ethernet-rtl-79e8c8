// fabric_port: the interface between the FPGA's soft logic and the local
// port of one hard NoC router.
//
// Its job, as the document gives it, is the clock crossing: flits arrive
// from the soft logic at the fabric clock (160 MHz for 10GbE) and are
// up-converted to the NoC clock (926 MHz); flits leaving the NoC are
// down-converted again.  Both directions here are 64 bits wide, the same
// as the NoC link, so the crossing is a dual-clock FIFO per direction.
// The rest is this design's own choice:
//
//  * ingress: soft logic writes flits with valid/ready (f_in_*) into an
//    async FIFO of 2**IG_AW (256) flits, enough for the largest frame.  On
//    the NoC side a packet is released only once all its flits are in the
//    FIFO (the header's length tells how many), so it then enters the NoC
//    at the NoC clock rate rather than trickling in at the port rate and
//    holding a VC of every link on its path for the whole frame time.
//    Each flit is injected into the router's local input when its VC has a
//    credit (one counter per VC, starting at the router's buffer depth).
//  * egress: the router's local output sees two VC buffers of BUF_DEPTH
//    flits here, so it can use the normal credit protocol.  Flits move from
//    these buffers, VCs taken in turn, into an async FIFO towards the
//    fabric, and a credit goes back to the router for each one.  The
//    fabric side reads with valid/ready (f_out_*); the flit's vc field
//    tells which packet stream it belongs to.
//
// f_in_flit.valid and f_out_flit.valid are ignored / mirror the
// handshake valid.  Flit latency through each direction is about two
// destination-clock cycles of synchronisation plus one register; on the
// ingress side it is counted from the packet's last flit, after which the
// whole packet leaves on consecutive NoC cycles (credits permitting).
module fabric_port
  import hns_pkg::*;
#(
  parameter int AFIFO_AW = 3,   // egress async FIFO depth 2**AFIFO_AW
  parameter int IG_AW    = 8    // ingress async FIFO depth 2**IG_AW flits
) (
  // fabric clock domain
  input  logic    clk_f,
  input  logic    rst_f_n,
  input  logic    f_in_valid,
  output logic    f_in_ready,
  input  flit_t   f_in_flit,
  output logic    f_out_valid,
  input  logic    f_out_ready,
  output flit_t   f_out_flit,
  // NoC clock domain
  input  logic    clk_n,
  input  logic    rst_n_n,
  output flit_t   inj_flit,
  input  credit_t inj_credit,
  input  flit_t   ej_flit,
  output credit_t ej_credit
);

  localparam int FW  = 2 + VC_W + DATA_W;   // head, tail, vc, data
  localparam int CRW = $clog2(BUF_DEPTH + 1);

  // ================= ingress: fabric -> NoC =================
  logic          ig_rvalid, ig_rready;
  logic [FW-1:0] ig_rdata;
  logic [IG_AW:0] ig_count;
  flit_t         ig_head;

  async_fifo #(.W(FW), .AW(IG_AW)) u_ig_fifo (
    .wclk   (clk_f),
    .wrst_n (rst_f_n),
    .wvalid (f_in_valid),
    .wready (f_in_ready),
    .wdata  ({f_in_flit.head, f_in_flit.tail, f_in_flit.vc, f_in_flit.data}),
    .rclk   (clk_n),
    .rrst_n (rst_n_n),
    .rvalid (ig_rvalid),
    .rready (ig_rready),
    .rdata  (ig_rdata),
    .rcount (ig_count)
  );

  assign ig_head = '{valid: ig_rvalid,
                     head:  ig_rdata[FW-1],
                     tail:  ig_rdata[FW-2],
                     vc:    ig_rdata[DATA_W +: VC_W],
                     data:  ig_rdata[DATA_W-1:0]};

  // A packet is released into the NoC only when all its flits (header
  // plus the frame words given by the header's length) are in the FIFO, or
  // the FIFO is full; it then leaves at the NoC clock rate.
  logic           ig_burst, ig_go;
  logic [IG_AW:0] ig_need;
  noc_hdr_t       ig_hdr;
  always_comb begin
    ig_hdr  = noc_hdr_t'(ig_rdata[DATA_W-1:0]);
    ig_need = (IG_AW+1)'(frame_words(ig_hdr.len)) + 1'b1;
    ig_go   = ig_burst || !ig_head.head || ig_count >= ig_need ||
              ig_count == (IG_AW+1)'(2**IG_AW);
  end

  logic [CRW-1:0] ig_cred [NUM_VC];
  assign ig_rready = ig_rvalid && ig_go && ig_cred[ig_head.vc] != '0;

  always_ff @(posedge clk_n) begin
    if (!rst_n_n) begin
      inj_flit <= '0;
      ig_burst <= 1'b0;
      for (int v = 0; v < NUM_VC; v++) ig_cred[v] <= CRW'(BUF_DEPTH);
    end else begin
      if (ig_rready) ig_burst <= !ig_head.tail;
      inj_flit       <= ig_head;
      inj_flit.valid <= ig_rready;
      for (int v = 0; v < NUM_VC; v++)
        ig_cred[v] <= ig_cred[v]
                      + CRW'(inj_credit.valid && inj_credit.vc == VC_W'(v))
                      - CRW'(ig_rready && ig_head.vc == VC_W'(v));
    end
  end

  // ================= egress: NoC -> fabric =================
  logic [FW-VC_W-1:0] eb_dout  [NUM_VC];
  logic               eb_empty [NUM_VC];
  logic               eb_full  [NUM_VC];
  logic               eb_pop   [NUM_VC];
  logic [NUM_VC-1:0]  eb_req, eb_gnt;
  logic               eg_wready, eg_wvalid;
  logic [FW-1:0]      eg_wdata, eg_rdata;
  logic [VC_W-1:0]    eg_vc;
  logic [AFIFO_AW:0]  eg_count;   // not needed on this side

  for (genvar v = 0; v < NUM_VC; v++) begin : g_eb
    flit_fifo #(.W(FW - VC_W), .DEPTH(BUF_DEPTH)) u_eb (
      .clk   (clk_n),
      .rst_n (rst_n_n),
      .push  (ej_flit.valid && ej_flit.vc == VC_W'(v)),
      .din   ({ej_flit.head, ej_flit.tail, ej_flit.data}),
      .pop   (eb_pop[v]),
      .dout  (eb_dout[v]),
      .empty (eb_empty[v]),
      .full  (eb_full[v])
    );
    assign eb_req[v] = !eb_empty[v] && eg_wready;
    assign eb_pop[v] = eb_gnt[v];
  end

  rr_arbiter #(.N(NUM_VC)) u_eb_arb (
    .clk     (clk_n),
    .rst_n   (rst_n_n),
    .req     (eb_req),
    .advance (1'b1),
    .gnt     (eb_gnt)
  );

  always_comb begin
    eg_vc = '0;
    for (int v = 0; v < NUM_VC; v++) if (eb_gnt[v]) eg_vc = VC_W'(v);
    eg_wvalid = eb_gnt != '0;
    eg_wdata  = {eb_dout[eg_vc][FW-VC_W-1 -: 2], eg_vc, eb_dout[eg_vc][DATA_W-1:0]};
  end

  always_ff @(posedge clk_n) begin
    if (!rst_n_n) ej_credit <= '0;
    else          ej_credit <= '{valid: eg_wvalid, vc: eg_vc};
  end

  async_fifo #(.W(FW), .AW(AFIFO_AW)) u_eg_fifo (
    .wclk   (clk_n),
    .wrst_n (rst_n_n),
    .wvalid (eg_wvalid),
    .wready (eg_wready),
    .wdata  (eg_wdata),
    .rclk   (clk_f),
    .rrst_n (rst_f_n),
    .rvalid (f_out_valid),
    .rready (f_out_ready),
    .rdata  (eg_rdata),
    .rcount (eg_count)
  );

  assign f_out_flit = '{valid: f_out_valid,
                        head:  eg_rdata[FW-1],
                        tail:  eg_rdata[FW-2],
                        vc:    eg_rdata[DATA_W +: VC_W],
                        data:  eg_rdata[DATA_W-1:0]};

  for (genvar v = 0; v < NUM_VC; v++) begin : g_chk
    a_eb_no_overrun: assert property (@(posedge clk_n) disable iff (!rst_n_n)
                                      (ej_flit.valid && ej_flit.vc == VC_W'(v)) |-> !eb_full[v]);
  end

endmodule
