// vc_router: five-port virtual-channel mesh router of the hard NoC.
//
// Ports N, E, S, W connect to the neighbouring routers over 64-bit links;
// port L (local) connects to the fabric port.  Each input port holds two
// VCs of BUF_DEPTH (10) flits.  Flow control is credit based: a router
// sends a flit only when the downstream VC buffer has a free slot, and
// returns one credit upstream for every flit that leaves one of its own
// input buffers.  These sizes and the credit/VC scheme follow the
// document; the microarchitecture below is this design's own:
//
//   cycle 0  buffer write (BW) of the arriving flit
//   cycle 1  route computation (RC) of a head flit at the buffer front,
//            VC allocation (VA) and switch allocation (SA); the granted
//            flit is registered into the output port (switch traversal)
//   cycle 2  the flit is on the link and is written by the next router
//
// A head flit without an output VC bids for the switch speculatively, in
// the same cycle as its VC request.  Non-speculative bids win over
// speculative ones at both allocator stages; a speculative grant is used
// only if the VC request was granted in that cycle too.  So a hop takes two
// cycles when speculation succeeds and three when the head flit first has
// to win its VC and then the switch (the document's "three stages, two with
// speculation").
//
// VA: each waiting head flit asks for the lowest-numbered free VC that its
// route allows (route_compute's vc_mask); a round-robin arbiter per output
// VC picks one requester.  An output VC stays owned by the input VC until
// the tail flit has left.
// Minimal adaptive packets (header bit adaptive) in input VC0 ask instead
// for VC0 on whichever minimal output port has the free VC0 with more
// credits (the shorter downstream queue), and for the escape VC1 on the YX
// port only when neither VC0 is free; a packet that arrived on VC1 stays on
// VC1 and YX.  So VC1 is a deadlock-free YX escape network for VC0.
// SA: separable, input first.  Per input port a round-robin arbiter picks
// one VC with a flit and a downstream credit; per output port a round-robin
// arbiter picks one input port.
//
// Interface (all in the NoC clock domain): in_flit[p] / out_credit[p] are
// the flits arriving at input port p and the credits sent back on it;
// out_flit[p] / in_credit[p] are the flits leaving output port p and the
// credits returned by its downstream buffer.  out_flit and out_credit are
// registers.  here is the router's own (row, column), a constant strap tied
// by the mesh; one router design serves every mesh position.
module vc_router
  import hns_pkg::*;
(
  input  coord_t  here,
  input  logic    clk,
  input  logic    rst_n,
  input  flit_t   in_flit    [RPORTS],
  output credit_t out_credit [RPORTS],
  output flit_t   out_flit   [RPORTS],
  input  credit_t in_credit  [RPORTS]
);

  localparam int NIVC = RPORTS * NUM_VC;   // input VCs, index p*NUM_VC+v
  localparam int BW   = 2 + DATA_W;        // buffered word: head, tail, data
  localparam int CRW  = $clog2(BUF_DEPTH + 1);


  // ------------------------------------------------------------------
  // Input buffers
  // ------------------------------------------------------------------
  logic [BW-1:0]     fq_dout  [NIVC];
  logic              fq_empty [NIVC];
  logic              fq_full  [NIVC];
  logic              fq_pop   [NIVC];

  logic              f_head   [NIVC];
  logic              f_tail   [NIVC];
  logic [DATA_W-1:0] f_data   [NIVC];

  for (genvar p = 0; p < RPORTS; p++) begin : g_in
    for (genvar v = 0; v < NUM_VC; v++) begin : g_vc
      localparam int I = p * NUM_VC + v;
      flit_fifo #(.W(BW), .DEPTH(BUF_DEPTH)) u_buf (
        .clk   (clk),
        .rst_n (rst_n),
        .push  (in_flit[p].valid && in_flit[p].vc == VC_W'(v)),
        .din   ({in_flit[p].head, in_flit[p].tail, in_flit[p].data}),
        .pop   (fq_pop[I]),
        .dout  (fq_dout[I]),
        .empty (fq_empty[I]),
        .full  (fq_full[I])
      );
      assign f_head[I] = fq_dout[I][BW-1];
      assign f_tail[I] = fq_dout[I][BW-2];
      assign f_data[I] = fq_dout[I][DATA_W-1:0];
    end
  end

  // ------------------------------------------------------------------
  // Route computation for the flit at the front of each input VC
  // ------------------------------------------------------------------
  port_e             rc_port  [NIVC];
  port_e             rc_alt   [NIVC];
  logic              rc_adapt [NIVC];
  noc_hdr_t          rc_hdr   [NIVC];
  logic              rc_phase [NIVC];
  logic [NUM_VC-1:0] rc_mask  [NIVC];

  for (genvar i = 0; i < NIVC; i++) begin : g_rc
    route_compute u_rc (
      .cur       (here),
      .hdr       (rc_hdr[i]),
      .out_port  (rc_port[i]),
      .alt_port  (rc_alt[i]),
      .new_phase (rc_phase[i]),
      .vc_mask   (rc_mask[i])
    );
    assign rc_hdr[i]   = noc_hdr_t'(f_data[i]);
    assign rc_adapt[i] = rc_hdr[i].adaptive;
  end

  // ------------------------------------------------------------------
  // State: input-VC ownership and output-VC status
  // ------------------------------------------------------------------
  logic              iv_active [NIVC];  // owns an output VC
  port_e             iv_port   [NIVC];
  logic [VC_W-1:0]   iv_vc     [NIVC];

  logic              ov_busy   [RPORTS][NUM_VC];
  logic [CRW-1:0]    ov_cred   [RPORTS][NUM_VC];

  // ------------------------------------------------------------------
  // VC allocation
  // ------------------------------------------------------------------
  logic              va_want   [NIVC];   // has a free VC to ask for
  port_e             ch_port   [NIVC];   // the output port asked for
  logic [VC_W-1:0]   va_vc     [NIVC];   // the VC asked for
  logic              va_gnt    [NIVC];
  logic [NIVC-1:0]   va_req_ov [RPORTS][NUM_VC];
  logic [NIVC-1:0]   va_gnt_ov [RPORTS][NUM_VC];

  always_comb begin
    for (int i = 0; i < NIVC; i++) begin
      va_want[i] = 1'b0;
      va_vc[i]   = '0;
      ch_port[i] = rc_port[i];
      if (!iv_active[i] && !fq_empty[i] && f_head[i] && rc_adapt[i]) begin
        if (i % NUM_VC == 0) begin
          // adaptive VC: the free VC0 with more credits among the minimal
          // ports, else the escape VC1 on the YX port
          if (!ov_busy[rc_port[i]][0] &&
              (ov_busy[rc_alt[i]][0] || ov_cred[rc_port[i]][0] >= ov_cred[rc_alt[i]][0])) begin
            va_want[i] = 1'b1;
          end else if (!ov_busy[rc_alt[i]][0]) begin
            va_want[i] = 1'b1;
            ch_port[i] = rc_alt[i];
          end else if (!ov_busy[rc_port[i]][1]) begin
            va_want[i] = 1'b1;
            va_vc[i]   = 1'b1;
          end
        end else if (!ov_busy[rc_port[i]][1]) begin
          // once on the escape VC a packet stays there
          va_want[i] = 1'b1;
          va_vc[i]   = 1'b1;
        end
      end else if (!iv_active[i] && !fq_empty[i] && f_head[i]) begin
        for (int w = NUM_VC - 1; w >= 0; w--) begin
          if (rc_mask[i][w] && !ov_busy[rc_port[i]][w]) begin
            va_want[i] = 1'b1;
            va_vc[i]   = VC_W'(w);
          end
        end
      end
    end
    for (int o = 0; o < RPORTS; o++)
      for (int w = 0; w < NUM_VC; w++)
        for (int i = 0; i < NIVC; i++)
          va_req_ov[o][w][i] = va_want[i] && ch_port[i] == port_e'(o) && va_vc[i] == VC_W'(w);
  end

  for (genvar o = 0; o < RPORTS; o++) begin : g_va_o
    for (genvar w = 0; w < NUM_VC; w++) begin : g_va_w
      rr_arbiter #(.N(NIVC)) u_va_arb (
        .clk     (clk),
        .rst_n   (rst_n),
        .req     (va_req_ov[o][w]),
        .advance (1'b1),
        .gnt     (va_gnt_ov[o][w])
      );
    end
  end

  always_comb begin
    for (int i = 0; i < NIVC; i++) begin
      va_gnt[i] = 1'b0;
      for (int o = 0; o < RPORTS; o++)
        for (int w = 0; w < NUM_VC; w++)
          if (va_gnt_ov[o][w][i]) va_gnt[i] = 1'b1;
    end
  end

  // ------------------------------------------------------------------
  // Switch allocation (separable, input first, speculative bids)
  // ------------------------------------------------------------------
  logic              sa_ns    [NIVC];    // non-speculative bid
  logic              sa_sp    [NIVC];    // speculative bid (head without VC)
  port_e             sa_port  [NIVC];
  logic [VC_W-1:0]   sa_vc    [NIVC];

  logic [NUM_VC-1:0] in_req   [RPORTS];
  logic [NUM_VC-1:0] in_gnt   [RPORTS];
  logic              in_any   [RPORTS];
  logic              in_spec  [RPORTS];
  port_e             in_port  [RPORTS];
  logic [VC_W-1:0]   in_ivc   [RPORTS];

  logic [RPORTS-1:0] out_req  [RPORTS];
  logic [RPORTS-1:0] out_gnt  [RPORTS];
  logic              out_used [RPORTS];
  logic              in_used  [RPORTS];

  always_comb begin
    for (int i = 0; i < NIVC; i++) begin
      sa_port[i] = iv_active[i] ? iv_port[i] : ch_port[i];
      sa_vc[i]   = iv_active[i] ? iv_vc[i]   : va_vc[i];
      sa_ns[i]   = iv_active[i] && !fq_empty[i] && ov_cred[sa_port[i]][sa_vc[i]] != '0;
      sa_sp[i]   = va_want[i] && ov_cred[sa_port[i]][sa_vc[i]] != '0;
    end
    // input stage: non-speculative bids first
    for (int p = 0; p < RPORTS; p++) begin
      logic [NUM_VC-1:0] ns, sp;
      for (int v = 0; v < NUM_VC; v++) begin
        ns[v] = sa_ns[p*NUM_VC+v];
        sp[v] = sa_sp[p*NUM_VC+v];
      end
      in_req[p] = (ns != '0) ? ns : sp;
    end
  end

  for (genvar p = 0; p < RPORTS; p++) begin : g_sa_in
    rr_arbiter #(.N(NUM_VC)) u_in_arb (
      .clk     (clk),
      .rst_n   (rst_n),
      .req     (in_req[p]),
      .advance (in_used[p]),
      .gnt     (in_gnt[p])
    );
  end

  always_comb begin
    for (int p = 0; p < RPORTS; p++) begin
      in_any[p]  = 1'b0;
      in_spec[p] = 1'b0;
      in_port[p] = P_LOCAL;
      in_ivc[p]  = '0;
      for (int v = 0; v < NUM_VC; v++) begin
        if (in_gnt[p][v]) begin
          in_any[p]  = 1'b1;
          in_spec[p] = !iv_active[p*NUM_VC+v];
          in_port[p] = sa_port[p*NUM_VC+v];
          in_ivc[p]  = VC_W'(v);
        end
      end
    end
    // output stage: non-speculative input ports first
    for (int o = 0; o < RPORTS; o++) begin
      logic [RPORTS-1:0] ns, sp;
      for (int p = 0; p < RPORTS; p++) begin
        ns[p] = in_any[p] && !in_spec[p] && in_port[p] == port_e'(o);
        sp[p] = in_any[p] &&  in_spec[p] && in_port[p] == port_e'(o);
      end
      out_req[o] = (ns != '0) ? ns : sp;
    end
  end

  for (genvar o = 0; o < RPORTS; o++) begin : g_sa_out
    rr_arbiter #(.N(RPORTS)) u_out_arb (
      .clk     (clk),
      .rst_n   (rst_n),
      .req     (out_req[o]),
      .advance (out_used[o]),
      .gnt     (out_gnt[o])
    );
  end

  // A grant is used unless it is speculative and the VC request failed.
  logic              send     [RPORTS];  // per input port
  logic [$clog2(RPORTS)-1:0] send_o [RPORTS];
  always_comb begin
    for (int p = 0; p < RPORTS; p++) begin
      send[p]   = 1'b0;
      send_o[p] = '0;
      for (int o = 0; o < RPORTS; o++) begin
        if (out_gnt[o][p] &&
            (!in_spec[p] || va_gnt[p*NUM_VC + int'(in_ivc[p])])) begin
          send[p]   = 1'b1;
          send_o[p] = 3'(o);
        end
      end
      in_used[p] = send[p];
    end
    for (int o = 0; o < RPORTS; o++) begin
      out_used[o] = 1'b0;
      for (int p = 0; p < RPORTS; p++)
        if (send[p] && send_o[p] == 3'(o)) out_used[o] = 1'b1;
    end
    for (int i = 0; i < NIVC; i++)
      fq_pop[i] = send[i / NUM_VC] && in_ivc[i / NUM_VC] == VC_W'(i % NUM_VC);
  end

  // ------------------------------------------------------------------
  // Sequential state, switch traversal and credits
  // ------------------------------------------------------------------
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < NIVC; i++) begin
        iv_active[i] <= 1'b0;
        iv_port[i]   <= P_LOCAL;
        iv_vc[i]     <= '0;
      end
      for (int o = 0; o < RPORTS; o++) begin
        out_flit[o]   <= '0;
        out_credit[o] <= '0;
        for (int w = 0; w < NUM_VC; w++) begin
          ov_busy[o][w] <= 1'b0;
          ov_cred[o][w] <= CRW'(BUF_DEPTH);
        end
      end
    end else begin
      // VC allocation results
      for (int i = 0; i < NIVC; i++) begin
        if (va_gnt[i]) begin
          iv_active[i]              <= 1'b1;
          iv_port[i]                <= ch_port[i];
          iv_vc[i]                  <= va_vc[i];
          ov_busy[ch_port[i]][va_vc[i]] <= 1'b1;
        end
      end
      // credit counters: returns from downstream, minus flits sent
      for (int o = 0; o < RPORTS; o++) begin
        for (int w = 0; w < NUM_VC; w++) begin
          logic inc, dec;
          inc = in_credit[o].valid && in_credit[o].vc == VC_W'(w);
          dec = 1'b0;
          for (int p = 0; p < RPORTS; p++) begin
            int i;
            i = p * NUM_VC + int'(in_ivc[p]);
            if (send[p] && send_o[p] == 3'(o) && sa_vc[i] == VC_W'(w)) dec = 1'b1;
          end
          ov_cred[o][w] <= ov_cred[o][w] + CRW'(inc) - CRW'(dec);
        end
      end
      // switch traversal into the output registers
      for (int o = 0; o < RPORTS; o++) begin
        out_flit[o].valid <= 1'b0;
      end
      for (int p = 0; p < RPORTS; p++) begin
        int i;
        i = p * NUM_VC + int'(in_ivc[p]);
        out_credit[p] <= '{valid: send[p], vc: in_ivc[p]};
        if (send[p]) begin
          noc_hdr_t h;
          h       = noc_hdr_t'(f_data[i]);
          h.phase = rc_phase[i];
          out_flit[send_o[p]] <= '{valid: 1'b1,
                                   head:  f_head[i],
                                   tail:  f_tail[i],
                                   vc:    sa_vc[i],
                                   data:  f_head[i] ? DATA_W'(h) : f_data[i]};
          if (f_tail[i]) begin
            iv_active[i]                <= 1'b0;
            ov_busy[send_o[p]][sa_vc[i]] <= 1'b0;
          end
        end
      end
    end
  end

  // ------------------------------------------------------------------
  // Protocol checks
  // ------------------------------------------------------------------
  for (genvar o = 0; o < RPORTS; o++) begin : g_chk
    for (genvar w = 0; w < NUM_VC; w++) begin : g_chk_vc
      a_credit_range: assert property (@(posedge clk) disable iff (!rst_n)
                                       ov_cred[o][w] <= CRW'(BUF_DEPTH));
    end
  end
  for (genvar p = 0; p < RPORTS; p++) begin : g_chk_in
    a_no_overrun: assert property (@(posedge clk) disable iff (!rst_n)
        in_flit[p].valid |-> !fq_full[p*NUM_VC + int'(in_flit[p].vc)] || fq_pop[p*NUM_VC + int'(in_flit[p].vc)]);
  end

endmodule
