// pkt_egress: NoC packet preparation on the output side of one switch port.
//
// An Ethernet frame must leave the switch with no gaps between its words,
// but its flits may arrive from the NoC with gaps, and flits of two frames
// (one per VC) may arrive interleaved.  So, as the document describes, the
// soft logic buffers flits until the whole frame is there and only then
// sends it to the transmit transceiver.  How it is built is this design's
// own choice:
//
//  * per VC a word FIFO of EG_WORDS 64-bit words (the default 256 holds a
//    1518-byte frame, 190 words, with room to spare) and a FIFO of frame
//    descriptors (length, source port) written when the tail flit arrives;
//  * the head flit's header is held until the tail arrives, its payload is
//    not stored;
//  * a flit is accepted (in_ready) when its VC has room for a word and a
//    descriptor; a frame always fits once the older frames of its VC have
//    been sent, because EG_WORDS exceeds the largest frame;
//  * the sender takes complete frames from the two VCs in turn and sends
//    every word of a frame on consecutive cycles (out_ready permitting).
//
// Output: eth_word_t with valid/ready; sop (with len and the source port in
// port) on the first word, eop on the last.  Latency from tail flit in to
// first word out is two clock cycles.
module pkt_egress
  import hns_pkg::*;
#(
  parameter int EG_WORDS = 256,
  parameter int N_DESC   = 4
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      in_valid,
  output logic      in_ready,
  input  flit_t     in_flit,
  output logic      out_valid,
  input  logic      out_ready,
  output eth_word_t out_word
);

  localparam int DW = LEN_W + PW;

  logic [DATA_W-1:0] wq_dout  [NUM_VC];
  logic              wq_empty [NUM_VC];
  logic              wq_full  [NUM_VC];
  logic              wq_pop   [NUM_VC];
  logic [DW-1:0]     dq_dout  [NUM_VC];
  logic              dq_empty [NUM_VC];
  logic              dq_full  [NUM_VC];
  logic              dq_pop   [NUM_VC];
  noc_hdr_t          pend     [NUM_VC];   // header of the frame being collected

  logic              acc;
  assign in_ready = !wq_full[in_flit.vc] && !dq_full[in_flit.vc];
  assign acc      = in_valid && in_ready;

  for (genvar v = 0; v < NUM_VC; v++) begin : g_vc
    logic         mine;
    assign mine = acc && in_flit.vc == VC_W'(v);

    flit_fifo #(.W(DATA_W), .DEPTH(EG_WORDS)) u_words (
      .clk   (clk),
      .rst_n (rst_n),
      .push  (mine && !in_flit.head),
      .din   (in_flit.data),
      .pop   (wq_pop[v]),
      .dout  (wq_dout[v]),
      .empty (wq_empty[v]),
      .full  (wq_full[v])
    );

    flit_fifo #(.W(DW), .DEPTH(N_DESC)) u_desc (
      .clk   (clk),
      .rst_n (rst_n),
      .push  (mine && in_flit.tail),
      .din   ({pend[v].len, pend[v].src_port}),
      .pop   (dq_pop[v]),
      .dout  (dq_dout[v]),
      .empty (dq_empty[v]),
      .full  (dq_full[v])
    );

    always_ff @(posedge clk) begin
      if (!rst_n)                    pend[v] <= '0;
      else if (mine && in_flit.head) pend[v] <= noc_hdr_t'(in_flit.data);
    end
  end

  // ---------------- sender ----------------
  logic              busy;
  logic [VC_W-1:0]   cur;
  logic [LEN_W-1:0]  left;     // words still to send, including this one
  logic              first;
  logic [NUM_VC-1:0] rdy, pick;

  always_comb
    for (int v = 0; v < NUM_VC; v++) rdy[v] = !dq_empty[v];

  rr_arbiter #(.N(NUM_VC)) u_pick (
    .clk     (clk),
    .rst_n   (rst_n),
    .req     (busy ? '0 : rdy),
    .advance (1'b1),
    .gnt     (pick)
  );

  always_comb begin
    out_valid     = busy;
    out_word      = '0;
    out_word.sop  = first;
    out_word.eop  = (left == LEN_W'(1));
    out_word.len  = dq_dout[cur][DW-1 -: LEN_W];
    out_word.port = dq_dout[cur][PW-1:0];
    out_word.data = wq_dout[cur];
    for (int v = 0; v < NUM_VC; v++) begin
      wq_pop[v] = busy && out_ready && cur == VC_W'(v);
      dq_pop[v] = busy && out_ready && cur == VC_W'(v) && left == LEN_W'(1);
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy  <= 1'b0;
      cur   <= '0;
      left  <= '0;
      first <= 1'b0;
    end else if (!busy) begin
      for (int v = 0; v < NUM_VC; v++) begin
        if (pick[v]) begin
          busy  <= 1'b1;
          cur   <= VC_W'(v);
          left  <= LEN_W'(frame_words(dq_dout[v][DW-1 -: LEN_W]));
          first <= 1'b1;
        end
      end
    end else if (out_ready) begin
      first <= 1'b0;
      left  <= left - 1'b1;
      if (left == LEN_W'(1)) busy <= 1'b0;
    end
  end

  a_words_there: assert property (@(posedge clk) disable iff (!rst_n)
                                  busy |-> !wq_empty[cur]);

endmodule
