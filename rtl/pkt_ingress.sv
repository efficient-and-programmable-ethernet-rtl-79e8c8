// pkt_ingress: NoC packet preparation on the input side of one switch port.
//
// Soft logic at the fabric clock (160 MHz) between the receive transceiver
// and the NoC.  For every Ethernet frame it puts a NoC header flit in front
// of the frame's 64-bit words: the destination router (where the frame's
// output port attaches to the mesh, from the injection-point placement
// CFG), the intermediate router picked by the routing algorithm ROUTING
// (mid_select), the phase and VC policy, source and destination port and
// the frame length.  The frame words follow as body flits; the last one is
// the tail flit.  This is the document's description of the block; the
// interface and header layout are this design's own.
//
// Input: one eth_word_t per cycle with valid/ready.  sop marks the first
// word and carries the output port (port) and frame length in bytes (len);
// eop marks the last word.  The output port is expected to come from the
// header-inspection logic upstream.  Output: flits with valid/ready.  The
// header costs one extra cycle per frame; words then pass straight through
// (combinational valid/ready), one per cycle.  Every frame is injected on
// VC0; the routers pick the VCs used inside the mesh.
module pkt_ingress
  import hns_pkg::*;
#(
  parameter int       SRC_PORT = 0,
  parameter cfg_e     CFG      = CFG_DIAMOND,
  parameter routing_e ROUTING  = RT_YX
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      in_valid,
  output logic      in_ready,
  input  eth_word_t in_word,
  output logic      out_valid,
  input  logic      out_ready,
  output flit_t     out_flit
);

  typedef enum logic { S_HEADER, S_BODY } state_e;
  state_e state;
  logic   first;   // the next body word is the frame's first

  logic [15:0] lfsr;
  coord_t      src_xy, dst_xy, mid_xy;
  logic        src_pipe, dst_pipe, two_phase;
  noc_hdr_t    hdr;

  inject_map #(.CFG(CFG)) u_src_map (.port(PW'(SRC_PORT)), .xy(src_xy), .pipelined(src_pipe));
  inject_map #(.CFG(CFG)) u_dst_map (.port(in_word.port),  .xy(dst_xy), .pipelined(dst_pipe));

  mid_select #(.ROUTING(ROUTING)) u_mid (
    .src       (src_xy),
    .dst       (dst_xy),
    .rnd       (lfsr),
    .mid       (mid_xy),
    .two_phase (two_phase)
  );

  always_comb begin
    hdr           = '0;
    hdr.len       = in_word.len;
    hdr.dst_port  = in_word.port;
    hdr.src_port  = PW'(SRC_PORT);
    hdr.two_phase = two_phase;
    hdr.adaptive  = (ROUTING == RT_MIN_ADAPTIVE);
    hdr.phase     = 1'b0;
    hdr.mid_x     = mid_xy.x;
    hdr.mid_y     = mid_xy.y;
    hdr.dst_x     = dst_xy.x;
    hdr.dst_y     = dst_xy.y;

    out_valid = in_valid;
    out_flit  = '0;
    out_flit.valid = in_valid;
    if (state == S_HEADER) begin
      out_flit.head = 1'b1;
      out_flit.data = DATA_W'(hdr);
      in_ready      = 1'b0;
    end else begin
      out_flit.tail = in_word.eop;
      out_flit.data = in_word.data;
      in_ready      = out_ready;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state <= S_HEADER;
      first <= 1'b0;
      lfsr  <= 16'hACE1 ^ 16'(SRC_PORT * 16'h1F35);
    end else begin
      // x^16 + x^14 + x^13 + x^11 + 1, advanced every cycle
      lfsr <= {lfsr[14:0], lfsr[15] ^ lfsr[13] ^ lfsr[12] ^ lfsr[10]};
      unique case (state)
        S_HEADER: if (in_valid && out_ready) begin
          state <= S_BODY;
          first <= 1'b1;
        end
        S_BODY: if (in_valid && out_ready) begin
          first <= 1'b0;
          if (in_word.eop) state <= S_HEADER;
        end
      endcase
    end
  end

  a_sop_first: assert property (@(posedge clk) disable iff (!rst_n)
                                (state == S_HEADER && in_valid) |-> in_word.sop);
  a_no_sop_in_body: assert property (@(posedge clk) disable iff (!rst_n)
                                     (state == S_BODY && in_valid && !first) |-> !in_word.sop);

endmodule
