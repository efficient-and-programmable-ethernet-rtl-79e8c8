// soft_link: a connection through the FPGA's programmable interconnect
// between the packet-preparation logic of a switch port and the fabric
// port of its router.
//
// A link is bidirectional: a flit stream towards the NoC (a_*) and one
// back towards the transceiver (b_*).  When a port's router is three to
// four routers away from the transceiver column, the document adds one
// pipeline stage to reach timing at 160 MHz; STAGES gives that number
// (0 = plain wires, as for the two-sided layout).  Each stage is a
// reg_slice per direction, so a stage adds one cycle of latency and keeps
// full throughput.  Unlike a bare 64-bit register per direction, the
// slice also registers the ready path (backpressure) and needs a skid
// register; that is this design's choice.
module soft_link
  import hns_pkg::*;
#(
  parameter int STAGES = 1
) (
  input  logic  clk,
  input  logic  rst_n,
  // towards the NoC
  input  logic  a_in_valid,
  output logic  a_in_ready,
  input  flit_t a_in_flit,
  output logic  a_out_valid,
  input  logic  a_out_ready,
  output flit_t a_out_flit,
  // towards the transceiver
  input  logic  b_in_valid,
  output logic  b_in_ready,
  input  flit_t b_in_flit,
  output logic  b_out_valid,
  input  logic  b_out_ready,
  output flit_t b_out_flit
);

  localparam int FW = $bits(flit_t);

  logic          av [STAGES+1];
  logic          ar [STAGES+1];
  logic [FW-1:0] ad [STAGES+1];
  logic          bv [STAGES+1];
  logic          br [STAGES+1];
  logic [FW-1:0] bd [STAGES+1];

  assign av[0]       = a_in_valid;
  assign ad[0]       = a_in_flit;
  assign a_in_ready  = ar[0];
  assign a_out_valid = av[STAGES];
  assign a_out_flit  = flit_t'(ad[STAGES]);
  assign ar[STAGES]  = a_out_ready;

  assign bv[0]       = b_in_valid;
  assign bd[0]       = b_in_flit;
  assign b_in_ready  = br[0];
  assign b_out_valid = bv[STAGES];
  assign b_out_flit  = flit_t'(bd[STAGES]);
  assign br[STAGES]  = b_out_ready;

  for (genvar s = 0; s < STAGES; s++) begin : g_stage
    reg_slice #(.W(FW)) u_a (
      .clk (clk), .rst_n (rst_n),
      .in_valid  (av[s]),   .in_ready  (ar[s]),   .in_data  (ad[s]),
      .out_valid (av[s+1]), .out_ready (ar[s+1]), .out_data (ad[s+1])
    );
    reg_slice #(.W(FW)) u_b (
      .clk (clk), .rst_n (rst_n),
      .in_valid  (bv[s]),   .in_ready  (br[s]),   .in_data  (bd[s]),
      .out_valid (bv[s+1]), .out_ready (br[s+1]), .out_data (bd[s+1])
    );
  end

endmodule
