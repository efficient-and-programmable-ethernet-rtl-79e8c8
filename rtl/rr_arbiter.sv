// rr_arbiter: round-robin arbiter with one-hot grant.
//
// The request just after the last one served has the highest priority.
// gnt is combinational from req; the priority pointer moves past the
// granted requester on a clock edge where `advance` is high (the grant was
// actually used).  Used by the router's VC and switch allocators.
module rr_arbiter #(
  parameter int N = 4
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] req,
  input  logic         advance,
  output logic [N-1:0] gnt
);

  logic [N-1:0] last;   // one-hot, last requester served

  always_comb begin
    logic [2*N-1:0] dbl;
    int unsigned    base;
    gnt  = '0;
    base = 0;
    for (int i = 0; i < N; i++) if (last[i]) base = i;
    // scan from the requester after `last`, wrapping around
    dbl = {req, req};
    for (int k = N; k >= 1; k--) begin
      if (dbl[base + k]) begin
        gnt      = '0;
        gnt[(base + k) % N] = 1'b1;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n)                      last <= N'(1) << (N - 1);
    else if (advance && gnt != '0)   last <= gnt;
  end

  a_onehot: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(gnt));
  a_subset: assert property (@(posedge clk) disable iff (!rst_n) (gnt & ~req) == '0);

endmodule
