// async_fifo: dual-clock FIFO for crossing between the fabric clock and
// the NoC clock.
//
// Classic Gray-code design: each side keeps a binary pointer and a Gray
// copy; the Gray pointer of the other side is brought over through two
// flip-flops.  The write side sees full from the synchronised read pointer
// and the read side sees empty from the synchronised write pointer, so
// both flags are conservative and the FIFO never overflows or underflows.
// Depth is 2**AW words.  Write: wvalid/wready; read: rvalid/rready with
// first-word fall-through on rdata.  Each side has its own synchronous
// active-low reset; both must be applied together.
module async_fifo #(
  parameter int W  = 67,
  parameter int AW = 3
) (
  input  logic         wclk,
  input  logic         wrst_n,
  input  logic         wvalid,
  output logic         wready,
  input  logic [W-1:0] wdata,
  input  logic         rclk,
  input  logic         rrst_n,
  output logic         rvalid,
  input  logic         rready,
  output logic [W-1:0] rdata,
  output logic [AW:0]  rcount    // entries visible to the reader
);

  logic [W-1:0] mem [2**AW];
  logic [AW:0]  wbin, wgray, rbin, rgray;
  logic [AW:0]  rgray_w1, rgray_w2;   // read pointer in the write domain
  logic [AW:0]  wgray_r1, wgray_r2;   // write pointer in the read domain

  function automatic logic [AW:0] b2g(input logic [AW:0] b);
    return b ^ (b >> 1);
  endfunction

  // ---------------- write side ----------------
  logic [AW:0] wbin_n;
  assign wready = (wgray != {~rgray_w2[AW:AW-1], rgray_w2[AW-2:0]});
  assign wbin_n = wbin + (AW+1)'(wvalid && wready);

  always_ff @(posedge wclk) begin
    if (wvalid && wready) mem[wbin[AW-1:0]] <= wdata;
  end

  always_ff @(posedge wclk) begin
    if (!wrst_n) begin
      wbin     <= '0;
      wgray    <= '0;
      rgray_w1 <= '0;
      rgray_w2 <= '0;
    end else begin
      wbin     <= wbin_n;
      wgray    <= b2g(wbin_n);
      rgray_w1 <= rgray;
      rgray_w2 <= rgray_w1;
    end
  end

  // ---------------- read side ----------------
  logic [AW:0] rbin_n;
  assign rvalid = (rgray != wgray_r2);
  assign rdata  = mem[rbin[AW-1:0]];
  assign rbin_n = rbin + (AW+1)'(rvalid && rready);

  function automatic logic [AW:0] g2b(input logic [AW:0] g);
    logic [AW:0] b;
    b[AW] = g[AW];
    for (int i = AW - 1; i >= 0; i--) b[i] = b[i+1] ^ g[i];
    return b;
  endfunction
  assign rcount = g2b(wgray_r2) - rbin;

  always_ff @(posedge rclk) begin
    if (!rrst_n) begin
      rbin     <= '0;
      rgray    <= '0;
      wgray_r1 <= '0;
      wgray_r2 <= '0;
    end else begin
      rbin     <= rbin_n;
      rgray    <= b2g(rbin_n);
      wgray_r1 <= wgray;
      wgray_r2 <= wgray_r1;
    end
  end

endmodule
