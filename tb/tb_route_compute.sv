// tb_route_compute: walks packets hop by hop through an 8x8 mesh using
// only route_compute's decisions and checks that each one reaches its
// destination on a minimal two-phase YX path: all Y moves before X moves in
// each phase, through the intermediate router, with the VC class rule
// (VC0 before the intermediate, VC1 after; any VC for plain YX).
// For every third packet the walk takes alt_port, the second minimal
// direction offered to adaptive routing, at random hops; alt_port must
// be the productive X move while both dimensions remain, and the path
// must stay minimal.
module tb_route_compute;
  import hns_pkg::*;

  coord_t   cur;
  noc_hdr_t hdr;
  port_e    out_port;
  port_e    alt_port;
  logic     new_phase;
  logic [NUM_VC-1:0] vc_mask;

  route_compute dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  function automatic int absd(int a, int b);
    return a > b ? a - b : b - a;
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 3000; t++) begin
      int sx, sy, mx, my, dx, dy, hops, expect_hops, x, y, tx, ty;
      bit tp, seen_x, ad;
      port_e go;
      sx = $urandom_range(7); sy = $urandom_range(7);
      dx = $urandom_range(7); dy = $urandom_range(7);
      tp = (t % 2 == 0);
      ad = !tp && (t % 3 == 0);
      if (tp) begin mx = $urandom_range(7); my = $urandom_range(7); end
      else begin mx = sx; my = sy; end
      if (t < 64) begin sx = t % 8; sy = t / 8; mx = sx; my = sy; dx = 7 - sx; dy = 7 - sy; tp = 0; end
      expect_hops = absd(sx, mx) + absd(sy, my) + absd(mx, dx) + absd(my, dy);
      hdr = '0;
      hdr.dst_x = 3'(dx); hdr.dst_y = 3'(dy);
      hdr.mid_x = 3'(mx); hdr.mid_y = 3'(my);
      hdr.two_phase = tp;
      x = sx; y = sy; hops = 0; seen_x = 0;
      forever begin
        cur = '{y: 3'(y), x: 3'(x)};
        #1;
        if (new_phase && !hdr.phase) seen_x = 0;   // a new YX leg begins
        if (tp) check(vc_mask == (new_phase ? 2'b10 : 2'b01), "VC class follows phase");
        else    check(vc_mask == 2'b11, "plain YX may use either VC");
        hdr.phase = new_phase;
        if (out_port == P_LOCAL) break;
        tx = new_phase ? dx : mx;
        ty = new_phase ? dy : my;
        if (y != ty && x != tx)
          check(alt_port == (tx > x ? P_EAST : P_WEST), "alt_port is the X move");
        else
          check(alt_port == out_port, "alt_port equals out_port with one dimension left");
        go = (ad && $urandom_range(1) == 1) ? alt_port : out_port;
        if (go != out_port) seen_x = 1;
        case (go)
          P_NORTH: begin check(!seen_x || ad, "Y after X"); y--; end
          P_SOUTH: begin check(!seen_x || ad, "Y after X"); y++; end
          P_EAST:  begin x++; seen_x = 1; end
          default: begin x--; seen_x = 1; end
        endcase
        check(x >= 0 && x < 8 && y >= 0 && y < 8, "stays inside mesh");
        hops++;
        if (hops > 30) break;
      end
      check(x == dx && y == dy, $sformatf("arrives (%0d,%0d)->(%0d,%0d)", sx, sy, dx, dy));
      check(hdr.phase == 1'b1, "phase 1 at destination");
      check(hops == expect_hops, $sformatf("path length %0d vs %0d", hops, expect_hops));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
