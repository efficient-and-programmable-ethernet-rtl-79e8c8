// tb_inject_map: checks the port-to-router placement of the four layouts
// against the router positions of the placement drawings, that the 16
// ports of a layout land on 16 distinct routers, and the number of soft
// links with a pipeline stage: none, 8, 8 and 16.
module tb_inject_map;
  import hns_pkg::*;

  logic [PW-1:0] port;
  coord_t xy [4];
  logic   pl [4];

  inject_map #(.CFG(CFG_TWO_SIDED))  u0 (.port, .xy(xy[0]), .pipelined(pl[0]));
  inject_map #(.CFG(CFG_FOUR_SIDED)) u1 (.port, .xy(xy[1]), .pipelined(pl[1]));
  inject_map #(.CFG(CFG_DIAMOND))    u2 (.port, .xy(xy[2]), .pipelined(pl[2]));
  inject_map #(.CFG(CFG_DENSE))      u3 (.port, .xy(xy[3]), .pipelined(pl[3]));

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  // expected {y,x} per port, west ports 0-7 (east ports mirror in x)
  int exp_y [3][8] = '{'{0,1,2,3,4,5,6,7}, '{0,0,1,3,4,6,7,7}, '{0,1,2,3,4,5,6,7}};
  int exp_x [3][8] = '{'{0,0,0,0,0,0,0,0}, '{3,1,0,0,0,0,1,3}, '{3,2,1,0,0,1,2,3}};

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int npipe [4];
    bit used [4][64];
    for (int c = 0; c < 4; c++) begin
      npipe[c] = 0;
      for (int n = 0; n < 64; n++) used[c][n] = 0;
    end
    for (int p = 0; p < 16; p++) begin
      port = PW'(p);
      #1;
      for (int c = 0; c < 3; c++) begin
        int ey, ex;
        ey = exp_y[c][p % 8];
        ex = (p < 8) ? exp_x[c][p % 8] : 7 - exp_x[c][p % 8];
        check(int'(xy[c].y) == ey && int'(xy[c].x) == ex,
              $sformatf("layout %0d port %0d at (x%0d,y%0d)", c, p, xy[c].x, xy[c].y));
      end
      check(xy[3].y >= 2 && xy[3].y <= 5 && xy[3].x >= 2 && xy[3].x <= 5, "dense inside centre 4x4");
      check((p < 8) == (xy[3].x < 4), "dense: west ports on west half");
      for (int c = 0; c < 4; c++) begin
        check(!used[c][xy[c].y * 8 + xy[c].x], "distinct routers");
        used[c][xy[c].y * 8 + xy[c].x] = 1;
        npipe[c] += pl[c];
      end
    end
    check(npipe[0] == 0,  "two-sided: no pipelined soft links");
    check(npipe[1] == 8,  "four-sided: 8 pipelined soft links");
    check(npipe[2] == 8,  "diamond: 8 pipelined soft links");
    check(npipe[3] == 16, "dense: 16 pipelined soft links");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
