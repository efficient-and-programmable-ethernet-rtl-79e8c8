// tb_mid_select: checks the intermediate-router choice of the three
// routing algorithms against the rules they are defined by: none for YX;
// for Column-Select (two-sided placement) the source row, the source column
// for near same-side pairs, the source or next inner column for far
// same-side pairs, a random inner column 1..6 across sides, with every
// allowed column actually drawn; for Smart DOR the off-perimeter corner of
// the path rectangle, including the two worked routes of the document's
// illustration (port 5 -> 8 and port 3 -> 0 of the four-sided layout).
module tb_mid_select;
  import hns_pkg::*;

  coord_t src, dst, mid_yx, mid_cs, mid_sd;
  logic [15:0] rnd;
  logic tp_yx, tp_cs, tp_sd;

  mid_select #(.ROUTING(RT_YX))            u_yx (.src, .dst, .rnd, .mid(mid_yx), .two_phase(tp_yx));
  mid_select #(.ROUTING(RT_COLUMN_SELECT)) u_cs (.src, .dst, .rnd, .mid(mid_cs), .two_phase(tp_cs));
  mid_select #(.ROUTING(RT_SMART_DOR))     u_sd (.src, .dst, .rnd, .mid(mid_sd), .two_phase(tp_sd));

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  function automatic bit perim(coord_t c);
    return c.x == 0 || c.x == 7 || c.y == 0 || c.y == 7;
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit seen_col [8];
    bit seen_near_inner, seen_near_src;
    // ---- YX and Column-Select over all two-sided port pairs
    for (int s = 0; s < 16; s++) begin
      for (int d = 0; d < 16; d++) begin
        int dy;
        src = '{y: 3'(s % 8), x: (s < 8) ? 3'd0 : 3'd7};
        dst = '{y: 3'(d % 8), x: (d < 8) ? 3'd0 : 3'd7};
        dy  = (s % 8) > (d % 8) ? (s % 8) - (d % 8) : (d % 8) - (s % 8);
        for (int k = 0; k < 8; k++) seen_col[k] = 0;
        seen_near_inner = 0; seen_near_src = 0;
        for (int r = 0; r < 200; r++) begin
          rnd = 16'($urandom);
          #1;
          check(mid_yx == src && !tp_yx, "YX has no intermediate");
          check(tp_cs, "Column-Select is two-phase");
          check(mid_cs.y == src.y, "intermediate in source row");
          seen_col[mid_cs.x] = 1;
          if ((s < 8) == (d < 8)) begin
            if (dy < 4) check(mid_cs.x == src.x, "near same-side pair keeps column");
            else begin
              check(mid_cs.x == src.x || mid_cs.x == ((s < 8) ? 3'd1 : 3'd6), "far same-side pair: 0 or 1 column inwards");
              if (mid_cs.x == src.x) seen_near_src = 1; else seen_near_inner = 1;
            end
          end else begin
            check(mid_cs.x >= 1 && mid_cs.x <= 6, "cross pair: inner column");
          end
        end
        if ((s < 8) != (d < 8)) begin
          bit all;
          all = 1;
          for (int k = 1; k <= 6; k++) all &= seen_col[k];
          check(all, "cross pair draws every inner column");
        end else if (dy >= 4) begin
          check(seen_near_src && seen_near_inner, "far same-side pair draws both columns");
        end
      end
    end
    // ---- Smart DOR: worked examples (four-sided placement)
    src = '{y: 3'd6, x: 3'd0}; dst = '{y: 3'd0, x: 3'd4}; #1;   // port 5 -> port 8
    check(mid_sd == '{y: 3'd6, x: 3'd4} && tp_sd, "Smart DOR 5->8 turns at (x4,y6)");
    src = '{y: 3'd3, x: 3'd0}; dst = '{y: 3'd0, x: 3'd3}; #1;   // port 3 -> port 0
    check(mid_sd == '{y: 3'd3, x: 3'd3}, "Smart DOR 3->0 turns at (x3,y3)");
    src = '{y: 3'd3, x: 3'd0}; dst = '{y: 3'd3, x: 3'd7}; #1;   // port 3 -> port 11
    check(mid_sd == src, "Smart DOR same row: plain YX");
    // ---- Smart DOR: rule over all perimeter pairs
    for (int t = 0; t < 2000; t++) begin
      coord_t xyc, yxc;
      src = '{y: 3'($urandom_range(7)), x: 3'($urandom_range(7))};
      dst = '{y: 3'($urandom_range(7)), x: 3'($urandom_range(7))};
      #1;
      xyc = '{y: src.y, x: dst.x};
      yxc = '{y: dst.y, x: src.x};
      if (!perim(xyc))      check(mid_sd == xyc, "Smart DOR picks interior XY corner");
      else if (!perim(yxc)) check(mid_sd == yxc, "Smart DOR picks interior YX corner");
      else                  check(mid_sd == src, "Smart DOR falls back to YX");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
