// tb_pkt_ingress: frames into the input-side packet preparation of switch
// port 2 (diamond placement, YX routing, and a second instance with
// Column-Select on the two-sided placement).  Checks that each frame
// becomes one header flit followed by its words as body flits, tail on
// the last; that the header carries the destination router of the output
// port, the frame length and both port numbers, and the intermediate
// router of the routing algorithm; that a frame of N words takes N+1
// cycles; and that the input is held off while the header goes out.
module tb_pkt_ingress;
  import hns_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic      in_valid, in_ready [2], out_valid [2], out_ready;
  eth_word_t in_word;
  flit_t     out_flit [2];

  pkt_ingress #(.SRC_PORT(2), .CFG(CFG_DIAMOND),   .ROUTING(RT_YX)) dut (
    .clk, .rst_n, .in_valid, .in_ready(in_ready[0]), .in_word,
    .out_valid(out_valid[0]), .out_ready, .out_flit(out_flit[0]));
  pkt_ingress #(.SRC_PORT(2), .CFG(CFG_TWO_SIDED), .ROUTING(RT_COLUMN_SELECT)) dut_cs (
    .clk, .rst_n, .in_valid, .in_ready(in_ready[1]), .in_word,
    .out_valid(out_valid[1]), .out_ready, .out_flit(out_flit[1]));

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %0t: %s", $time, what);
    end
  endtask

  // diamond (y,x) of ports, as drawn
  int dia_y [16] = '{0,1,2,3,4,5,6,7, 0,1,2,3,4,5,6,7};
  int dia_x [16] = '{3,2,1,0,0,1,2,3, 4,5,6,7,7,6,5,4};

  int rx_stall = 0;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in_valid = 0; in_word = '0; out_ready = 1;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int f = 0; f < 40; f++) begin
      int dst, len, nw, t0, cycles, fi;
      bit cs_mid_seen_inner;
      dst = $urandom_range(15);
      len = 64 + 8 * $urandom_range(100);
      nw  = (len + 7) / 8;
      out_ready = (f >= 30) ? 1'b0 : 1'b1;
      fi = 0;
      cycles = 0;
      for (int w = 0; w < nw; ) begin
        in_valid     = 1;
        in_word.sop  = (w == 0);
        in_word.eop  = (w == nw - 1);
        in_word.len  = 16'(len);
        in_word.port = 4'(dst);
        in_word.data = {32'(f), 32'(w)};
        if (f >= 30) out_ready = $urandom_range(1);
        #1;
        // both instances see the same stream and must agree on readiness
        check(in_ready[0] == in_ready[1], "instances in step");
        if (out_valid[0] && out_ready) begin
          if (fi == 0) begin
            noc_hdr_t h, hc;
            h  = noc_hdr_t'(out_flit[0].data);
            hc = noc_hdr_t'(out_flit[1].data);
            check(out_flit[0].head && !out_flit[0].tail, "header flit first");
            check(!in_ready[0], "input held during header");
            check(int'(h.dst_y) == dia_y[dst] && int'(h.dst_x) == dia_x[dst], "destination router");
            check(int'(h.mid_y) == 2 && int'(h.mid_x) == 1 && !h.two_phase && !h.phase, "YX: no intermediate");
            check(int'(h.len) == len && int'(h.dst_port) == dst && h.src_port == 4'd2, "length and ports");
            check(hc.two_phase && hc.mid_y == 3'd2, "Column-Select: two-phase, source row");
            check(int'(hc.dst_x) == (dst < 8 ? 0 : 7) && int'(hc.dst_y) == dst % 8, "two-sided destination");
            if (dst >= 8) check(hc.mid_x >= 1 && hc.mid_x <= 6, "Column-Select: inner column across sides");
            else if (dst % 8 < 6) check(hc.mid_x == 0, "Column-Select: near same-side pair keeps column");
          end else begin
            check(!out_flit[0].head && out_flit[0].data == {32'(f), 32'(fi - 1)}, "body flit contents");
            check(out_flit[0].tail == (fi == nw), "tail on last word");
            check(in_ready[0], "body passes straight through");
          end
          fi++;
        end
        if (in_valid && !in_ready[0]) rx_stall++;
        if (in_ready[0]) w++;
        @(negedge clk);
        cycles++;
      end
      in_valid = 0;
      if (f < 30) check(cycles == nw + 1, $sformatf("frame of %0d words took %0d cycles", nw, cycles));
    end
    check(rx_stall > 0, "input backpressure happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
