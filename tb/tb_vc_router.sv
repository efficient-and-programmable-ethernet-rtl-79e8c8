// tb_vc_router: one router at column 3, row 3 of the mesh, driven on all
// five inputs by credit-respecting flit sources, with credit-returning
// sinks on all five outputs.
//
// Checks: every packet leaves on the YX output towards its target with all
// flits in order on one output VC; the header's phase bit is updated and
// the VC class obeyed for two-phase packets; a lone head flit crosses in 2
// cycles (speculation succeeds) and its body follows one flit per cycle;
// two packets to one output share it on the two VCs; a head flit that has
// to wait for a VC takes at least 3 cycles; an output whose credits are
// withheld sends exactly BUF_DEPTH flits and then stops; one credit comes
// back on the input port for every flit that left.  Minimal adaptive
// packets take the YX port when both minimal ports are free and equally
// loaded, the other minimal port when the YX port's VC0 is held, and stay
// on the escape VC1 (YX) once they arrive on it.
module tb_vc_router;
  import hns_pkg::*;

  logic    clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  flit_t   in_flit    [RPORTS];
  credit_t out_credit [RPORTS];
  flit_t   out_flit   [RPORTS];
  credit_t in_credit  [RPORTS];

  coord_t  here = '{y: 3'd3, x: 3'd3};

  vc_router dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %0t: %s", $time, what);
    end
  endtask

  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // ---------------- packets ----------------
  localparam int MAXP = 64;
  int  p_in     [MAXP];   // input port
  int  p_vc     [MAXP];   // input VC
  int  p_out    [MAXP];   // expected output port
  int  p_len    [MAXP];   // body flits
  bit  p_tp     [MAXP];   // two-phase
  bit  p_ph1    [MAXP];   // expected phase after this router
  int  p_t_in   [MAXP];   // cycle head put on the input
  int  p_t_out  [MAXP];   // cycle head seen at the output
  int  p_got    [MAXP];   // flits received
  int  p_evc    [MAXP];   // expected output VC, -1: any
  bit  next_adapt = 0;    // header bit adaptive for the next add_packet
  noc_hdr_t p_hdr [MAXP];
  int  np = 0;

  // per input port: queue of flits to send
  flit_t q_flit [RPORTS][$];
  int    q_pid  [RPORTS][$];
  int    cred   [RPORTS][NUM_VC];
  int    credits_back [RPORTS];
  int    flits_in     [RPORTS];

  task automatic add_packet(int inp, int vc, int dx, int dy, int mx, int my, bit tp, bit ph, int len);
    noc_hdr_t h;
    flit_t f;
    int id;
    id = np++;
    h = '0;
    h.dst_x = 3'(dx); h.dst_y = 3'(dy); h.mid_x = 3'(mx); h.mid_y = 3'(my);
    h.two_phase = tp; h.phase = ph; h.len = 16'(id);
    h.adaptive = next_adapt;
    p_evc[id] = -1;
    p_in[id] = inp; p_vc[id] = vc; p_len[id] = len; p_tp[id] = tp; p_hdr[id] = h;
    p_got[id] = 0; p_t_in[id] = -1; p_t_out[id] = -1;
    // reference route: YX towards mid (phase 0, not yet there) or dst
    begin
      int tx, ty;
      bit ph1;
      ph1 = ph || (mx == 3 && my == 3);
      p_ph1[id] = ph1;
      tx = ph1 ? dx : mx; ty = ph1 ? dy : my;
      if (ty < 3) p_out[id] = P_NORTH;
      else if (ty > 3) p_out[id] = P_SOUTH;
      else if (tx > 3) p_out[id] = P_EAST;
      else if (tx < 3) p_out[id] = P_WEST;
      else p_out[id] = P_LOCAL;
    end
    f = '0; f.valid = 1; f.vc = VC_W'(vc);
    f.head = 1; f.tail = 0; f.data = DATA_W'(h);
    q_flit[inp].push_back(f); q_pid[inp].push_back(id);
    for (int i = 0; i < len; i++) begin
      f.head = 0; f.tail = (i == len - 1); f.data = {32'(id), 32'(i)};
      q_flit[inp].push_back(f); q_pid[inp].push_back(id);
    end
  endtask

  // ---------------- sources (drive after the falling edge) ----------------
  bit src_en = 0;
  always @(negedge clk) begin
    for (int p = 0; p < RPORTS; p++) begin
      if (rst_n && out_credit[p].valid) begin
        cred[p][out_credit[p].vc]++;
        credits_back[p]++;
      end
      in_flit[p] = '0;
      if (src_en && q_flit[p].size() > 0 && cred[p][q_flit[p][0].vc] > 0) begin
        in_flit[p] = q_flit[p].pop_front();
        cred[p][in_flit[p].vc]--;
        flits_in[p]++;
        if (in_flit[p].head) p_t_in[q_pid[p][0]] = cyc;
        void'(q_pid[p].pop_front());
      end
    end
  end

  // ---------------- sinks ----------------
  bit hold [RPORTS];
  int held [RPORTS][NUM_VC];
  int cur_pid [RPORTS][NUM_VC];
  int out_cnt [RPORTS];
  int both_vcs_busy = 0;
  always @(negedge clk) begin
    for (int o = 0; o < RPORTS; o++) begin
      in_credit[o] = '0;
      if (!hold[o]) begin
        for (int w = 0; w < NUM_VC; w++) if (held[o][w] > 0 && !in_credit[o].valid) begin
          in_credit[o] = '{valid: 1'b1, vc: VC_W'(w)};
          held[o][w]--;
        end
      end
      if (rst_n && out_flit[o].valid) begin
        automatic flit_t f = out_flit[o];
        automatic int w = int'(f.vc);
        out_cnt[o]++;
        if (!hold[o] && !in_credit[o].valid) in_credit[o] = '{valid: 1'b1, vc: f.vc};
        else held[o][w]++;
        if (f.head) begin
          automatic noc_hdr_t h = noc_hdr_t'(f.data);
          automatic int id = int'(h.len);
          cur_pid[o][w] = id;
          check(p_out[id] == o, $sformatf("packet %0d on output %0d, expected %0d", id, o, p_out[id]));
          check(h.phase == p_ph1[id], "phase bit written back");
          if (p_tp[id]) check(int'(f.vc) == int'(p_ph1[id]), "two-phase VC class");
          if (p_evc[id] >= 0) check(int'(f.vc) == p_evc[id], $sformatf("packet %0d output VC", id));
          p_t_out[id] = cyc;
          p_got[id]++;
        end else begin
          automatic int id = cur_pid[o][w];
          check(f.data == {32'(id), 32'(p_got[id] - 1)}, $sformatf("body flit order, packet %0d", id));
          check(f.tail == (p_got[id] == p_len[id]), "tail position");
          p_got[id]++;
        end
      end
    end
    if (dut.ov_busy[P_NORTH][0] && dut.ov_busy[P_NORTH][1]) both_vcs_busy++;
  end

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(int n);
    repeat (n) @(posedge clk);
  endtask

  initial begin
    for (int p = 0; p < RPORTS; p++) begin
      for (int w = 0; w < NUM_VC; w++) begin cred[p][w] = BUF_DEPTH; held[p][w] = 0; end
      hold[p] = 0; credits_back[p] = 0; flits_in[p] = 0; out_cnt[p] = 0;
      in_flit[p] = '0; in_credit[p] = '0;
    end
    run(3);
    rst_n = 1;
    run(2);
    src_en = 1;

    // 1. lone packet West -> North (target row 0), zero load
    add_packet(P_WEST, 0, 3, 0, 3, 3, 0, 0, 6);
    run(20);
    check(p_got[0] == 7, "lone packet complete");
    check(p_t_out[0] - p_t_in[0] == 2, $sformatf("zero-load hop latency %0d cycles", p_t_out[0] - p_t_in[0]));

    // 2. two-phase packet whose intermediate is this router: turns East on VC1
    add_packet(P_NORTH, 0, 6, 3, 3, 3, 1, 0, 4);
    // two-phase packet still heading to its intermediate (west of here), VC0
    add_packet(P_EAST, 0, 7, 7, 0, 3, 1, 0, 4);
    // ejection to the local port
    add_packet(P_SOUTH, 1, 3, 3, 3, 3, 0, 1, 3);
    run(30);
    for (int i = 1; i <= 3; i++) check(p_got[i] == p_len[i] + 1, $sformatf("packet %0d complete", i));

    // 3. three packets to North at once: two share the output on VC0/VC1,
    //    the third waits for a free VC
    add_packet(P_WEST,  0, 3, 0, 3, 3, 0, 0, 12);
    add_packet(P_EAST,  1, 3, 1, 3, 3, 0, 0, 12);
    add_packet(P_LOCAL, 0, 2, 0, 3, 3, 0, 0, 12);
    run(80);
    for (int i = 4; i <= 6; i++) check(p_got[i] == 13, $sformatf("contending packet %0d complete", i));
    check(both_vcs_busy > 0, "both output VCs of North in use together");
    begin
      int slow;
      slow = 0;
      for (int i = 4; i <= 6; i++) if (p_t_out[i] - p_t_in[i] >= 3) slow++;
      check(slow >= 1, "a blocked head flit takes 3 or more cycles");
    end

    // 4. credits withheld on East: exactly BUF_DEPTH flits leave, then it stops
    hold[P_EAST] = 1;
    begin
      int n_before;
      n_before = out_cnt[P_EAST];
      add_packet(P_WEST, 1, 7, 3, 3, 3, 0, 0, 15);
      run(60);
      check(out_cnt[P_EAST] - n_before == BUF_DEPTH, $sformatf("credit stall after %0d flits", out_cnt[P_EAST] - n_before));
      hold[P_EAST] = 0;
      run(60);
      check(p_got[7] == 16, "stalled packet completes after credits return");
    end

    // 5. random traffic on all inputs
    for (int k = 0; k < 30; k++) begin
      int inp, dx, dy;
      inp = $urandom_range(4);
      do begin
        dx = $urandom_range(7); dy = $urandom_range(7);
      end while ((inp == P_NORTH && dy < 3) || (inp == P_SOUTH && dy > 3) ||
                 (inp == P_EAST && (dx > 3 || dy != 3)) || (inp == P_WEST && (dx < 3 || dy != 3)));
      add_packet(inp, $urandom_range(1), dx, dy, 3, 3, 0, 1, 1 + $urandom_range(10));
    end
    run(600);
    for (int i = 8; i < np; i++) check(p_got[i] == p_len[i] + 1, $sformatf("random packet %0d complete", i));
    // 6. minimal adaptive routing towards (6,6): YX port South, alt East
    begin
      int a, b, c, e;
      next_adapt = 1;
      a = np; add_packet(P_WEST, 0, 6, 6, 3, 3, 0, 0, 3);          // idle: YX port
      p_evc[a] = 0;
      run(20);
      check(p_got[a] == 4 && p_t_out[a] - p_t_in[a] == 2, "adaptive packet, idle router: South in 2 cycles");
      next_adapt = 0;
      hold[P_SOUTH] = 1;
      b = np; add_packet(P_NORTH, 0, 3, 7, 3, 3, 0, 0, 15);         // holds South VC0
      run(30);
      next_adapt = 1;
      c = np; add_packet(P_WEST, 0, 6, 6, 3, 3, 0, 0, 3);          // South VC0 busy -> East
      p_out[c] = P_EAST; p_evc[c] = 0;
      e = np; add_packet(P_LOCAL, 1, 6, 6, 3, 3, 0, 0, 3);         // escape VC stays YX
      p_out[e] = P_SOUTH; p_evc[e] = 1;
      next_adapt = 0;
      run(30);
      check(p_got[c] == 4, "adaptive packet took the other minimal port");
      hold[P_SOUTH] = 0;
      run(60);
      check(p_got[b] == 16 && p_got[e] == 4, "held packets complete");
    end

    for (int p = 0; p < RPORTS; p++)
      check(credits_back[p] == flits_in[p], $sformatf("one credit per flit on input %0d", p));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
