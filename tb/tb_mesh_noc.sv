// tb_mesh_noc: the 8x8 mesh with credit-respecting sources and
// credit-returning sinks on every router's local port.
//
// 1. Zero load: single packets between random router pairs; each must
//    arrive intact at its destination, and its head flit must take exactly
//    2 cycles per router passed (hops + 1 routers), the speculative
//    two-stage pipeline of every router.
// 2. Load: every node sends a burst of packets to random destinations, half
//    of them two-phase through a random intermediate router, a quarter
//    minimal adaptive with the YX escape VC, with sinks that sometimes
//    withhold credits.  All packets must arrive complete at the right node
//    with their flits in order; nothing may deadlock; some adaptive packet
//    must leave the YX path.
module tb_mesh_noc;
  import hns_pkg::*;

  localparam int NN = MESH_W * MESH_H;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  flit_t   inj_flit   [NN];
  credit_t inj_credit [NN];
  flit_t   ej_flit    [NN];
  credit_t ej_credit  [NN];

  mesh_noc dut (.*);

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

  localparam int MAXP = 2048;
  int p_dst [MAXP];
  int p_len [MAXP];
  int p_t_in [MAXP];
  int p_t_out [MAXP];
  int p_got [MAXP];
  int np = 0, ndone = 0;

  flit_t q_flit [NN][$];
  int    q_pid  [NN][$];
  int    cred   [NN][NUM_VC];

  int n_adapt = 0, adapt_escape = 0, adapt_nonyx = 0;
  bit p_ad [MAXP];

  task automatic add_packet(int s, int d, int m, bit tp, int len, bit ad = 0);
    noc_hdr_t h;
    flit_t f;
    int id;
    id = np++;
    h = '0;
    h.dst_x = 3'(d % 8); h.dst_y = 3'(d / 8);
    h.mid_x = 3'(m % 8); h.mid_y = 3'(m / 8);
    h.two_phase = tp; h.len = 16'(id);
    h.adaptive = ad;
    p_ad[id] = ad;
    p_dst[id] = d; p_len[id] = len; p_got[id] = 0;
    f = '0; f.valid = 1; f.vc = VC_W'(id % 2);
    f.head = 1; f.data = DATA_W'(h);
    q_flit[s].push_back(f); q_pid[s].push_back(id);
    for (int i = 0; i < len; i++) begin
      f.head = 0; f.tail = (i == len - 1); f.data = {32'(id), 32'(i)};
      q_flit[s].push_back(f); q_pid[s].push_back(id);
    end
  endtask

  always @(negedge clk) begin
    for (int n = 0; n < NN; n++) begin
      if (rst_n && inj_credit[n].valid) cred[n][inj_credit[n].vc]++;
      inj_flit[n] = '0;
      if (rst_n && q_flit[n].size() > 0 && cred[n][q_flit[n][0].vc] > 0) begin
        inj_flit[n] = q_flit[n].pop_front();
        cred[n][inj_flit[n].vc]--;
        if (inj_flit[n].head) p_t_in[q_pid[n][0]] = cyc;
        void'(q_pid[n].pop_front());
      end
    end
  end

  bit throttle = 0;
  int held [NN][NUM_VC];
  int cur  [NN][NUM_VC];
  int withheld = 0;
  always @(negedge clk) begin
    for (int n = 0; n < NN; n++) begin
      ej_credit[n] = '0;
      if (rst_n && ej_flit[n].valid) held[n][ej_flit[n].vc]++;
      if (!(throttle && $urandom_range(3) == 0)) begin
        for (int w = 0; w < NUM_VC; w++)
          if (held[n][w] > 0 && !ej_credit[n].valid) begin
            ej_credit[n] = '{valid: 1'b1, vc: VC_W'(w)};
            held[n][w]--;
          end
      end else if (held[n][0] + held[n][1] > 0) withheld++;
      if (rst_n && ej_flit[n].valid) begin
        automatic flit_t f = ej_flit[n];
        automatic int w = int'(f.vc);
        if (f.head) begin
          automatic noc_hdr_t h = noc_hdr_t'(f.data);
          automatic int id = int'(h.len);
          cur[n][w] = id;
          check(p_dst[id] == n, $sformatf("packet %0d at node %0d, expected %0d", id, n, p_dst[id]));
          check(h.phase, "phase 1 on arrival");
          if (p_ad[id] && w == 1) adapt_escape++;
          p_t_out[id] = cyc;
          p_got[id] = 1;
        end else begin
          automatic int id = cur[n][w];
          check(f.data == {32'(id), 32'(p_got[id] - 1)}, $sformatf("flit order of packet %0d", id));
          check(f.tail == (p_got[id] == p_len[id]), "tail position");
          p_got[id]++;
          if (f.tail) ndone++;
        end
      end
    end
  end

  // An adaptive head flit leaving a router east or west while its
  // destination row differs from the router's: a non-YX choice.
  always @(posedge clk) begin
    for (int n = 0; n < NN; n++) begin
      for (int o = int'(P_EAST); o <= int'(P_WEST); o += 2) begin
        flit_t f;
        noc_hdr_t h;
        f = dut.r_out_flit[n][o];
        h = noc_hdr_t'(f.data);
        if (f.valid && f.head && h.adaptive && int'(h.dst_y) != n / 8) adapt_nonyx++;
      end
    end
  end

  initial begin
    #200000;
    failures++;
    $display("watchdog: %0d of %0d packets", ndone, np);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int hops(int s, int d);
    int dx, dy;
    dx = (s % 8) > (d % 8) ? (s % 8) - (d % 8) : (d % 8) - (s % 8);
    dy = (s / 8) > (d / 8) ? (s / 8) - (d / 8) : (d / 8) - (s / 8);
    return dx + dy;
  endfunction

  initial begin
    for (int n = 0; n < NN; n++) begin
      for (int w = 0; w < NUM_VC; w++) begin cred[n][w] = BUF_DEPTH; held[n][w] = 0; end
      inj_flit[n] = '0; ej_credit[n] = '0;
    end
    repeat (3) @(posedge clk);
    rst_n = 1;

    // 1. zero-load latency
    for (int k = 0; k < 20; k++) begin
      int s, d, id;
      s = $urandom_range(NN - 1);
      d = $urandom_range(NN - 1);
      if (k == 0) begin s = 0; d = NN - 1; end
      id = np;
      add_packet(s, d, s, 0, 4);
      repeat (2 * 16 + 20) @(posedge clk);
      check(p_got[id] == 5, $sformatf("packet %0d -> %0d delivered", s, d));
      check(p_t_out[id] - p_t_in[id] == 2 * (hops(s, d) + 1),
            $sformatf("zero-load latency %0d -> %0d: %0d cycles for %0d hops",
                      s, d, p_t_out[id] - p_t_in[id], hops(s, d)));
    end

    // 2. loaded mesh, plain and two-phase packets, throttled sinks
    throttle = 1;
    for (int k = 0; k < 12; k++)
      for (int s = 0; s < NN; s++) begin
        int d;
        bit tp;
        int cls;
        d   = $urandom_range(NN - 1);
        cls = $urandom_range(3);
        tp  = (cls < 2);
        if (cls == 3) n_adapt++;
        add_packet(s, d, tp ? $urandom_range(NN - 1) : s, tp, 2 + $urandom_range(14), cls == 3);
      end
    while (ndone < np) @(posedge clk);
    check(ndone == np, "all packets delivered");
    check(withheld > 0, "sink backpressure happened");
    $display("adaptive packets %0d, arrived on escape VC %0d, X-before-Y hops %0d",
             n_adapt, adapt_escape, adapt_nonyx);
    check(adapt_nonyx > 0, "an adaptive packet left the YX path");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
