// tb_hns_dense_adaptive: end-to-end test of the 16x16 hard-NoC switch in the
// dense placement (4x4 block in the mesh centre) with minimal adaptive routing.  It is the same test as tb_hns_switch (the default
// diamond/YX switch), run on the other placement/routing pair, so the
// mode selected by CFG and ROUTING is exercised through the whole design.
// This routing may deliver frames of one source/destination pair out of
// order; such reorderings are counted rather than failed, and every frame
// must still arrive exactly once.
//
// Frames with the packet-size mix of the evaluation (64 to 1504 bytes,
// bell-shaped distribution) are offered on the 16 receive streams in three
// phases:
//   1. one frame alone, to measure the zero-load port-to-port latency;
//   2. permutation traffic (every source sends to one fixed destination,
//      ports 0-3 <-> 4-7 and 8-11 <-> 12-15, the stress pattern across
//      the mesh middle), frames back to back at full line rate;
//   3. uniform random destinations, so several sources hit one output at
//      once, with random backpressure on the transmit side.
// A scoreboard checks that every frame arrives exactly once, at the right
// port, with the right length, source and contents, in order per
// source/destination pair, and without gaps between its words.  In phase 2
// the receive side must be stalled no more than the one header cycle per
// frame, i.e. the NoC keeps up with the 10 Gb/s line rate.  Counters make
// sure each mechanism was exercised: input backpressure, output
// backpressure, NoC credit stalls at the injection port, frames of two VCs
// interleaved at an egress port, and use of the second VC.
module tb_hns_dense_adaptive;
  import hns_pkg::*;

  localparam int TF = 6250;   // 160 MHz fabric clock
  localparam int TN = 1080;   // 926 MHz NoC clock
  localparam int MAXF = 64;   // frames per source

  logic clk_f = 0, clk_n = 0, rst_f_n = 0, rst_n_n = 0;
  always #(TF/2) clk_f = ~clk_f;
  always #(TN/2) clk_n = ~clk_n;

  logic      rx_valid [NPORTS];
  logic      rx_ready [NPORTS];
  eth_word_t rx_word  [NPORTS];
  logic      tx_valid [NPORTS];
  logic      tx_ready [NPORTS];
  eth_word_t tx_word  [NPORTS];

  hns_switch #(.CFG(CFG_DENSE), .ROUTING(RT_MIN_ADAPTIVE)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %0t: %s", $time, what);
    end
  endtask

  // ---------------- frame bookkeeping ----------------
  int          f_len   [NPORTS][MAXF];
  int          f_dst   [NPORTS][MAXF];
  bit          f_got   [NPORTS][MAXF];
  int          n_frames[NPORTS];       // frames queued per source
  int          n_sent  [NPORTS];       // frames fully sent per source
  int          n_recv = 0, n_total = 0;
  int          last_seq[NPORTS][NPORTS];
  int          reordered = 0;

  function automatic logic [63:0] word_of(int src, int seq, int i);
    return {4'(src), 12'(seq), 16'(i), 32'(src * 32'h9E37_79B9 ^ seq * 32'h85EB_CA6B ^ i * 32'hC2B2_AE35)};
  endfunction

  // Packet-size mix: 64..1504 bytes with probabilities 1,4,8,12,25,25,12,8,4,1 %.
  function automatic int pick_len();
    int r;
    int sizes[10] = '{64, 128, 256, 384, 512, 640, 768, 896, 1024, 1504};
    int cum[10]   = '{1, 5, 13, 25, 50, 75, 87, 95, 99, 100};
    r = int'($urandom_range(99));
    for (int k = 0; k < 10; k++) if (r < cum[k]) return sizes[k];
    return 1504;
  endfunction

  task automatic queue_frame(int src, int dst, int len);
    int s;
    s = n_frames[src];
    f_len[src][s] = len;
    f_dst[src][s] = dst;
    f_got[src][s] = 0;
    n_frames[src]++;
    n_total++;
  endtask

  // ---------------- receive-side drivers ----------------
  int  cur_seq [NPORTS];
  int  cur_wi  [NPORTS];
  int  rx_stall = 0, rx_words = 0;
  int  tx_stall = 0;
  bit  bp_mode  = 0;

  for (genvar p = 0; p < NPORTS; p++) begin : g_drv
    always @(posedge clk_f) begin
      if (!rst_f_n) begin
        rx_valid[p] <= 1'b0;
        rx_word[p]  <= '0;
        cur_seq[p]  <= 0;
        cur_wi[p]   <= 0;
        tx_ready[p] <= 1'b1;
      end else begin
        automatic int s  = cur_seq[p];
        automatic int wi = cur_wi[p];
        tx_ready[p] <= bp_mode ? ($urandom_range(3) != 0) : 1'b1;
        if (rx_valid[p] && !rx_ready[p]) rx_stall++;
        if (rx_valid[p] && rx_ready[p]) begin
          rx_words++;
          wi++;
          if (wi == (f_len[p][s] + 7) / 8) begin
            wi = 0;
            s++;
            n_sent[p]++;
          end
        end
        cur_seq[p] <= s;
        cur_wi[p]  <= wi;
        if (s < n_frames[p]) begin
          rx_valid[p]      <= 1'b1;
          rx_word[p].sop   <= (wi == 0);
          rx_word[p].eop   <= (wi == (f_len[p][s] + 7) / 8 - 1);
          rx_word[p].len   <= LEN_W'(f_len[p][s]);
          rx_word[p].port  <= PW'(f_dst[p][s]);
          rx_word[p].data  <= word_of(p, s, wi);
        end else begin
          rx_valid[p] <= 1'b0;
        end
      end
    end
  end

  // ---------------- transmit-side monitors ----------------
  int  mon_src [NPORTS];
  int  mon_seq [NPORTS];
  int  mon_wi  [NPORTS];
  bit  mon_in  [NPORTS];
  longint first_sop_time = 0;

  for (genvar p = 0; p < NPORTS; p++) begin : g_mon
    always @(posedge clk_f) begin
      if (!rst_f_n) begin
        mon_in[p] <= 1'b0;
      end else begin
        if (tx_valid[p] && !tx_ready[p]) tx_stall++;
        if (mon_in[p]) check(tx_valid[p], $sformatf("gap inside frame at port %0d", p));
        if (tx_valid[p] && tx_ready[p]) begin
          automatic int src = mon_src[p], seq = mon_seq[p], wi = mon_wi[p];
          automatic logic [63:0] d = tx_word[p].data;
          if (tx_word[p].sop) begin
            check(!mon_in[p], "sop inside a frame");
            src = int'(tx_word[p].port);
            seq = int'(d[59:48]);
            wi  = 0;
            check(seq < n_frames[src], "unknown frame");
            check(f_dst[src][seq] == p, $sformatf("frame %0d/%0d at wrong port %0d", src, seq, p));
            check(int'(tx_word[p].len) == f_len[src][seq], "length field");
            check(!f_got[src][seq], "frame delivered twice");
            if (seq < last_seq[src][p]) reordered++;
            else last_seq[src][p] = seq;
            if (first_sop_time == 0) first_sop_time = $time;
          end
          check(d == word_of(src, seq, wi), $sformatf("data word %0d of frame %0d/%0d", wi, src, seq));
          check(tx_word[p].eop == (wi == (f_len[src][seq] + 7) / 8 - 1), "eop position");
          if (tx_word[p].eop) begin
            f_got[src][seq] = 1;
            n_recv++;
          end
          mon_in[p]  <= !tx_word[p].eop;
          mon_src[p] <= src;
          mon_seq[p] <= seq;
          mon_wi[p]  <= wi + 1;
        end
      end
    end
  end

  // ---------------- mechanism counters (internal probes) ----------------
  int vc1_eject = 0, inj_stall = 0, eg_interleave = 0;
  for (genvar p = 0; p < NPORTS; p++) begin : g_probe
    logic last_vc;
    always @(posedge clk_n) begin
      if (dut.g_port[p].u_fport.ig_rvalid && !dut.g_port[p].u_fport.ig_rready) inj_stall++;
      if (dut.g_port[p].u_fport.ej_flit.valid && dut.g_port[p].u_fport.ej_flit.vc == 1'b1) vc1_eject++;
    end
    always @(posedge clk_f) begin
      if (dut.g_port[p].sl_b_v && dut.g_port[p].sl_b_r) begin
        if (!dut.g_port[p].sl_b_f.head && last_vc != dut.g_port[p].sl_b_f.vc) eg_interleave++;
        last_vc <= dut.g_port[p].sl_b_f.vc;
      end
    end
  end

  // ---------------- watchdog ----------------
  initial begin
    repeat (400000) @(posedge clk_f);
    failures++;
    $display("watchdog expired: %0d of %0d frames received", n_recv, n_total);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wait_all();
    int guard = 0;
    while (n_recv < n_total && guard < 200000) begin
      @(posedge clk_f);
      guard++;
    end
    check(n_recv == n_total, $sformatf("drained: %0d of %0d frames", n_recv, n_total));
  endtask

  int t0, t1, words_p2, frames_p2, stall0;
  initial begin
    for (int s = 0; s < NPORTS; s++) begin
      n_frames[s] = 0;
      n_sent[s]   = 0;
      for (int d = 0; d < NPORTS; d++) last_seq[s][d] = -1;
    end
    repeat (4) @(posedge clk_f);
    rst_f_n = 1;
    rst_n_n = 1;
    repeat (4) @(posedge clk_f);

    // ---- phase 1: zero-load latency of one 64-byte frame, port 0 -> 15
    queue_frame(0, 15, 64);
    t0 = int'($time);
    wait_all();
    $display("zero-load: first word in to first word out %0d ns",
             (int'(first_sop_time) - t0) / 1000);
    check((int'(first_sop_time) - t0) / TF < 40, "zero-load latency below 40 fabric cycles");

    // ---- phase 2: permutation traffic at full line rate
    stall0   = rx_stall;
    words_p2 = 0;
    frames_p2 = 0;
    for (int k = 0; k < 6; k++)
      for (int s = 0; s < NPORTS; s++) begin
        automatic int len = pick_len();
        queue_frame(s, s ^ 4, len);
        words_p2 += (len + 7) / 8;
        frames_p2++;
      end
    t0 = int'($time) / TF;
    wait_all();
    t1 = int'($time) / TF;
    $display("permutation: %0d frames, %0d words, %0d rx stall cycles, %0d cycles",
             frames_p2, words_p2, rx_stall - stall0, t1 - t0);
    // one header cycle per frame plus a little start-up slack
    check(rx_stall - stall0 <= frames_p2 + 4 * NPORTS, "line rate sustained under permutation");

    // ---- phase 3: uniform random destinations with output backpressure
    bp_mode = 1;
    for (int k = 0; k < 8; k++)
      for (int s = 0; s < NPORTS; s++)
        queue_frame(s, int'($urandom_range(NPORTS - 1)), pick_len());
    wait_all();
    bp_mode = 0;

    for (int s = 0; s < NPORTS; s++)
      for (int q = 0; q < n_frames[s]; q++)
        check(f_got[s][q], $sformatf("frame %0d/%0d lost", s, q));

    $display("frames delivered out of order: %0d", reordered);
    $display("mechanisms: rx_stall=%0d tx_stall=%0d inj_credit_stall=%0d vc1_eject=%0d eg_interleave=%0d",
             rx_stall, tx_stall, inj_stall, vc1_eject, eg_interleave);
    check(rx_stall > 0,      "input backpressure happened");
    check(tx_stall > 0,      "output backpressure happened");
    check(inj_stall > 0,     "credit stall at an injection port happened");
    check(vc1_eject > 0,     "second VC used");
    check(eg_interleave > 0, "two VCs interleaved at an egress port");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
