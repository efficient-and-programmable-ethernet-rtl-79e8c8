// tb_pkt_egress: flits of frames on both VCs, interleaved and with random
// gaps, into the output-side packet preparation.
//
// Checks: every frame leaves whole, in order per VC, with sop/eop, length
// and source port right and its words on consecutive cycles while the
// transmitter is ready; a frame starts only after its tail flit arrived,
// two cycles later at the earliest; when the output is stopped the input
// is eventually refused (buffer full) and nothing is lost.
module tb_pkt_egress;
  import hns_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic      in_valid, in_ready, out_valid, out_ready;
  flit_t     in_flit;
  eth_word_t out_word;

  pkt_egress dut (.*);

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

  localparam int NF = 60;
  int f_len [NF];
  int f_vc  [NF];
  int f_tail_cyc [NF];
  int exp_q [NUM_VC][$];

  // flit streams per VC, interleaved at random
  flit_t s_q [NUM_VC][$];
  int    s_id [NUM_VC][$];

  task automatic make_frame(int id);
    noc_hdr_t h;
    flit_t f;
    int nw;
    f_len[id] = 64 + 8 * $urandom_range(180);
    f_vc[id]  = $urandom_range(1);
    nw = (f_len[id] + 7) / 8;
    h = '0; h.len = 16'(f_len[id]); h.src_port = 4'(id % 16);
    f = '0; f.valid = 1; f.vc = 1'(f_vc[id]); f.head = 1; f.data = DATA_W'(h);
    s_q[f_vc[id]].push_back(f); s_id[f_vc[id]].push_back(id);
    for (int w = 0; w < nw; w++) begin
      f.head = 0; f.tail = (w == nw - 1); f.data = {32'(id), 32'(w)};
      s_q[f_vc[id]].push_back(f); s_id[f_vc[id]].push_back(id);
    end
    exp_q[f_vc[id]].push_back(id);
  endtask

  bit stop_out = 0;
  int refused = 0;
  int cur_v;
  always @(negedge clk) begin
    if (rst_n) begin
      if (!(in_valid && !in_ready)) begin
        int v;
        v = $urandom_range(1);
        if (s_q[v].size() == 0) v = 1 - v;
        in_valid = s_q[v].size() > 0 && $urandom_range(3) != 0;
        if (in_valid) begin in_flit = s_q[v][0]; cur_v = v; end
      end
      out_ready = stop_out ? 1'b0 : ($urandom_range(7) != 0);
    end
  end

  int got = 0, w_idx = 0, cur_id = -1;
  bit in_frame = 0;
  always @(posedge clk) begin
    if (rst_n) begin
      if (in_valid && !in_ready) refused++;
      if (in_valid && in_ready) begin
        if (in_flit.tail) f_tail_cyc[s_id[cur_v][0]] = cyc;
        void'(s_q[cur_v].pop_front());
        void'(s_id[cur_v].pop_front());
      end
      if (in_frame) check(out_valid, "no gap inside a frame");
      if (out_valid && out_ready) begin
        if (out_word.sop) begin
          int v;
          check(!in_frame, "sop only at frame start");
          v = -1;
          for (int k = 0; k < NUM_VC; k++)
            if (exp_q[k].size() > 0 && int'(out_word.data[63:32]) == exp_q[k][0]) v = k;
          check(v >= 0, "frame is the oldest complete one of its VC");
          if (v >= 0) cur_id = exp_q[v].pop_front();
          check(int'(out_word.len) == f_len[cur_id] && int'(out_word.port) == cur_id % 16, "length and source port");
          check(cyc - f_tail_cyc[cur_id] >= 2, "frame starts after its tail arrived");
          w_idx = 0;
        end
        check(out_word.data == {32'(cur_id), 32'(w_idx)}, "word contents");
        check(out_word.eop == (w_idx == (f_len[cur_id] + 7) / 8 - 1), "eop position");
        in_frame = !out_word.eop;
        if (out_word.eop) got++;
        w_idx++;
      end
    end
  end

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in_valid = 0; in_flit = '0; out_ready = 0;
    for (int i = 0; i < NF; i++) make_frame(i);
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (300) @(posedge clk);
    stop_out = 1;
    repeat (1200) @(posedge clk);
    check(refused > 0, "input refused while output stopped");
    stop_out = 0;
    wait (got == NF);
    check(got == NF, "all frames out");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
