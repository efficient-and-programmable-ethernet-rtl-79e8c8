// tb_fabric_port: the fabric port between a 160 MHz fabric clock and a
// 926 MHz NoC clock, with a model of the router's local port on the NoC
// side.
//
// Ingress: random flits on both VCs go in at the fabric side; the model
// router returns credits after random delays, and for a while none at all.
// Packets are five flits (header with a 32-byte length, four words) on one
// VC.  Checks: order and contents, never more than BUF_DEPTH flits
// outstanding per VC, injection stops while credits are withheld, a lone
// packet is held until its last flit is in and then enters the NoC within 3
// fabric cycles as a burst of five flits on consecutive NoC cycles (the
// up-conversion to the NoC rate).
// Egress: the model router sends flits on both VCs whenever it holds a
// credit; the fabric side reads with random backpressure.  Checks: order
// and contents per VC, credits come back for every flit.
module tb_fabric_port;
  import hns_pkg::*;

  localparam int TF = 6250, TN = 1080;
  logic clk_f = 0, clk_n = 0, rst_f_n = 0, rst_n_n = 0;
  always #(TF/2) clk_f = ~clk_f;
  always #(TN/2) clk_n = ~clk_n;

  logic    f_in_valid, f_in_ready, f_out_valid, f_out_ready;
  flit_t   f_in_flit, f_out_flit, inj_flit, ej_flit;
  credit_t inj_credit, ej_credit;

  fabric_port dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %0t: %s", $time, what);
    end
  endtask

  function automatic flit_t mk(int dir, int i);
    flit_t f;
    f = '0;
    f.valid = 1;
    f.vc = VC_W'(((i / 5) * 7 + dir) % 3 == 0);
    f.head = (i % 5 == 0);
    f.tail = (i % 5 == 4);
    f.data = {32'(dir), 32'(i * 40503 + 17)};
    if (f.head) begin
      noc_hdr_t h;
      h = noc_hdr_t'(f.data);
      h.len = 16'd32;
      f.data = DATA_W'(h);
    end
    return f;
  endfunction

  localparam int NI = 600, NE = 600;

  // ---------------- ingress ----------------
  int  ig_sent = 0, ig_got = 0;
  int  ig_limit = 0;
  longint t_push [NI];
  longint lone_lat = -1;
  longint t_inj [5];
  always @(negedge clk_f) begin
    if (!(f_in_valid && !f_in_ready)) begin
      f_in_valid = ig_sent < ig_limit && $urandom_range(3) != 0;
      f_in_flit  = mk(0, ig_sent);
    end
  end
  always @(posedge clk_f) if (rst_f_n && f_in_valid && f_in_ready) begin t_push[ig_sent] = $time; ig_sent++; end

  int  outstanding [NUM_VC];
  int  cred_delay_q [$];
  bit  withhold = 0;
  int  inj_while_withheld = 0, withheld_cycles = 0;
  always @(negedge clk_n) begin
    inj_credit = '0;
    if (rst_n_n && inj_flit.valid) begin
      check(inj_flit.head == mk(0, ig_got).head && inj_flit.tail == mk(0, ig_got).tail &&
            inj_flit.vc == mk(0, ig_got).vc && inj_flit.data == mk(0, ig_got).data,
            $sformatf("ingress flit %0d", ig_got));
      if (ig_got == 0) lone_lat = $time - t_push[4];
      if (ig_got < 5) t_inj[ig_got] = $time;
      ig_got++;
      outstanding[inj_flit.vc]++;
      check(outstanding[inj_flit.vc] <= BUF_DEPTH, "no more than BUF_DEPTH outstanding");
      cred_delay_q.push_back({31'($urandom_range(6)), 1'(inj_flit.vc)});
      if (withhold) inj_while_withheld++;
    end
    if (withhold) withheld_cycles++;
    if (!withhold && cred_delay_q.size() > 0) begin
      if (cred_delay_q[0] >> 1 == 0) begin
        automatic int c = cred_delay_q.pop_front();
        inj_credit = '{valid: 1'b1, vc: 1'(c)};
        outstanding[c & 1]--;
      end else cred_delay_q[0] -= 2;
    end
  end

  // ---------------- egress ----------------
  int eg_sent = 0, eg_got = 0;
  int eg_cred [NUM_VC];
  int eg_seq_vc [NUM_VC][$];
  bit eg_go = 0;
  always @(negedge clk_n) begin
    ej_flit = '0;
    if (rst_n_n && ej_credit.valid) eg_cred[ej_credit.vc]++;
    if (eg_go && eg_sent < NE && eg_cred[mk(1, eg_sent).vc] > 0 && $urandom_range(1) == 1) begin
      ej_flit = mk(1, eg_sent);
      eg_cred[ej_flit.vc]--;
      eg_seq_vc[ej_flit.vc].push_back(eg_sent);
      eg_sent++;
    end
  end
  always @(negedge clk_f) f_out_ready = $urandom_range(2) != 0;
  always @(posedge clk_f) begin
    if (rst_f_n && f_out_valid && f_out_ready) begin
      automatic int v = int'(f_out_flit.vc);
      automatic int i = (eg_seq_vc[v].size() > 0) ? eg_seq_vc[v].pop_front() : -1;
      check(i >= 0 && f_out_flit.head == mk(1, i).head && f_out_flit.tail == mk(1, i).tail &&
            f_out_flit.data == mk(1, i).data, $sformatf("egress flit on VC%0d", v));
      eg_got++;
    end
  end

  initial begin
    #(TF * 40000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int g0;
    f_in_valid = 0; f_in_flit = '0; ej_flit = '0; inj_credit = '0;
    for (int v = 0; v < NUM_VC; v++) begin outstanding[v] = 0; eg_cred[v] = BUF_DEPTH; end
    repeat (4) @(posedge clk_f);
    rst_f_n = 1; rst_n_n = 1;
    repeat (4) @(posedge clk_f);
    // lone flit latency
    ig_limit = 5;
    repeat (20) @(posedge clk_f);
    check(ig_got == 5, "lone packet crossed");
    check(lone_lat >= 0 && lone_lat <= 3 * TF, $sformatf("lone packet latency after its tail %0d ps", lone_lat));
    for (int k = 1; k < 5; k++)
      check(t_inj[k] - t_inj[k-1] == TN, "packet injected as a burst at the NoC rate");
    // streaming, with a window of withheld credits
    ig_limit = NI; eg_go = 1;
    repeat (100) @(posedge clk_f);
    withhold = 1;
    repeat (40) @(posedge clk_f);
    g0 = ig_got;
    repeat (40) @(posedge clk_f);
    check(ig_got == g0, "injection stops without credits");
    withhold = 0;
    wait (ig_got == NI && eg_got == NE);
    repeat (20) @(posedge clk_f);
    check(ig_got == NI, "all ingress flits");
    check(eg_got == NE, "all egress flits");
    check(eg_cred[0] == BUF_DEPTH && eg_cred[1] == BUF_DEPTH, "all egress credits returned");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
