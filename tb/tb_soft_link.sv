// tb_soft_link: a one-stage soft link carrying random flit streams in both
// directions with random backpressure.  Checks order and contents, one
// cycle of latency with a free output, and one flit per cycle sustained.
module tb_soft_link;
  import hns_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic  a_in_valid, a_in_ready, a_out_valid, a_out_ready;
  logic  b_in_valid, b_in_ready, b_out_valid, b_out_ready;
  flit_t a_in_flit, a_out_flit, b_in_flit, b_out_flit;

  soft_link #(.STAGES(1)) dut (.*);

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

  int a_sent = 0, a_got = 0, b_sent = 0, b_got = 0;
  int a_t [4096];
  int a_lat_ok = 0, a_full_rate = 0;
  bit bp = 0;

  function automatic flit_t mk(int dir, int i);
    flit_t f;
    f = '0;
    f.valid = 1;
    f.head = (i % 7 == 0);
    f.tail = (i % 7 == 6);
    f.vc = VC_W'(i % 2);
    f.data = {32'(dir), 32'(i * 2654435761)};
    return f;
  endfunction

  // drive on the falling edge, observe handshakes on the rising edge
  always @(negedge clk) begin
    if (rst_n) begin
      if (!(a_in_valid && !a_in_ready)) begin
        a_in_valid = (a_sent < 2000) && (bp ? $urandom_range(1) == 1 : 1'b1);
        a_in_flit  = mk(0, a_sent);
      end
      if (!(b_in_valid && !b_in_ready)) begin
        b_in_valid = (b_sent < 2000) && ($urandom_range(2) != 0);
        b_in_flit  = mk(1, b_sent);
      end
      a_out_ready = bp ? $urandom_range(1) == 1 : 1'b1;
      b_out_ready = $urandom_range(3) != 0;
    end
  end

  always @(posedge clk) begin
    if (rst_n) begin
      if (a_in_valid && a_in_ready) begin a_t[a_sent % 4096] = cyc; a_sent++; end
      if (b_in_valid && b_in_ready) b_sent++;
      if (a_out_valid && a_out_ready) begin
        check(a_out_flit == mk(0, a_got), "a stream order and contents");
        if (!bp && cyc - a_t[a_got % 4096] == 1) a_lat_ok++;
        if (!bp) a_full_rate++;
        a_got++;
      end
      if (b_out_valid && b_out_ready) begin
        check(b_out_flit == mk(1, b_got), "b stream order and contents");
        b_got++;
      end
    end
  end

  initial begin
    #400000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int c0, g0;
    a_in_valid = 0; b_in_valid = 0; a_out_ready = 0; b_out_ready = 0;
    a_in_flit = '0; b_in_flit = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // free-flowing a stream: 1 cycle latency, one flit per cycle
    repeat (5) @(posedge clk);
    c0 = cyc; g0 = a_got;
    repeat (200) @(posedge clk);
    check(a_got - g0 >= 199, $sformatf("full rate: %0d flits in 200 cycles", a_got - g0));
    check(a_lat_ok > 150, "one cycle latency");
    bp = 1;
    wait (a_got == 2000 && b_got == 2000);
    check(a_got == 2000 && b_got == 2000, "all flits through");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
