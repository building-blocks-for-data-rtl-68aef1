// tb_router2x2: self-checking test of the 2x2 router. Two sources send
// random packets to random outputs (D0 of the first byte) while two sinks
// acknowledge with random delays. Every packet must reach the output it
// names, whole and unchanged, and packets between one input and one output
// must keep their order. The test counts cycles in which both outputs are
// sending at once (concurrent paths) and cycles in which both inputs want
// the same output (conflicts); each must occur. A second phase sets
// strip_first: the routing byte must be dropped and the rest delivered.
module tb_router2x2;
  import dfp_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  link_fwd_t [1:0] in_fwd, out_fwd;
  logic      [1:0] in_ack, out_ack;
  logic            strip_first = 0;

  router2x2 dut (.clk, .rst_n, .strip_first, .in_fwd, .in_ack, .out_fwd, .out_ack);

  tb_link_src  #(.STALL(3)) u_s0 (.clk, .rst_n, .fwd(in_fwd[0]), .ack(in_ack[0]));
  tb_link_src  #(.STALL(3)) u_s1 (.clk, .rst_n, .fwd(in_fwd[1]), .ack(in_ack[1]));
  tb_link_sink #(.STALL(3)) u_k0 (.clk, .rst_n, .fwd(out_fwd[0]), .ack(out_ack[0]));
  tb_link_sink #(.STALL(3)) u_k1 (.clk, .rst_n, .fwd(out_fwd[1]), .ack(out_ack[1]));

  int checks = 0, failures = 0;
  int unsigned n_concurrent = 0, n_conflict = 0;
  logic [8:0] exp_q [2][$];      // expected bytes per output

  always @(posedge clk) begin
    if (out_fwd[0].ready && out_fwd[1].ready) n_concurrent++;
    if ((dut.g_im[0].u_im.req & dut.g_im[1].u_im.req) != '0) n_conflict++;
  end

  // Packets: byte 0 routing byte, byte 1 = {src, seq}, then 0..3 bytes.
  task automatic send(input int src, input int seq, input logic strip);
    logic [7:0] r;
    logic       d;
    int         len;
    len = 2 + ($urandom % 4) + (strip ? 1 : 0);
    r = 8'($urandom);
    d = r[0];
    for (int i = 0; i < len; i++) begin
      logic [7:0] b;
      b = (i == 0) ? r : (i == 1) ? 8'({src[0], 7'(seq)}) : 8'($urandom);
      if (src == 0) u_s0.q.push_back({(i == len - 1), b});
      else          u_s1.q.push_back({(i == len - 1), b});
      if (!(strip && i == 0)) exp_q[d].push_back({(i == len - 1), b});
    end
  endtask

  // Compare what an output received with what was sent to it, packet by
  // packet, keeping per-source order.
  task automatic check_out(input int o, input int off);
    logic [8:0] got [$];
    logic [8:0] want [2][$];
    int k;
    got = (o == 0) ? u_k0.got : u_k1.got;
    // Split the expectation per source (byte 1 of the packet).
    k = 0;
    while (k < exp_q[o].size()) begin
      int s, st;
      st = k;
      s = {31'b0, ((off == 0) ? exp_q[o][k][7] : (exp_q[o].size() > k + 1 && !exp_q[o][k][8]) ? exp_q[o][k+1][7] : 1'b0)};
      do k++; while (k < exp_q[o].size() && !exp_q[o][k-1][8]);
      for (int j = st; j < k; j++) want[s].push_back(exp_q[o][j]);
    end
    k = 0;
    while (k < got.size()) begin
      int s;
      s = {31'b0, ((off == 0) ? got[k][7] : (k + 1 < got.size() && !got[k][8]) ? got[k+1][7] : 1'b0)};
      do begin
        checks++;
        if (want[s].size() == 0 || got[k] !== want[s][0]) begin
          failures++;
          $display("output %0d byte %0d: %h unexpected", o, k, got[k]);
        end
        if (want[s].size() > 0) void'(want[s].pop_front());
        k++;
      end while (k < got.size() && !got[k-1][8]);
    end
    checks++;
    if (want[0].size() + want[1].size() != 0) begin
      failures++;
      $display("output %0d: %0d bytes missing", o, want[0].size() + want[1].size());
    end
    if (o == 0) u_k0.got.delete(); else u_k1.got.delete();
  endtask

  initial begin
    int unsigned t0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int p = 0; p < 60; p++) begin
      send(0, p, 1'b0);
      send(1, p, 1'b0);
    end
    wait (u_s0.q.size() == 0 && u_s1.q.size() == 0);
    repeat (200) @(posedge clk);
    check_out(0, 1);
    exp_q[0].delete();
    check_out(1, 1);
    exp_q[1].delete();

    strip_first = 1;
    for (int p = 0; p < 30; p++) begin
      send(0, p, 1'b1);
      send(1, p, 1'b1);
    end
    wait (u_s0.q.size() == 0 && u_s1.q.size() == 0);
    repeat (200) @(posedge clk);
    check_out(0, 0);
    exp_q[0].delete();
    check_out(1, 0);
    exp_q[1].delete();
    strip_first = 0;

    checks++;
    if (n_concurrent == 0) begin failures++; $display("no concurrent transfers"); end
    checks++;
    if (n_conflict == 0) begin failures++; $display("no output conflicts"); end
    $display("concurrent cycles %0d, conflict cycles %0d", n_concurrent, n_conflict);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
