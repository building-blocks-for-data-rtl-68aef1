// tb_rect_net: self-checking test of an 8 x 8 rectangular routing network
// (three stages of four 2x2 routers). Every source sends packets to random
// receivers, headed by the receiver's tag (dfp_pkg::rect_tag); receivers
// acknowledge with random delays. Each packet must arrive at the receiver
// it names, exactly as sent (the wire permutation between stages is undone
// at the receivers), and packets from one source to one receiver must keep
// their order. Each path must be exactly log2(N) routers long: the test
// measures the latency of a lone packet through an idle network.
module tb_rect_net;
  import dfp_pkg::*;

  localparam int N = 8;
  localparam int S = 3;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  link_fwd_t [N-1:0] in_fwd, out_fwd;
  logic      [N-1:0] in_ack, out_ack;

  rect_net #(.N(N), .BUF_BYTES(4)) dut (.clk, .rst_n, .in_fwd, .in_ack, .out_fwd, .out_ack);

  logic [8:0] srcq [N][$];
  logic [8:0] gotq [N][$];
  int unsigned pending [N];
  logic stall_en = 1;

  for (genvar i = 0; i < N; i++) begin : g_io
    tb_link_src  #(.STALL(2)) u_src (.clk, .rst_n, .fwd(in_fwd[i]), .ack(in_ack[i]));
    tb_link_sink #(.STALL(2)) u_snk (.clk, .rst_n, .fwd(out_fwd[i]), .ack(out_ack[i]));
    always @(posedge clk) begin
      while (srcq[i].size() > 0) u_src.q.push_back(srcq[i].pop_front());
      while (u_snk.got.size() > 0) gotq[i].push_back(u_snk.got.pop_front());
      pending[i] = u_src.q.size() + srcq[i].size() + (in_fwd[i].ready ? 1 : 0);
    end
  end

  int checks = 0, failures = 0;
  logic [8:0] exp_pk [N][N][$];   // [src][dst] expected bytes

  task automatic send(input int src, input int dst, input int seq);
    int len;
    len = 3 + ($urandom % 4);
    for (int i = 0; i < len; i++) begin
      logic [7:0] b;
      b = (i == 0) ? rect_tag(dst, S) : (i == 1) ? 8'(src) : (i == 2) ? 8'(seq) : 8'($urandom);
      srcq[src].push_back({(i == len - 1), b});
      exp_pk[src][dst].push_back({(i == len - 1), b});
    end
  endtask

  function automatic int total_pending();
    int t;
    t = 0;
    for (int i = 0; i < N; i++) t += pending[i] + srcq[i].size();
    return t;
  endfunction

  task automatic check_all();
    for (int d = 0; d < N; d++) begin
      int k;
      k = 0;
      while (k < gotq[d].size()) begin
        int s;
        s = (k + 1 < gotq[d].size()) ? int'(gotq[d][k+1][7:0]) : 0;
        if (s >= N) s = 0;
        do begin
          checks++;
          if (exp_pk[s][d].size() == 0 || gotq[d][k] !== exp_pk[s][d][0]) begin
            failures++;
            $display("receiver %0d byte %0d: %h unexpected (source %0d)", d, k, gotq[d][k], s);
          end
          if (exp_pk[s][d].size() > 0) void'(exp_pk[s][d].pop_front());
          k++;
        end while (k < gotq[d].size() && !gotq[d][k-1][8]);
      end
      gotq[d].delete();
    end
    for (int s = 0; s < N; s++)
      for (int d = 0; d < N; d++) begin
        checks++;
        if (exp_pk[s][d].size() != 0) begin
          failures++;
          $display("%0d bytes from %0d to %0d missing", exp_pk[s][d].size(), s, d);
        end
      end
  endtask

  initial begin
    int unsigned t0, lat;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int p = 0; p < 25; p++)
      for (int s = 0; s < N; s++) send(s, $urandom % N, p);
    @(posedge clk);
    while (total_pending() != 0) @(posedge clk);
    repeat (300) @(posedge clk);
    check_all();

    // Latency of a one-byte packet from source 0 to receiver 7 through the
    // idle network: per router, four-phase receive, buffer, request/grant
    // and four-phase send; the same value for every path of the network.
    srcq[0].push_back({1'b1, rect_tag(N - 1, S)});
    t0 = 0;
    while (!in_fwd[0].ready) @(posedge clk);
    while (!out_fwd[N-1].ready) begin @(posedge clk); t0++; end
    lat = t0;
    repeat (50) @(posedge clk);
    gotq[N-1].delete();
    srcq[5].push_back({1'b1, rect_tag(2, S)});
    t0 = 0;
    while (!in_fwd[5].ready) @(posedge clk);
    while (!out_fwd[2].ready) begin @(posedge clk); t0++; end
    checks++;
    if (t0 != lat) begin
      failures++;
      $display("path latencies differ: %0d and %0d cycles", lat, t0);
    end
    $display("one-byte latency through %0d stages: %0d cycles", S, lat);
    repeat (50) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
