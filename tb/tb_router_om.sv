// tb_router_om: self-checking test of the router output module. Two input
// module models each hold ten packets and request the output continuously,
// so every arbitration is a conflict: the granted input must alternate,
// packets must come out whole (never interleaved) and intact on the
// connection, and each input's packets in order. A final phase with only
// input 1 requesting checks that a lone request is served.
module tb_router_om;
  import dfp_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [1:0] req, gnt, take, in_valid, in_last;
  logic [7:0] in_data [2];
  link_fwd_t  fwd;
  logic       ack;

  router_om dut (.clk, .rst_n, .req, .gnt, .in_valid, .in_last, .in_data, .take, .fwd, .ack);
  tb_link_sink #(.STALL(2)) u_sink (.clk, .rst_n, .fwd, .ack);

  int checks = 0, failures = 0;
  logic [8:0] pk [2][$];          // bytes still to send per input
  logic [8:0] sent [2][$];        // what each input sent, in order
  int unsigned pos [2];

  for (genvar i = 0; i < 2; i++) begin : g_im
    assign req[i]      = pos[i] < pk[i].size();
    assign in_valid[i] = req[i];
    assign {in_last[i], in_data[i]} = req[i] ? pk[i][pos[i]] : 9'h0;
    always @(posedge clk) if (rst_n && take[i]) pos[i] <= pos[i] + 1;
  end

  task automatic add_packet(input int src, input int seq);
    int len;
    len = 1 + ($urandom % 5);
    for (int b = 0; b < len; b++) begin
      logic [7:0] d;
      d = (b == 0) ? 8'({src[0], 7'(seq)}) : 8'($urandom);
      pk[src].push_back({(b == len - 1), d});
      sent[src].push_back({(b == len - 1), d});
    end
  endtask

  initial begin
    int unsigned idx [2];
    int unsigned k, prev_src, npk;
    pos[0] = 0; pos[1] = 0;
    for (int s = 0; s < 2; s++) for (int p = 0; p < 10; p++) add_packet(s, p);
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (pos[0] == pk[0].size() && pos[1] == pk[1].size());
    repeat (30) @(posedge clk);
    // Lone request.
    add_packet(1, 10);
    wait (pos[1] == pk[1].size());
    repeat (30) @(posedge clk);

    // Split the received stream into packets and check them.
    idx[0] = 0; idx[1] = 0; k = 0; prev_src = 2; npk = 0;
    while (k < u_sink.got.size()) begin
      int src;
      src = int'(u_sink.got[k][7]);
      if (npk < 20) begin
        checks++;
        if (src == prev_src) begin
          failures++;
          $display("packet %0d: input %0d served twice in a row", npk, src);
        end
      end
      prev_src = src;
      do begin
        checks++;
        if (idx[src] >= sent[src].size() || u_sink.got[k] !== sent[src][idx[src]]) begin
          failures++;
          $display("byte %0d from input %0d wrong: %h", k, src, u_sink.got[k]);
        end
        idx[src]++;
        k++;
      end while (k < u_sink.got.size() && !u_sink.got[k-1][8]);
      npk++;
    end
    checks++;
    if (npk != 21 || idx[0] != sent[0].size() || idx[1] != sent[1].size()) begin
      failures++;
      $display("received %0d packets", npk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
