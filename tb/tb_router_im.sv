// tb_router_im: self-checking test of the router input module. A test
// source sends random packets (1..6 bytes) with random pauses; a model of
// the two output modules grants requests after random delays and takes
// bytes at random. Every byte must go to the output named by D0 of its
// packet's first byte, in order, with lastbyte intact. In a second phase
// strip_first is set and the first byte of each packet must vanish.
module tb_router_im;
  import dfp_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  link_fwd_t  fwd;
  logic       ack, strip_first = 0;
  logic [1:0] req, gnt = '0, take;
  logic       out_valid, out_last;
  logic [7:0] out_data;
  logic       take_en = 0;

  tb_link_src #(.STALL(2)) u_src (.clk, .rst_n, .fwd, .ack);
  router_im #(.BUF_BYTES(4)) dut (
    .clk, .rst_n, .fwd, .ack, .strip_first, .req, .gnt,
    .out_valid, .out_last, .out_data, .take
  );

  int checks = 0, failures = 0;
  logic [9:0] exp_q [$];        // {dest, last, data}
  int unsigned exp_idx = 0;
  int unsigned packets_seen = 0;

  assign take = {2{take_en && out_valid}} & gnt;

  always @(posedge clk) begin
    if (rst_n) begin
      // Output module model: grant after a random delay, release on drop.
      for (int d = 0; d < 2; d++) begin
        if (req[d] && !gnt[d] && ($urandom % 3 == 0) && gnt == '0) gnt[d] <= 1'b1;
        if (!req[d] && gnt[d]) gnt[d] <= 1'b0;
      end
      take_en <= ($urandom % 2 == 0);
      if (take != '0) begin
        checks++;
        if (exp_idx >= exp_q.size() ||
            {take[1], out_last, out_data} !== exp_q[exp_idx]) begin
          failures++;
          $display("byte %0d: got dest %0d %h", exp_idx, take[1], {out_last, out_data});
        end
        if (out_last) packets_seen++;
        exp_idx <= exp_idx + 1;
      end
    end
  end

  task automatic make_packets(input int n, input logic strip);
    for (int p = 0; p < n; p++) begin
      int len;
      logic [7:0] b;
      logic       d;
      len = 1 + ($urandom % 6);
      for (int i = 0; i < len; i++) begin
        b = 8'($urandom);
        if (i == 0) d = b[0];
        u_src.q.push_back({(i == len - 1), b});
        if (!(strip && i == 0)) exp_q.push_back({d, (i == len - 1), b});
      end
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    make_packets(40, 1'b0);
    wait (exp_idx == exp_q.size() && u_src.q.size() == 0);
    repeat (20) @(posedge clk);
    strip_first = 1;
    make_packets(40, 1'b1);
    wait (exp_idx == exp_q.size() && u_src.q.size() == 0);
    repeat (20) @(posedge clk);
    checks++;
    if (exp_idx != exp_q.size()) failures++;
    checks++;
    if (req != '0) begin
      failures++;
      $display("request left standing");
    end
    $display("packets delivered %0d", packets_seen);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired at byte %0d of %0d", exp_idx, exp_q.size());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
