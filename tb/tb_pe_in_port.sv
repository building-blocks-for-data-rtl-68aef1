// tb_pe_in_port: self-checking test of the PE input port. A test source
// offers bytes; a polling loop like a microprogram's reads the port whenever
// its status shows a byte. Every byte must be read once, in order, with
// its lastbyte bit; status must rise only after the synchronising
// flip-flop (one cycle after ready) and fall as soon as the byte is read.
module tb_pe_in_port;
  import dfp_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  link_fwd_t  fwd;
  logic       ack, rd = 0, rdy, last;
  logic [7:0] data;

  tb_link_src #(.STALL(3)) u_src (.clk, .rst_n, .fwd, .ack);
  pe_in_port dut (.clk, .rst_n, .fwd, .ack, .rd, .data, .rdy, .last);

  int checks = 0, failures = 0;
  logic [8:0] exp_q [200];
  int unsigned idx = 0;
  logic ready_d = 0;

  always @(posedge clk) begin
    if (rst_n) begin
      ready_d <= fwd.ready;
      // Status must never show a byte the synchroniser has not yet seen.
      if (rdy && !ready_d) begin
        checks++; failures++;
        $display("status ahead of the synchroniser");
      end
      if (rd) begin
        checks++;
        if (!rdy || {last, data} !== exp_q[idx]) begin
          failures++;
          $display("read %0d: got %h expected %h (rdy %b)", idx, {last, data}, exp_q[idx], rdy);
        end
        idx <= idx + 1;
      end
    end
  end

  // Polling: read one cycle after the status is seen, at random.
  always @(negedge clk) rd <= rdy && ($urandom % 2 == 0);

  initial begin
    for (int i = 0; i < 200; i++) begin
      exp_q[i] = 9'($urandom);
      u_src.q.push_back(exp_q[i]);
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (idx == 200);
    repeat (10) @(posedge clk);
    checks++;
    if (rdy || ack || fwd.ready) begin
      failures++;
      $display("port not idle at the end");
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
