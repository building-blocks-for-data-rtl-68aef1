// tb_pe_out_port: self-checking test of the PE output port. A polling loop
// loads the port whenever it reports itself free; a test receiver
// acknowledges with random delays. Every byte must arrive once, in order,
// with the lastbyte bit given at load time. Loads while the port is busy
// must be ignored, and ready must rise the cycle after a load.
module tb_pe_out_port;
  import dfp_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic       ld = 0, y_last = 0, free, ack;
  logic [7:0] y = 0;
  link_fwd_t  fwd;

  pe_out_port dut (.clk, .rst_n, .ld, .y, .y_last, .free, .fwd, .ack);
  tb_link_sink #(.STALL(3)) u_snk (.clk, .rst_n, .fwd, .ack);

  int checks = 0, failures = 0;
  logic [8:0] exp_q [$];
  logic       loaded = 0;       // a load was accepted last cycle
  int unsigned n_busy_loads = 0;

  always @(posedge clk) begin
    if (rst_n) begin
      loaded <= ld && free;
      if (ld && free) exp_q.push_back({y_last, y});
      if (ld && !free) n_busy_loads++;
      if (loaded) begin
        checks++;
        if (!fwd.ready || {fwd.last, fwd.data} !== exp_q[$]) begin
          failures++;
          $display("load not on the connection the next cycle");
        end
      end
    end
  end

  always @(negedge clk) begin
    ld     <= ($urandom % 3 == 0);
    y      <= 8'($urandom);
    y_last <= 1'($urandom);
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (exp_q.size() >= 150);
    @(negedge clk);
    force ld = 1'b0;
    repeat (30) @(posedge clk);
    checks++;
    if (u_snk.got.size() != exp_q.size()) begin
      failures++;
      $display("%0d bytes sent, %0d received", exp_q.size(), u_snk.got.size());
    end
    for (int i = 0; i < exp_q.size() && i < u_snk.got.size(); i++) begin
      checks++;
      if (u_snk.got[i] !== exp_q[i]) begin
        failures++;
        $display("byte %0d: got %h expected %h", i, u_snk.got[i], exp_q[i]);
      end
    end
    checks++;
    if (n_busy_loads == 0) begin failures++; $display("no load hit a busy port"); end
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
