// tb_link: self-checking test of a module connection, link_tx driving
// link_rx. 300 random bytes with random lastbyte bits go through with
// random back-pressure behind the receiver; every byte must arrive once, in
// order, with its lastbyte bit. With no back-pressure the four-phase
// sequence must take exactly four cycles per byte.
module tb_link;
  import dfp_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic       in_valid, in_ready, in_last, out_valid, out_ready, out_last, ack;
  logic [7:0] in_data, out_data;
  link_fwd_t  fwd;

  link_tx u_tx (.clk, .rst_n, .in_valid, .in_ready, .in_last, .in_data, .fwd, .ack);
  link_rx u_rx (.clk, .rst_n, .fwd, .ack, .out_valid, .out_ready, .out_last, .out_data);

  int checks = 0, failures = 0;
  logic [8:0] stim [400];
  int unsigned n_push = 0;     // bytes made available to the source
  int unsigned src_idx = 0;    // next byte the source offers
  int unsigned exp_idx = 0;    // next byte expected at the receiver
  logic       bp;              // random back-pressure enabled
  logic       rdy_r = 1'b1;

  assign out_ready = rdy_r;
  assign in_valid  = src_idx < n_push;
  assign {in_last, in_data} = stim[src_idx];

  always @(posedge clk) begin
    if (rst_n) begin
      if (in_valid && in_ready) src_idx <= src_idx + 1;
      if (out_valid && out_ready) begin
        checks++;
        if ({out_last, out_data} !== stim[exp_idx]) begin
          failures++;
          $display("mismatch: got %h expected %h", {out_last, out_data}, stim[exp_idx]);
        end
        exp_idx <= exp_idx + 1;
      end
      rdy_r <= bp ? ($urandom % 3 != 0) : 1'b1;
    end
  end

  initial begin
    for (int i = 0; i < 400; i++) stim[i] = 9'($urandom);
  end

  initial begin
    int unsigned t0, t1;
    bp = 1'b1;
    repeat (3) @(posedge clk);
    rst_n = 1;
    n_push = 300;
    while (exp_idx < 300) @(posedge clk);
    // Rate: 40 bytes without back-pressure take 4 cycles each.
    bp = 1'b0;
    repeat (5) @(posedge clk);
    t0 = exp_idx;
    n_push = 340;
    repeat (160) @(posedge clk);
    t1 = exp_idx;
    checks++;
    if (t1 - t0 != 40) begin
      failures++;
      $display("rate: %0d bytes in 160 cycles, expected 40", t1 - t0);
    end
    repeat (4) @(posedge clk);
    checks++;
    if (exp_idx != 340) begin
      failures++;
      $display("received %0d bytes", exp_idx);
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
