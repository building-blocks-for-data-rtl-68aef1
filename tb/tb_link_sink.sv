// tb_link_sink: test receiver for a byte-serial connection. Acknowledges
// every offered byte with the four-phase sequence, optionally after a random
// 0..STALL cycle delay, and appends it ({lastbyte, data}) to got.
module tb_link_sink
  import dfp_pkg::*;
#(
  parameter int unsigned STALL = 0
) (
  input  logic      clk,
  input  logic      rst_n,
  input  link_fwd_t fwd,
  output logic      ack
);
  logic [8:0] got [$];
  int unsigned wait_cnt;
  int unsigned packets;

  initial begin
    ack = 1'b0;
    wait_cnt = 0;
    packets = 0;
  end

  always @(posedge clk) begin
    if (!rst_n) begin
      ack <= 1'b0;
    end else if (ack) begin
      if (!fwd.ready) ack <= 1'b0;
    end else if (fwd.ready) begin
      if (wait_cnt > 0) begin
        wait_cnt <= wait_cnt - 1;
      end else begin
        ack <= 1'b1;
        got.push_back({fwd.last, fwd.data});
        if (fwd.last) packets <= packets + 1;
        wait_cnt <= (STALL > 0) ? ($urandom % (STALL + 1)) : 0;
      end
    end
  end
endmodule
