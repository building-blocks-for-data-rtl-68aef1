// tb_link_src: test source for a byte-serial connection. Bytes pushed into
// q ({lastbyte, data}) are offered one by one with the four-phase
// ready/acknowledge sequence; with STALL > 0 the source waits a random
// 0..STALL cycles before offering each byte. Fixed data rotation (ROT)
// can be applied to every byte after the first of a packet, for senders
// that pre-rotate bytes for a triangular network.
module tb_link_src
  import dfp_pkg::*;
#(
  parameter int unsigned STALL = 0
) (
  input  logic      clk,
  input  logic      rst_n,
  output link_fwd_t fwd,
  input  logic      ack
);
  logic [8:0] q [$];
  int unsigned wait_cnt;
  int unsigned sent;

  initial begin
    fwd = '0;
    wait_cnt = 0;
    sent = 0;
  end

  always @(posedge clk) begin
    if (!rst_n) begin
      fwd <= '0;
    end else if (fwd.ready) begin
      if (ack) begin
        fwd.ready <= 1'b0;
        sent <= sent + 1;
      end
    end else if (!ack && q.size() > 0) begin
      if (wait_cnt > 0) begin
        wait_cnt <= wait_cnt - 1;
      end else begin
        fwd.ready <= 1'b1;
        {fwd.last, fwd.data} <= q.pop_front();
        wait_cnt <= (STALL > 0) ? ($urandom % (STALL + 1)) : 0;
      end
    end
  end
endmodule
