// router_om: output module (OM) of the 2x2 router: an arbiter and a data
// multiplexer in front of one outgoing connection.
//
// Each input module may request this output. With no owner, a single request
// is granted; when both request, the input that was not served last wins
// (alternating priority). The grant is held until the owner drops its
// request after the packet's last byte, so packets are never interleaved.
// The owner's byte stream is multiplexed into a link_tx.
//
// Interface: req/gnt (bit i for input module i), the two input modules'
// byte streams in_valid/in_last/in_data, take (bit i: input module i's byte
// is taken this cycle), fwd/ack (outgoing connection). Timing: a grant is
// registered, one cycle after the request.
//
// The arbiter plus multiplexer structure follows the original design; the
// alternating priority is this implementation's choice (the original uses
// asynchronous two-way arbiters).
module router_om
  import dfp_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic [1:0] req,
  output logic [1:0] gnt,
  input  logic [1:0] in_valid,
  input  logic [1:0] in_last,
  input  logic [7:0] in_data [2],
  output logic [1:0] take,
  output link_fwd_t  fwd,
  input  logic       ack
);

  logic       busy;     // an input owns this output
  logic       owner;
  logic       last_served;
  logic       tx_ready;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy        <= 1'b0;
      owner       <= 1'b0;
      last_served <= 1'b1;
    end else if (!busy) begin
      if (req[0] && req[1]) begin
        busy        <= 1'b1;
        owner       <= !last_served;
        last_served <= !last_served;
      end else if (req[0] || req[1]) begin
        busy        <= 1'b1;
        owner       <= req[1];
        last_served <= req[1];
      end
    end else if (!req[owner] || (take[owner] && in_last[owner])) begin
      busy <= 1'b0;
    end
  end

  assign gnt[0] = busy && (owner == 1'b0);
  assign gnt[1] = busy && (owner == 1'b1);

  logic sel_valid;
  assign sel_valid = busy && in_valid[owner];
  assign take[0]   = gnt[0] && in_valid[0] && tx_ready;
  assign take[1]   = gnt[1] && in_valid[1] && tx_ready;

  link_tx u_tx (
    .clk, .rst_n,
    .in_valid(sel_valid), .in_ready(tx_ready),
    .in_last(in_last[owner]), .in_data(in_data[owner]),
    .fwd, .ack
  );

  a_one_grant: assert property (@(posedge clk) disable iff (!rst_n) !(gnt[0] && gnt[1]));

endmodule
