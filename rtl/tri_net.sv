// tri_net: N x N triangular routing network built from 2x2 routers.
//
// A root router joins two (1, N/2) trees (see tri_tree): its inputs are the
// packets climbing out of the left and right tree, its outputs lead back
// down into them. The network uses 2N-3 routers. Source and receiver i are
// the same leaf i. A packet climbs only as far as the smallest subtree that
// holds both its source and its receiver, so neighbouring leaves are few
// routers apart and that proximity is kept as the network grows; paths
// through the root have 2*log2(N)-1 routers. The destination tag therefore
// depends on source and receiver (dfp_pkg::tri_tag): up routers take 0 to
// climb and 1 to turn, the root and down routers take 0 for left and 1 for
// right. Router-to-router connections permute the data wires cyclically, so
// a packet that crossed h routers arrives with its bytes rotated h-1 places
// (dfp_pkg::tri_hops); a sender that wants the bytes to arrive unchanged
// pre-rotates them.
//
// Interface: in_fwd/in_ack (from leaf i), out_fwd/out_ack (to leaf i). N is
// a power of two from 2 to 16 (the longest tag, 2*log2(N)-1 bits, must fit
// in the first byte).
//
// Topology and router count follow the original design; the port
// assignment and the tag encoding are this implementation's reading of it.
module tri_net
  import dfp_pkg::*;
#(
  parameter int unsigned N         = 8,
  parameter int unsigned BUF_BYTES = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  input  link_fwd_t [N-1:0] in_fwd,
  output logic      [N-1:0] in_ack,
  output link_fwd_t [N-1:0] out_fwd,
  input  logic      [N-1:0] out_ack
);

  localparam int unsigned H = N / 2;

  link_fwd_t [1:0] sub_up_fwd, sub_down_fwd, r_in, r_out;
  logic      [1:0] sub_up_ack, sub_down_ack, r_in_ack, r_out_ack;

  for (genvar c = 0; c < 2; c++) begin : g_sub
    tri_tree #(.M(H), .BUF_BYTES(BUF_BYTES)) u_tree (
      .clk, .rst_n,
      .up_fwd(sub_up_fwd[c]), .up_ack(sub_up_ack[c]),
      .down_fwd(sub_down_fwd[c]), .down_ack(sub_down_ack[c]),
      .leaf_in_fwd(in_fwd[c*H +: H]), .leaf_in_ack(in_ack[c*H +: H]),
      .leaf_out_fwd(out_fwd[c*H +: H]), .leaf_out_ack(out_ack[c*H +: H])
    );
  end

  // Packets arriving from a tree's up router have crossed a router link.
  always_comb begin
    r_in = sub_up_fwd;
    if (H > 1) for (int c = 0; c < 2; c++) r_in[c].data = rot_next(sub_up_fwd[c].data);
    sub_down_fwd = r_out;
    if (H > 1) for (int c = 0; c < 2; c++) sub_down_fwd[c].data = rot_next(r_out[c].data);
  end
  assign sub_up_ack = r_in_ack;
  assign r_out_ack  = sub_down_ack;

  router2x2 #(.BUF_BYTES(BUF_BYTES)) u_root (
    .clk, .rst_n, .strip_first(1'b0),
    .in_fwd(r_in), .in_ack(r_in_ack), .out_fwd(r_out), .out_ack(r_out_ack)
  );

endmodule
