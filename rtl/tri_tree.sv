// tri_tree: a (1, M) tree of 2x2 routers, the recursive part of the
// triangular routing network.
//
// The tree has one connection pair towards its parent (up_fwd leaving,
// down_fwd arriving) and M leaf connection pairs. For M = 1 it is just the
// leaf itself. For M > 1 it holds an "up" router, which gathers the packets
// climbing out of the two (1, M/2) subtrees, and a "down" router, which
// distributes packets into them. The up router's output 0 climbs to the
// parent; its output 1 turns the packet over to the down router (input 1),
// so a packet travelling between the two halves of the tree never leaves
// it. The down router's input 0 comes from the parent; its outputs 0 and 1
// lead into the left and right subtree. Routers in a tree of size M: 2M-2.
//
// Router-to-router connections carry the cyclic data wire permutation;
// connections to and from leaves do not. The permutation of a connection is
// applied on the side that knows both ends are routers: the tree permutes
// what enters its own routers from a subtree and what its routers send to
// each other and down into a subtree of routers; the parent permutes up_fwd.
//
// Interface: up_fwd/up_ack, down_fwd/down_ack, leaf_in_fwd/leaf_in_ack (from
// the leaves), leaf_out_fwd/leaf_out_ack (to the leaves).
//
// The structure follows the original triangular network; the assignment of
// router ports within the tree is this implementation's reading of it.
module tri_tree
  import dfp_pkg::*;
#(
  parameter int unsigned M         = 2,
  parameter int unsigned BUF_BYTES = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  output link_fwd_t         up_fwd,
  input  logic              up_ack,
  input  link_fwd_t         down_fwd,
  output logic              down_ack,
  input  link_fwd_t [M-1:0] leaf_in_fwd,
  output logic      [M-1:0] leaf_in_ack,
  output link_fwd_t [M-1:0] leaf_out_fwd,
  input  logic      [M-1:0] leaf_out_ack
);

  if (M == 1) begin : g_leaf
    assign up_fwd          = leaf_in_fwd[0];
    assign leaf_in_ack[0]  = up_ack;
    assign leaf_out_fwd[0] = down_fwd;
    assign down_ack        = leaf_out_ack[0];
  end else begin : g_node
    localparam int unsigned H = M / 2;

    link_fwd_t [1:0] sub_up_fwd, sub_down_fwd;
    logic      [1:0] sub_up_ack, sub_down_ack;
    link_fwd_t [1:0] u_in, u_out, d_in, d_out;
    logic      [1:0] u_in_ack, u_out_ack, d_in_ack, d_out_ack;

    if (H == 1) begin : g_leaves
      // Subtrees of one leaf: the leaf connections attach directly.
      assign sub_up_fwd   = leaf_in_fwd;
      assign leaf_in_ack  = sub_up_ack;
      assign leaf_out_fwd = sub_down_fwd;
      assign sub_down_ack = leaf_out_ack;
    end else begin : g_subtrees
      for (genvar c = 0; c < 2; c++) begin : g_sub
        tri_tree #(.M(H), .BUF_BYTES(BUF_BYTES)) u_sub (
          .clk, .rst_n,
          .up_fwd(sub_up_fwd[c]), .up_ack(sub_up_ack[c]),
          .down_fwd(sub_down_fwd[c]), .down_ack(sub_down_ack[c]),
          .leaf_in_fwd(leaf_in_fwd[c*H +: H]), .leaf_in_ack(leaf_in_ack[c*H +: H]),
          .leaf_out_fwd(leaf_out_fwd[c*H +: H]), .leaf_out_ack(leaf_out_ack[c*H +: H])
        );
      end
    end

    // Up router: inputs from the two subtrees.
    always_comb begin
      u_in = sub_up_fwd;
      if (H > 1) for (int c = 0; c < 2; c++) u_in[c].data = rot_next(sub_up_fwd[c].data);
    end
    assign sub_up_ack = u_in_ack;

    router2x2 #(.BUF_BYTES(BUF_BYTES)) u_up (
      .clk, .rst_n, .strip_first(1'b0),
      .in_fwd(u_in), .in_ack(u_in_ack), .out_fwd(u_out), .out_ack(u_out_ack)
    );

    // Output 0 climbs to the parent, output 1 turns to the down router.
    always_comb begin
      up_fwd      = u_out[0];          // permuted by the parent
      d_in[0]     = down_fwd;
      d_in[1]     = u_out[1];
      d_in[1].data = rot_next(u_out[1].data);
    end
    assign u_out_ack[0] = up_ack;
    assign u_out_ack[1] = d_in_ack[1];
    assign down_ack     = d_in_ack[0];

    router2x2 #(.BUF_BYTES(BUF_BYTES)) u_down (
      .clk, .rst_n, .strip_first(1'b0),
      .in_fwd(d_in), .in_ack(d_in_ack), .out_fwd(d_out), .out_ack(d_out_ack)
    );

    always_comb begin
      sub_down_fwd = d_out;
      if (H > 1) for (int c = 0; c < 2; c++) sub_down_fwd[c].data = rot_next(d_out[c].data);
    end
    assign d_out_ack = sub_down_ack;
  end

endmodule
