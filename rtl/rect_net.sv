// rect_net: N x N rectangular routing network built from 2x2 routers.
//
// log2(N) stages of N/2 routers, (N/2)*log2(N) routers in all, wired by the
// recursive construction: a first column of routers whose upper outputs feed
// one N/2 x N/2 rectangular network and whose lower outputs feed another.
// Source j enters router j/2 of the first stage on input j%2. Every path has
// log2(N) routers, and the destination tag depends only on the receiver:
// stage k switches on tag bit k, which is bit (log2(N)-1-k) of the receiver
// number (see dfp_pkg::rect_tag). Each router switches on D0 of the first
// byte, so the data wires are permuted cyclically (D1 becomes D0) between
// successive stages. The wiring at the receivers undoes the accumulated
// permutation, so packets leave the network exactly as they entered it.
//
// Tags longer than eight bits (N > 256) take one header byte per eight
// stages. After eight permutations a byte's wires are back in order, so the
// routers of stages 7, 15, ... (except the last stage) are set to suppress
// the first byte of each packet: the next stage then switches on bit 0 of
// the following header byte. The receivers get the packet without its
// leading header bytes; only the last one arrives.
//
// Interface: in_fwd/in_ack (N sources), out_fwd/out_ack (N receivers).
// N must be a power of two, at least 2.
//
// The topology, router count, tag scheme, cyclic wire permutation and first
// byte suppression for long tags follow the original design; which stages
// suppress and restoring the bit order at the receivers are this
// implementation's choices.
module rect_net
  import dfp_pkg::*;
#(
  parameter int unsigned N         = 4,
  parameter int unsigned BUF_BYTES = 8
) (
  input  logic                clk,
  input  logic                rst_n,
  input  link_fwd_t [N-1:0]   in_fwd,
  output logic      [N-1:0]   in_ack,
  output link_fwd_t [N-1:0]   out_fwd,
  input  logic      [N-1:0]   out_ack
);

  localparam int unsigned S = $clog2(N);

  // Connections entering stage s (s = S: the receivers).
  link_fwd_t [N-1:0] lf [S+1];
  logic      [N-1:0] la [S+1];

  assign lf[0]  = in_fwd;
  assign in_ack = la[0];

  for (genvar s = 0; s < S; s++) begin : g_stage
    localparam int unsigned M = N >> s;       // size of the sub-network
    for (genvar r = 0; r < N / 2; r++) begin : g_rt
      localparam int unsigned G  = r / (M / 2); // which sub-network
      localparam int unsigned RL = r % (M / 2); // router within it
      link_fwd_t [1:0] rf;
      logic      [1:0] ra;

      router2x2 #(.BUF_BYTES(BUF_BYTES)) u_rt (
        .clk, .rst_n, .strip_first(1'(s % 8 == 7 && s != S - 1)),
        .in_fwd(lf[s][2*r+1 -: 2]), .in_ack(la[s][2*r+1 -: 2]),
        .out_fwd(rf), .out_ack(ra)
      );

      for (genvar o = 0; o < 2; o++) begin : g_out
        localparam int unsigned J = (2 * G + o) * (M / 2) + RL;
        always_comb begin
          lf[s+1][J] = rf[o];
          if (s < S - 1) lf[s+1][J].data = rot_next(rf[o].data);
        end
        assign ra[o] = la[s+1][J];
      end
    end
  end

  always_comb begin
    for (int unsigned j = 0; j < N; j++) begin
      out_fwd[j]      = lf[S][j];
      out_fwd[j].data = rot_back(lf[S][j].data, S - 1);
    end
  end
  assign la[S] = out_ack;

endmodule
