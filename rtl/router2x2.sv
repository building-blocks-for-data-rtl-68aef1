// router2x2: the 2x2 packet router, the switching element of the routing
// networks.
//
// Two input modules and two output modules. Each input module reads bit D0
// of a packet's first byte and asks the corresponding output module for the
// path (0 = output 0, 1 = output 1); each output module arbitrates between
// the two input modules. Packets bound for different outputs pass at the
// same time; packets bound for the same output are served one after the
// other. Packets travel byte-serially with a lastbyte bit marking the end.
// strip_first, when tied high, suppresses the first byte of every packet,
// for destination tags longer than one byte.
//
// Interface: in_fwd/in_ack, out_fwd/out_ack (two connections each),
// strip_first. Latency of a byte through an idle router is a few cycles (see
// router_im and router_om); throughput is one byte per four-phase handshake
// on each output.
//
// The two-IM/two-OM structure, switching on D0, concurrency, first-byte
// suppression and buffering follow the original design; the buffer size is
// this implementation's choice.
module router2x2
  import dfp_pkg::*;
#(
  parameter int unsigned BUF_BYTES = 8
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      strip_first,
  input  link_fwd_t [1:0] in_fwd,
  output logic      [1:0] in_ack,
  output link_fwd_t [1:0] out_fwd,
  input  logic      [1:0] out_ack
);

  logic [1:0] im_req   [2];   // [im][om]
  logic [1:0] im_gnt   [2];
  logic [1:0] im_take  [2];
  logic [1:0] om_req   [2];   // [om][im]
  logic [1:0] om_gnt   [2];
  logic [1:0] om_take  [2];
  logic [1:0] v, l;
  logic [7:0] d [2];

  for (genvar i = 0; i < 2; i++) begin : g_im
    router_im #(.BUF_BYTES(BUF_BYTES)) u_im (
      .clk, .rst_n,
      .fwd(in_fwd[i]), .ack(in_ack[i]),
      .strip_first,
      .req(im_req[i]), .gnt(im_gnt[i]),
      .out_valid(v[i]), .out_last(l[i]), .out_data(d[i]),
      .take(im_take[i])
    );
  end

  for (genvar o = 0; o < 2; o++) begin : g_om
    router_om u_om (
      .clk, .rst_n,
      .req(om_req[o]), .gnt(om_gnt[o]),
      .in_valid(v), .in_last(l), .in_data(d),
      .take(om_take[o]),
      .fwd(out_fwd[o]), .ack(out_ack[o])
    );
  end

  // Transpose the request/grant/take matrices between IM and OM views.
  always_comb begin
    for (int i = 0; i < 2; i++)
      for (int o = 0; o < 2; o++) begin
        om_req[o][i]  = im_req[i][o];
        im_gnt[i][o]  = om_gnt[o][i];
        im_take[i][o] = om_take[o][i];
      end
  end

endmodule
