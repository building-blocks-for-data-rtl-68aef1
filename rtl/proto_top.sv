// proto_top: the first data flow machine prototype, with a triangular
// routing network alongside it.
//
// Prototype: NPE processing elements (PEs) and an NPE x NPE rectangular
// routing network of 2x2 routers (four PEs and four routers by default).
// Output port 0 of PE i feeds network source i; network receiver i feeds
// input port 0 of PE i, so any PE can send result packets to any other,
// including itself. Port 1 of every PE, in both directions, is brought out
// (ext_*) for connecting further networks or test equipment. All PEs share
// one supervisor bus (sb_*); PE i answers to device number DEV_BASE+i, and
// the answers of all PEs are ORed onto sb_ack/sb_rdata.
//
// Triangular network: an independent NTRI x NTRI triangular network of 2x2
// routers with its leaf connections brought out (tri_*), the other network
// class the routers are meant to build.
//
// The prototype's structure follows the original first prototype; the use
// of port 1 as an external port and the shared supervisor bus wiring are
// this implementation's choices.
module proto_top
  import dfp_pkg::*;
#(
  parameter int unsigned NPE       = 4,
  parameter int unsigned NTRI      = 8,
  parameter int unsigned BUF_BYTES = 8,
  parameter int unsigned DMEM_AW   = 15,
  parameter int unsigned DEV_BASE  = 0
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // supervisor bus
  input  logic                 sb_valid,
  input  logic [7:0]           sb_dev,
  input  logic                 sb_write,
  input  sup_space_e           sb_space,
  input  logic [15:0]          sb_addr,
  input  logic [15:0]          sb_wdata,
  output logic                 sb_ack,
  output logic [15:0]          sb_rdata,
  output logic [NPE-1:0]       running,
  // port 1 of every PE
  input  link_fwd_t [NPE-1:0]  ext_in_fwd,
  output logic      [NPE-1:0]  ext_in_ack,
  output link_fwd_t [NPE-1:0]  ext_out_fwd,
  input  logic      [NPE-1:0]  ext_out_ack,
  // triangular network leaves
  input  link_fwd_t [NTRI-1:0] tri_in_fwd,
  output logic      [NTRI-1:0] tri_in_ack,
  output link_fwd_t [NTRI-1:0] tri_out_fwd,
  input  logic      [NTRI-1:0] tri_out_ack
);

  link_fwd_t [NPE-1:0] net_in_fwd, net_out_fwd;
  logic      [NPE-1:0] net_in_ack, net_out_ack;
  logic      [NPE-1:0] acks;
  logic [15:0]         rdatas [NPE];

  rect_net #(.N(NPE), .BUF_BYTES(BUF_BYTES)) u_net (
    .clk, .rst_n,
    .in_fwd(net_in_fwd), .in_ack(net_in_ack),
    .out_fwd(net_out_fwd), .out_ack(net_out_ack)
  );

  for (genvar i = 0; i < NPE; i++) begin : g_pe
    link_fwd_t [1:0] pin, pout;
    logic      [1:0] pin_ack, pout_ack;

    assign pin[0]        = net_out_fwd[i];
    assign net_out_ack[i] = pin_ack[0];
    assign pin[1]        = ext_in_fwd[i];
    assign ext_in_ack[i] = pin_ack[1];
    assign net_in_fwd[i] = pout[0];
    assign pout_ack[0]   = net_in_ack[i];
    assign ext_out_fwd[i] = pout[1];
    assign pout_ack[1]   = ext_out_ack[i];

    pe #(.DMEM_AW(DMEM_AW)) u_pe (
      .clk, .rst_n, .dev_id(8'(DEV_BASE + i)),
      .sb_valid, .sb_dev, .sb_write, .sb_space, .sb_addr, .sb_wdata,
      .sb_ack(acks[i]), .sb_rdata(rdatas[i]),
      .in_fwd(pin), .in_ack(pin_ack), .out_fwd(pout), .out_ack(pout_ack),
      .running(running[i])
    );
  end

  always_comb begin
    sb_ack   = |acks;
    sb_rdata = '0;
    for (int i = 0; i < NPE; i++) sb_rdata |= rdatas[i];
  end

  tri_net #(.N(NTRI), .BUF_BYTES(BUF_BYTES)) u_tri (
    .clk, .rst_n,
    .in_fwd(tri_in_fwd), .in_ack(tri_in_ack),
    .out_fwd(tri_out_fwd), .out_ack(tri_out_ack)
  );

endmodule
