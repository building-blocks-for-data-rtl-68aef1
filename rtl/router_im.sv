// router_im: input module (IM) of the 2x2 router.
//
// Receives packets byte-serially on one connection, holds up to BUF_BYTES
// bytes in a FIFO, and forwards each packet to one of the two output modules.
// The destination is bit D0 of the first byte of the packet. The IM raises a
// request to that output module, and once the request is granted it streams
// the packet bytes to it, up to and including the byte whose lastbyte bit is
// set; then it drops the request. While strip_first is asserted the first
// byte is used for the switching decision but is not transmitted, so that the
// following router switches on the second byte of the header.
//
// Interface: fwd/ack (incoming connection), strip_first (static control
// input), req/gnt (one bit per output module), byte stream out_valid/out_last/
// out_data with per-output-module take[1:0]. Timing: a request is raised the
// cycle after the first byte reaches the FIFO head; bytes move at most one per
// cycle once granted.
//
// Switching on D0 of the first byte, the separate IM per input, request and
// grant, first-byte suppression and packet buffering follow the original
// design; the FIFO depth and the request/grant signalling are this
// implementation's choices.
module router_im
  import dfp_pkg::*;
#(
  parameter int unsigned BUF_BYTES = 8
) (
  input  logic       clk,
  input  logic       rst_n,
  input  link_fwd_t  fwd,
  output logic       ack,
  input  logic       strip_first,
  output logic [1:0] req,
  input  logic [1:0] gnt,
  output logic       out_valid,
  output logic       out_last,
  output logic [7:0] out_data,
  input  logic [1:0] take
);

  typedef enum logic [1:0] { S_HEAD, S_WAIT, S_BODY } state_e;

  state_e     state;
  logic       dest;
  logic       rx_valid, rx_ready, rx_last;
  logic [7:0] rx_data;
  logic       q_valid, q_ready, q_last;
  logic [7:0] q_data;

  link_rx u_rx (
    .clk, .rst_n, .fwd, .ack,
    .out_valid(rx_valid), .out_ready(rx_ready), .out_last(rx_last), .out_data(rx_data)
  );

  byte_fifo #(.DEPTH(BUF_BYTES)) u_buf (
    .clk, .rst_n,
    .in_valid(rx_valid), .in_ready(rx_ready), .in_last(rx_last), .in_data(rx_data),
    .out_valid(q_valid), .out_ready(q_ready), .out_last(q_last), .out_data(q_data)
  );

  logic granted;
  assign granted = gnt[dest];

  always_comb begin
    req       = '0;
    out_valid = 1'b0;
    q_ready   = 1'b0;
    unique case (state)
      S_HEAD:  ;
      S_WAIT: begin
        req[dest] = 1'b1;
        // The first byte is dropped as soon as the path is granted.
        if (granted && strip_first) q_ready = 1'b1;
      end
      S_BODY: begin
        req[dest] = 1'b1;
        out_valid = q_valid;
        q_ready   = take[dest];
      end
      default: ;
    endcase
  end
  assign out_last = q_last;
  assign out_data = q_data;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state <= S_HEAD;
      dest  <= 1'b0;
    end else begin
      unique case (state)
        S_HEAD: if (q_valid) begin
          dest  <= q_data[0];
          state <= S_WAIT;
        end
        S_WAIT: if (granted) begin
          // A one-byte packet that is stripped ends here.
          state <= (strip_first && q_last) ? S_HEAD : S_BODY;
        end
        S_BODY: if (q_valid && take[dest] && q_last) state <= S_HEAD;
        default: state <= S_HEAD;
      endcase
    end
  end

  a_take_only_when_valid: assert property (@(posedge clk) disable iff (!rst_n)
    (state == S_BODY && take[dest]) |-> gnt[dest]);

endmodule
