// link_tx: sending end of a byte-serial module connection.
//
// Takes one packet byte at a time from a valid/ready stream inside the module
// and offers it on the connection: data and lastbyte are registered, then
// ready is raised. When acknowledge arrives, ready is dropped; the next byte is
// accepted only after acknowledge has fallen again (four-phase, return to
// zero). A byte therefore occupies the connection for about four clock cycles
// when the receiver answers in one cycle.
//
// Interface: in_valid/in_ready/in_last/in_data (internal stream), fwd/ack
// (the connection). Synchronous reset (active low) clears ready.
//
// The wires (8 data, lastbyte, ready, acknowledge) are those of the original
// module connection; the four-phase sequence and the single clock are choices
// of this implementation.
module link_tx
  import dfp_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  output logic       in_ready,
  input  logic       in_last,
  input  logic [7:0] in_data,
  output link_fwd_t  fwd,
  input  logic       ack
);

  assign in_ready = !fwd.ready && !ack;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      fwd <= '0;
    end else if (in_valid && in_ready) begin
      fwd.ready <= 1'b1;
      fwd.last  <= in_last;
      fwd.data  <= in_data;
    end else if (fwd.ready && ack) begin
      fwd.ready <= 1'b0;
    end
  end

  // The receiver may acknowledge only a byte that is offered.
  a_ack_follows_ready: assert property (@(posedge clk) disable iff (!rst_n)
    $rose(ack) |-> $past(fwd.ready));

endmodule
