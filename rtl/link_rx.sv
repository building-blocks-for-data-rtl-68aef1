// link_rx: receiving end of a byte-serial module connection.
//
// Watches ready on the connection; when a byte is offered and the one-byte
// holding register is free (or being emptied in the same cycle), it captures
// data and lastbyte and raises acknowledge. Acknowledge is dropped once the
// sender has dropped ready (four-phase, return to zero). The captured byte is
// presented on a valid/ready stream to the rest of the module.
//
// Interface: fwd/ack (the connection), out_valid/out_ready/out_last/out_data
// (internal stream). Synchronous reset (active low) clears acknowledge and empties the register.
//
// The handshake sequence and the holding register are choices of this
// implementation; the wires follow the original module connection.
module link_rx
  import dfp_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  link_fwd_t  fwd,
  output logic       ack,
  output logic       out_valid,
  input  logic       out_ready,
  output logic       out_last,
  output logic [7:0] out_data
);

  logic take;
  assign take = fwd.ready && !ack && (!out_valid || out_ready);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      ack       <= 1'b0;
      out_valid <= 1'b0;
      out_last  <= 1'b0;
      out_data  <= '0;
    end else begin
      if (take) begin
        ack       <= 1'b1;
        out_valid <= 1'b1;
        out_last  <= fwd.last;
        out_data  <= fwd.data;
      end else begin
        if (out_ready) out_valid <= 1'b0;
        if (ack && !fwd.ready) ack <= 1'b0;
      end
    end
  end

  // The sender must hold the byte until it is acknowledged, and must not
  // offer a new byte before acknowledge has returned to zero.
  a_hold_until_ack: assert property (@(posedge clk) disable iff (!rst_n)
    (fwd.ready && !ack) |=> (fwd.ready && $stable(fwd.data) && $stable(fwd.last)));
  a_return_to_zero: assert property (@(posedge clk) disable iff (!rst_n)
    (!fwd.ready && ack) |=> !fwd.ready);

endmodule
