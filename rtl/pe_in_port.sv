// pe_in_port: packet input port of the processing element (PE).
//
// A bus driver and a little control logic, nothing more. The connection's
// ready wire, which comes from another module and is not tied to this clock,
// is strobed into a flip-flop at every clock edge and used only from that
// flip-flop. The port reports, on the PE's status byte, that a byte is
// waiting (rdy) and the byte's lastbyte bit. When the microprogram reads the
// port (rd, the B bus is taken from this port's data wires) acknowledge is
// raised; it is dropped by the port's own control once the sender has
// withdrawn ready. Reading when no byte waits returns the idle wires and
// acknowledges nothing.
//
// Interface: fwd/ack (connection), rd (read strobe, one cycle), data (to the
// B bus), rdy and last (status). Timing: rdy rises one cycle after ready.
//
// The driver-plus-control structure, the synchronising flip-flop and
// acknowledge-on-read follow the original design; the four-phase sequence
// is this implementation's choice.
module pe_in_port
  import dfp_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  link_fwd_t  fwd,
  output logic       ack,
  input  logic       rd,
  output logic [7:0] data,
  output logic       rdy,
  output logic       last
);

  logic ready_s;   // synchronised ready

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      ready_s <= 1'b0;
      ack     <= 1'b0;
    end else begin
      ready_s <= fwd.ready;
      if (rd && rdy)             ack <= 1'b1;
      else if (ack && !ready_s)  ack <= 1'b0;
    end
  end

  assign rdy  = ready_s && !ack;
  assign data = fwd.data;
  assign last = fwd.last;

endmodule
