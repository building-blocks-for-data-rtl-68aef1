// pe_out_port: packet output port of the processing element (PE).
//
// A data buffer, a lastbyte flip-flop and control logic. One microinstruction
// loads the buffer from the Y bus and the lastbyte flip-flop from the
// microinstruction, which puts the byte on the connection and raises ready.
// The connection's acknowledge is strobed into a flip-flop at every clock
// edge and used only from there. When it is seen, the port drops ready; the
// port reports itself free again (status bit) when acknowledge has fallen.
// A load while the port is not free is ignored.
//
// Interface: ld, y, y_last (from the data paths), free (status), fwd/ack
// (connection). Timing: ready rises the cycle after ld.
//
// The buffer/flip-flop/control structure, loading both in one instruction
// and the synchronising flip-flop follow the original design; the
// four-phase sequence and ignoring a load on a busy port are this
// implementation's choices.
module pe_out_port
  import dfp_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       ld,
  input  logic [7:0] y,
  input  logic       y_last,
  output logic       free,
  output link_fwd_t  fwd,
  input  logic       ack
);

  logic ack_s;     // synchronised acknowledge

  assign free = !fwd.ready && !ack_s;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      ack_s <= 1'b0;
      fwd   <= '0;
    end else begin
      ack_s <= ack;
      if (ld && free) begin
        fwd.data  <= y;
        fwd.last  <= y_last;
        fwd.ready <= 1'b1;
      end else if (fwd.ready && ack_s) begin
        fwd.ready <= 1'b0;
      end
    end
  end

endmodule
