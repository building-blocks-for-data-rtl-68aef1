// byte_fifo: small first-in first-out buffer of packet bytes (data plus
// lastbyte), used as the packet buffer of a router input module.
//
// DEPTH entries in a circular array with read and write pointers and a
// count. Push and pop may happen in the same cycle. Interface: in_valid/
// in_ready push side, out_valid/out_ready pop side (first-word fall-through:
// the head is visible on out_* while out_valid is high). Synchronous reset (active low) empties it.
module byte_fifo #(
  parameter int unsigned DEPTH = 8
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  output logic       in_ready,
  input  logic       in_last,
  input  logic [7:0] in_data,
  output logic       out_valid,
  input  logic       out_ready,
  output logic       out_last,
  output logic [7:0] out_data
);

  localparam int unsigned PW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [8:0]            mem [DEPTH];
  logic [PW-1:0]         rd, wr;
  logic [$clog2(DEPTH+1)-1:0] cnt;
  logic push, pop;

  assign in_ready  = (cnt != DEPTH[$bits(cnt)-1:0]);
  assign out_valid = (cnt != '0);
  assign push = in_valid && in_ready;
  assign pop  = out_valid && out_ready;
  assign {out_last, out_data} = mem[rd];

  function automatic logic [PW-1:0] inc(input logic [PW-1:0] p);
    return (p == PW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rd  <= '0;
      wr  <= '0;
      cnt <= '0;
    end else begin
      if (push) wr <= inc(wr);
      if (pop)  rd <= inc(rd);
      case ({push, pop})
        2'b10:   cnt <= cnt + 1'b1;
        2'b01:   cnt <= cnt - 1'b1;
        default: ;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (push) mem[wr] <= {in_last, in_data};
  end

endmodule
