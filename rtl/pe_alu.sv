// pe_alu: the PE's 8-bit arithmetic and logic unit with its sixteen general
// registers, standing in for a pair of 4-bit ALU/register-file slices.
//
// Operand R is register a or the microinstruction's direct data (DA); operand
// S is register b or the B bus (DB). The result drives the Y bus and may be
// written back into register b at the clock edge. Flags Z, N, C and V go to
// the status unit. Operations (dfp_pkg::alu_op_e): R+S+cin, S-R-1+cin,
// AND, OR, XOR, pass R, pass S, and S shifted right one place with cin
// entering bit 7 (C takes the bit shifted out). C and V are zero for the
// logic and pass operations. The supervisor can read and write every
// register (sup_*), and a supervisor write wins over a microprogram write.
//
// The byte width, the two operand inputs (direct data and B bus), the Y
// output, the 4-bit status path and the register file follow the original
// data paths; the operation set and register count are taken from the
// slice family's usual organisation, not from a specification, and are this
// implementation's choice.
module pe_alu
  import dfp_pkg::*;
(
  input  logic       clk,
  input  alu_op_e    op,
  input  logic [3:0] a,
  input  logic [3:0] b,
  input  logic       r_imm,
  input  logic       s_bus,
  input  logic [7:0] imm,
  input  logic [7:0] bbus,
  input  logic       cin,
  input  logic       wr,
  output logic [7:0] y,
  output flags_t     flags,
  input  logic       sup_we,
  input  logic [3:0] sup_addr,
  input  logic [7:0] sup_wdata,
  output logic [7:0] sup_rdata
);

  logic [7:0] regs [16];
  logic [7:0] r, s;
  logic [8:0] sum;

  assign r = r_imm ? imm  : regs[a];
  assign s = s_bus ? bbus : regs[b];

  always_comb begin
    flags.c = 1'b0;
    flags.v = 1'b0;
    sum     = '0;
    unique case (op)
      ALU_ADD: begin
        sum     = {1'b0, r} + {1'b0, s} + {8'b0, cin};
        y       = sum[7:0];
        flags.c = sum[8];
        flags.v = (r[7] == s[7]) && (y[7] != r[7]);
      end
      ALU_SUBR: begin
        sum     = {1'b0, s} + {1'b0, ~r} + {8'b0, cin};
        y       = sum[7:0];
        flags.c = sum[8];
        flags.v = (s[7] != r[7]) && (y[7] != s[7]);
      end
      ALU_AND:  y = r & s;
      ALU_OR:   y = r | s;
      ALU_XOR:  y = r ^ s;
      ALU_PASR: y = r;
      ALU_PASS: y = s;
      ALU_SHR: begin
        y       = {cin, s[7:1]};
        flags.c = s[0];
      end
      default:  y = '0;
    endcase
    flags.z = (y == 8'h00);
    flags.n = y[7];
  end

  always_ff @(posedge clk) begin
    if (sup_we)  regs[sup_addr] <= sup_wdata;
    else if (wr) regs[b]        <= y;
  end

  assign sup_rdata = regs[sup_addr];

endmodule
