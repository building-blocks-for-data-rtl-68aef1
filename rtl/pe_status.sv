// pe_status: the PE's status control unit.
//
// Holds the machine status register (Z, N, C, V). It is loaded when the
// microinstruction asks for it (ld), from the ALU flags or, with from_bus,
// from bits 3:0 of the B bus ({V, C, N, Z}, the layout in which the status
// reads onto the bus, so a saved status can be restored); the supervisor
// can also write it.
// The microsequencer's branch condition (ct) is the status bit that the
// microinstruction selects, or constant true. The register also reads onto
// the B bus (four bits, zero-extended to a byte, see the PE).
//
// Interface: ld, from_bus, alu_flags, bus_flags, cond, ct, mstat, sup_we/sup_wdata. Timing: a
// branch tests the status as loaded by an earlier microinstruction.
//
// The unit, its 4-bit path from the ALU and its 4-bit path to and from the
// B bus follow the original data paths; the condition set and the rule that a
// branch tests the registered status are this implementation's choices.
module pe_status
  import dfp_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   ld,
  input  logic   from_bus,
  input  flags_t alu_flags,
  input  flags_t bus_flags,
  input  cond_e  cond,
  output logic   ct,
  output flags_t mstat,
  input  logic   sup_we,
  input  flags_t sup_wdata
);

  always_ff @(posedge clk) begin
    if (!rst_n)      mstat <= '0;
    else if (sup_we) mstat <= sup_wdata;
    else if (ld)     mstat <= from_bus ? bus_flags : alu_flags;
  end

  always_comb begin
    unique case (cond)
      CC_Z:    ct = mstat.z;
      CC_N:    ct = mstat.n;
      CC_C:    ct = mstat.c;
      CC_V:    ct = mstat.v;
      CC_TRUE: ct = 1'b1;
      default: ct = 1'b0;
    endcase
  end

endmodule
