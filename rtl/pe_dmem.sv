// pe_dmem: the PE's data memory and its data memory address register (DMAR).
//
// The 16-bit DMAR is loaded a byte at a time from the Y bus (ld_lo, ld_hi)
// and addresses the byte-wide memory; the low AW bits select the byte. The
// memory is written from the Y bus (we) and read onto the B bus (rdata,
// combinational read). The supervisor reaches the memory through its own
// address (sup_sel selects it over DMAR) and can also set DMAR.
//
// Interface: y, ld_lo, ld_hi, we, rdata, dmar, sup_*. Timing: DMAR and memory
// writes take effect at the clock edge; a read in the same microinstruction
// sees the DMAR loaded by an earlier one.
//
// The byte-wide memory, the 16-bit DMAR loaded in two bytes from the Y bus,
// and memory data to the B bus follow the original data paths. The size,
// 32K bytes (AW = 15), is the memory the original cell block emulation
// program runs in; the combinational read is this implementation's choice.
module pe_dmem
  import dfp_pkg::*;
#(
  parameter int unsigned AW = 15
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [7:0]        y,
  input  logic              ld_lo,
  input  logic              ld_hi,
  input  logic              we,
  output logic [7:0]        rdata,
  output logic [DMAR_W-1:0] dmar,
  input  logic              sup_sel,
  input  logic              sup_we,
  input  logic [DMAR_W-1:0] sup_addr,
  input  logic [7:0]        sup_wdata,
  input  logic              sup_dmar_we,
  input  logic [DMAR_W-1:0] sup_dmar
);

  logic [7:0]    mem [2**AW];
  logic [AW-1:0] addr;

  assign addr  = sup_sel ? sup_addr[AW-1:0] : dmar[AW-1:0];
  assign rdata = mem[addr];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      dmar <= '0;
    end else if (sup_dmar_we) begin
      dmar <= sup_dmar;
    end else begin
      if (ld_lo) dmar[7:0]  <= y;
      if (ld_hi) dmar[15:8] <= y;
    end
  end

  always_ff @(posedge clk) begin
    if (sup_sel ? sup_we : we) mem[addr] <= sup_sel ? sup_wdata : y;
  end

endmodule
