// pe: the processing element, a small microprogrammed byte-wide computer
// extended with two packet input ports and two packet output ports, which
// can be programmed to emulate any module of a packet communication system.
//
// Data paths: the B bus collects input port data, port status, data memory
// and the machine status; it feeds the ALU's S operand and can load the
// machine status (bits 3:0, to restore a saved status). The ALU's R operand
// is a register or the microinstruction's direct data. The ALU result drives
// the Y bus, which loads the DMAR (a byte at a time), the data memory and the
// output ports. One horizontal microinstruction (dfp_pkg::uinst_t) per clock
// controls all of this; the microsequencer picks the next one, branching on
// the status unit. The ports are status-driven, not interrupt or DMA driven:
// the microprogram polls the port status byte (bits PST_*), reads an input
// port (which acknowledges the byte) and loads an output port (data and
// lastbyte together). The supervisor interface loads microprogram and data,
// starts, halts and single-steps the PE and reaches all its registers.
//
// Port status byte on the B bus: bit 0 input 0 has a byte, bit 1 its
// lastbyte, bit 2 input 1 has a byte, bit 3 its lastbyte, bit 4 output 0
// free, bit 5 output 1 free.
//
// Interface: dev_id (switch-set device number), sb_* (supervisor bus, see
// pe_sup_if), in_fwd/in_ack, out_fwd/out_ack (two connections each way).
// Timing: one microinstruction per clock; port handshake signals cross one
// synchronising flip-flop.
//
// The block structure (two 2-port groups, B and Y buses, ALU with
// registers, status unit, data memory with DMAR, writable microstore,
// supervisor access) follows the original data paths. The microinstruction
// fields, the status byte layout and the bus encodings are this
// implementation's choices.
module pe
  import dfp_pkg::*;
#(
  parameter int unsigned DMEM_AW = 15,
  parameter int unsigned UAW     = UADDR_W
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [7:0]      dev_id,
  input  logic            sb_valid,
  input  logic [7:0]      sb_dev,
  input  logic            sb_write,
  input  sup_space_e      sb_space,
  input  logic [15:0]     sb_addr,
  input  logic [15:0]     sb_wdata,
  output logic            sb_ack,
  output logic [15:0]     sb_rdata,
  input  link_fwd_t [1:0] in_fwd,
  output logic      [1:0] in_ack,
  output link_fwd_t [1:0] out_fwd,
  input  logic      [1:0] out_ack,
  output logic            running
);

  uinst_t         ui;
  logic           exec, ct;
  logic [UAW-1:0] mpc;
  logic [7:0]     bbus, y;
  flags_t         alu_flags, mstat;
  logic [7:0]     in_data [2];
  logic [1:0]     in_rdy, in_last, out_free;
  logic [7:0]     pstat;
  logic [7:0]     mem_rdata, reg_rdata;
  logic [15:0]    umem_rdata, dmar;
  logic go, stop, step, dmem_sel, dmem_we, umem_we, reg_we, mpc_we, dmar_we, stat_we;

  // ------------------------------------------------------------ sequencer
  pe_seq #(.UAW(UAW)) u_seq (
    .clk, .rst_n, .uinst(ui), .exec, .ct, .go, .stop, .step, .running, .mpc,
    .sup_we(umem_we), .sup_addr(sb_addr[UAW+3:4]), .sup_chunk(sb_addr[1:0]),
    .sup_wdata(sb_wdata), .sup_rdata(umem_rdata),
    .sup_mpc_we(mpc_we), .sup_mpc(sb_wdata[UAW-1:0])
  );

  // ---------------------------------------------------------------- ports
  assign pstat = {2'b00, out_free[1], out_free[0], in_last[1], in_rdy[1], in_last[0], in_rdy[0]};

  for (genvar p = 0; p < 2; p++) begin : g_port
    pe_in_port u_in (
      .clk, .rst_n, .fwd(in_fwd[p]), .ack(in_ack[p]),
      .rd(exec && ui.bsrc == (p == 0 ? B_IN0 : B_IN1)),
      .data(in_data[p]), .rdy(in_rdy[p]), .last(in_last[p])
    );
    pe_out_port u_out (
      .clk, .rst_n,
      .ld(exec && ui.ydst == (p == 0 ? Y_OUT0 : Y_OUT1)),
      .y, .y_last(ui.y_last), .free(out_free[p]),
      .fwd(out_fwd[p]), .ack(out_ack[p])
    );
  end

  // ---------------------------------------------------------------- B bus
  always_comb begin
    unique case (ui.bsrc)
      B_IN0:   bbus = in_data[0];
      B_IN1:   bbus = in_data[1];
      B_MEM:   bbus = mem_rdata;
      B_PSTAT: bbus = pstat;
      B_MSTAT: bbus = {4'b0, mstat};
      default: bbus = '0;
    endcase
  end

  // ------------------------------------------------------ ALU and status
  pe_alu u_alu (
    .clk, .op(ui.alu), .a(ui.a), .b(ui.b), .r_imm(ui.r_imm), .s_bus(ui.s_bus),
    .imm(ui.imm), .bbus, .cin(ui.cin), .wr(exec && ui.wr_reg),
    .y, .flags(alu_flags),
    .sup_we(reg_we), .sup_addr(sb_addr[3:0]), .sup_wdata(sb_wdata[7:0]), .sup_rdata(reg_rdata)
  );

  pe_status u_stat (
    .clk, .rst_n, .ld(exec && ui.ld_status), .from_bus(ui.st_bus), .alu_flags,
    .bus_flags(flags_t'(bbus[3:0])), .cond(ui.cond), .ct, .mstat,
    .sup_we(stat_we), .sup_wdata(flags_t'(sb_wdata[3:0]))
  );

  // ---------------------------------------------------------- data memory
  pe_dmem #(.AW(DMEM_AW)) u_dmem (
    .clk, .rst_n, .y,
    .ld_lo(exec && ui.ydst == Y_DMARL), .ld_hi(exec && ui.ydst == Y_DMARH),
    .we(exec && ui.ydst == Y_MEM), .rdata(mem_rdata), .dmar,
    .sup_sel(dmem_sel), .sup_we(dmem_we), .sup_addr(sb_addr), .sup_wdata(sb_wdata[7:0]),
    .sup_dmar_we(dmar_we), .sup_dmar(sb_wdata)
  );

  // ----------------------------------------------------------- supervisor
  pe_sup_if #(.UAW(UAW)) u_sup (
    .clk, .rst_n, .dev_id, .sb_valid, .sb_dev, .sb_write, .sb_space, .sb_addr, .sb_wdata,
    .sb_ack, .sb_rdata, .running, .mpc, .dmar, .mstat, .pstat,
    .dmem_rdata(mem_rdata), .umem_rdata, .reg_rdata,
    .go, .stop, .step, .dmem_sel, .dmem_we, .umem_we, .reg_we, .mpc_we, .dmar_we, .stat_we
  );

endmodule
