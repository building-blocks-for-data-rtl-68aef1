// pe_sup_if: the PE's interface to the bus of the supervisory computer.
//
// Many PEs share one supervisor bus; each answers only commands carrying its
// own device number (dev_id, set by switches). A command is one cycle with
// sb_valid high: sb_dev selects the PE, sb_space one of four address spaces
// (dfp_pkg::sup_space_e), sb_addr the location, sb_write the direction and
// sb_wdata the data. The addressed PE answers in the next cycle with sb_ack
// and, for a read, sb_rdata; other PEs drive zeros, so the answers of several
// PEs can be ORed together.
//
//   SP_CTRL  CR_CTRL  write 1 = run, 0 = halt, 2 = single step; read: running
//            CR_MPC, CR_DMAR, CR_STAT  read/write; CR_PSTAT read only
//   SP_DMEM  data memory byte at sb_addr
//   SP_UMEM  microstore: sb_addr = {microinstruction address, 16-bit chunk}
//   SP_REGS  general register sb_addr[3:0]
//
// Memories, registers, MPC, DMAR and status are reached only while the PE is
// halted; while it runs such a write is ignored and a read returns zero (the
// command is still acknowledged). The run/halt/step controls work at any
// time.
//
// What the supervisor can do (load programs and data, halt, single step,
// access all registers, respond to a switch-set bus address) follows the
// original design; the command format, address map and the halted-only rule
// are this implementation's choices, since the supervisor's bus is not
// specified.
module pe_sup_if
  import dfp_pkg::*;
#(
  parameter int unsigned UAW = UADDR_W
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [7:0]  dev_id,
  input  logic        sb_valid,
  input  logic [7:0]  sb_dev,
  input  logic        sb_write,
  input  sup_space_e  sb_space,
  input  logic [15:0] sb_addr,
  input  logic [15:0] sb_wdata,
  output logic        sb_ack,
  output logic [15:0] sb_rdata,
  // PE state
  input  logic        running,
  input  logic [UAW-1:0] mpc,
  input  logic [15:0] dmar,
  input  flags_t      mstat,
  input  logic [7:0]  pstat,
  input  logic [7:0]  dmem_rdata,
  input  logic [15:0] umem_rdata,
  input  logic [7:0]  reg_rdata,
  // controls
  output logic        go,
  output logic        stop,
  output logic        step,
  output logic        dmem_sel,
  output logic        dmem_we,
  output logic        umem_we,
  output logic        reg_we,
  output logic        mpc_we,
  output logic        dmar_we,
  output logic        stat_we
);

  logic hit, halted_hit, wr;
  assign hit        = sb_valid && (sb_dev == dev_id);
  assign halted_hit = hit && !running;
  assign wr         = halted_hit && sb_write;

  assign go   = hit && sb_write && sb_space == SP_CTRL && sb_addr == CR_CTRL && sb_wdata[0];
  assign stop = hit && sb_write && sb_space == SP_CTRL && sb_addr == CR_CTRL && !sb_wdata[0]
                && !sb_wdata[1];
  assign step = wr && sb_space == SP_CTRL && sb_addr == CR_CTRL && sb_wdata[1] && !sb_wdata[0];

  assign dmem_sel = halted_hit && sb_space == SP_DMEM;
  assign dmem_we  = wr && sb_space == SP_DMEM;
  assign umem_we  = wr && sb_space == SP_UMEM;
  assign reg_we   = wr && sb_space == SP_REGS;
  assign mpc_we   = wr && sb_space == SP_CTRL && sb_addr == CR_MPC;
  assign dmar_we  = wr && sb_space == SP_CTRL && sb_addr == CR_DMAR;
  assign stat_we  = wr && sb_space == SP_CTRL && sb_addr == CR_STAT;

  logic [15:0] rd;
  always_comb begin
    rd = '0;
    if (sb_space == SP_CTRL && sb_addr == CR_CTRL) begin
      rd = {15'b0, running};
    end else if (!running) begin
      unique case (sb_space)
        SP_CTRL: begin
          unique case (sb_addr)
            CR_MPC:   rd = 16'(mpc);
            CR_DMAR:  rd = dmar;
            CR_STAT:  rd = {12'b0, mstat};
            CR_PSTAT: rd = {8'b0, pstat};
            default:  rd = '0;
          endcase
        end
        SP_DMEM: rd = {8'b0, dmem_rdata};
        SP_UMEM: rd = umem_rdata;
        SP_REGS: rd = {8'b0, reg_rdata};
        default: rd = '0;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      sb_ack   <= 1'b0;
      sb_rdata <= '0;
    end else begin
      sb_ack   <= hit;
      sb_rdata <= (hit && !sb_write) ? rd : '0;
    end
  end

endmodule
