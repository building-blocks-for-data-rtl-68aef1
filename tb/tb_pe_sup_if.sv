// tb_pe_sup_if: self-checking test of the PE's supervisor bus interface.
// Sends random commands to random device numbers, spaces and addresses, with
// the PE randomly running or halted, and checks against a decoder model
// written here: which control strobe fires, that only the addressed device
// answers (one cycle later), that memories and registers are reachable only
// while halted, and which state each read returns.
module tb_pe_sup_if;
  import dfp_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  localparam logic [7:0] DEV = 8'h05;

  logic        sb_valid = 0, sb_write = 0, sb_ack, running = 0;
  logic [7:0]  sb_dev = 0;
  sup_space_e  sb_space = SP_CTRL;
  logic [15:0] sb_addr = 0, sb_wdata = 0, sb_rdata;
  logic [11:0] mpc = 12'h123;
  logic [15:0] dmar = 16'hABCD, umem_rdata = 16'h7E57;
  flags_t      mstat = 4'b1010;
  logic [7:0]  pstat = 8'h35, dmem_rdata = 8'h99, reg_rdata = 8'h42;
  logic go, stop, step, dmem_sel, dmem_we, umem_we, reg_we, mpc_we, dmar_we, stat_we;

  pe_sup_if dut (.clk, .rst_n, .dev_id(DEV), .sb_valid, .sb_dev, .sb_write, .sb_space,
                 .sb_addr, .sb_wdata, .sb_ack, .sb_rdata, .running, .mpc, .dmar, .mstat, .pstat,
                 .dmem_rdata, .umem_rdata, .reg_rdata, .go, .stop, .step, .dmem_sel, .dmem_we,
                 .umem_we, .reg_we, .mpc_we, .dmar_we, .stat_we);

  int checks = 0, failures = 0;

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 1500; n++) begin
      logic hit, h, w, ctrl;
      logic [9:0] exp_strobes;
      logic [15:0] exp_rd;
      @(negedge clk);
      running  = 1'($urandom);
      sb_valid = ($urandom % 4 != 0);
      sb_dev   = ($urandom % 2 == 1) ? DEV : 8'($urandom);
      sb_write = 1'($urandom);
      sb_space = sup_space_e'($urandom % 4);
      sb_addr  = (sb_space == SP_CTRL) ? 16'($urandom % 6) : 16'($urandom);
      sb_wdata = (sb_space == SP_CTRL && sb_addr == CR_CTRL) ? 16'($urandom % 4) : 16'($urandom);
      #1;
      hit  = sb_valid && sb_dev == DEV;
      h    = hit && !running;
      w    = h && sb_write;
      ctrl = sb_space == SP_CTRL;
      exp_strobes = {
        hit && sb_write && ctrl && sb_addr == 0 && sb_wdata[0],
        hit && sb_write && ctrl && sb_addr == 0 && sb_wdata[1:0] == 2'b00,
        w && ctrl && sb_addr == 0 && sb_wdata[1:0] == 2'b10,
        h && sb_space == SP_DMEM,
        w && sb_space == SP_DMEM,
        w && sb_space == SP_UMEM,
        w && sb_space == SP_REGS,
        w && ctrl && sb_addr == 1,
        w && ctrl && sb_addr == 2,
        w && ctrl && sb_addr == 3};
      checks++;
      if ({go, stop, step, dmem_sel, dmem_we, umem_we, reg_we, mpc_we, dmar_we, stat_we}
          !== exp_strobes) begin
        failures++;
        $display("strobes %b expected %b", {go, stop, step, dmem_sel, dmem_we, umem_we, reg_we,
                 mpc_we, dmar_we, stat_we}, exp_strobes);
      end
      exp_rd = 16'h0;
      if (hit && !sb_write) begin
        if (ctrl && sb_addr == 0) exp_rd = {15'b0, running};
        else if (!running)
          case (sb_space)
            SP_CTRL: exp_rd = (sb_addr == 1) ? 16'h0123 : (sb_addr == 2) ? 16'hABCD :
                              (sb_addr == 3) ? 16'h000A : (sb_addr == 4) ? 16'h0035 : 16'h0;
            SP_DMEM: exp_rd = 16'h0099;
            SP_UMEM: exp_rd = 16'h7E57;
            default: exp_rd = 16'h0042;
          endcase
      end
      @(negedge clk);
      checks++;
      if (sb_ack !== hit || sb_rdata !== exp_rd) begin
        failures++;
        $display("answer ack %b data %h expected %b %h", sb_ack, sb_rdata, hit, exp_rd);
      end
      sb_valid = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
