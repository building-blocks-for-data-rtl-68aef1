// tb_pe: self-checking test of the whole processing element. Through the
// supervisor bus the test loads a packet program into the writable
// microstore (reading part of it back), sets the microprogram counter and
// starts the PE. Packets sent into input port 1 must come out of output
// port 0 unchanged, lastbyte included; packets sent into input port 0 must
// land byte by byte in data memory from 0x0100, with a packet count in
// register 3. The test then halts the PE, reads memory and registers back
// over the supervisor bus and single-steps the microprogram. It counts
// cycles in which the program found output 0 busy and waited; that must
// happen. A memory read while the PE runs must return zero, and a command
// for another device number must go unanswered. Finally two single-stepped
// microinstructions save the machine status to memory and restore it from
// memory over the B bus.
module tb_pe;
  import dfp_pkg::*;
  import tb_uasm_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        sb_valid = 0, sb_write = 0, sb_ack, running;
  logic [7:0]  sb_dev = 0;
  sup_space_e  sb_space = SP_CTRL;
  logic [15:0] sb_addr = 0, sb_wdata = 0, sb_rdata;
  link_fwd_t [1:0] in_fwd, out_fwd;
  logic      [1:0] in_ack, out_ack;

  localparam logic [7:0] DEV = 8'h2A;

  pe dut (.clk, .rst_n, .dev_id(DEV), .sb_valid, .sb_dev, .sb_write, .sb_space, .sb_addr,
          .sb_wdata, .sb_ack, .sb_rdata, .in_fwd, .in_ack, .out_fwd, .out_ack, .running);

  tb_link_src  #(.STALL(4)) u_src0 (.clk, .rst_n, .fwd(in_fwd[0]), .ack(in_ack[0]));
  tb_link_src  #(.STALL(1)) u_src1 (.clk, .rst_n, .fwd(in_fwd[1]), .ack(in_ack[1]));
  tb_link_sink #(.STALL(12)) u_snk0 (.clk, .rst_n, .fwd(out_fwd[0]), .ack(out_ack[0]));
  tb_link_sink #(.STALL(0))  u_snk1 (.clk, .rst_n, .fwd(out_fwd[1]), .ack(out_ack[1]));

  int checks = 0, failures = 0;
  int unsigned n_busy_wait = 0;

  always @(posedge clk)
    if (dut.exec && dut.mpc == UADDR_W'(P_WAIT_BR) && dut.ct) n_busy_wait++;

  task automatic sup(input logic [7:0] dev, input logic wr, input sup_space_e sp,
                     input logic [15:0] addr, input logic [15:0] wdata,
                     output logic [15:0] rdata, output logic acked);
    @(negedge clk);
    sb_valid = 1; sb_dev = dev; sb_write = wr; sb_space = sp; sb_addr = addr; sb_wdata = wdata;
    @(negedge clk);
    sb_valid = 0;
    acked = sb_ack;
    rdata = sb_rdata;
  endtask

  task automatic sup_wr(input sup_space_e sp, input logic [15:0] addr, input logic [15:0] d);
    logic [15:0] r;
    logic a;
    sup(DEV, 1'b1, sp, addr, d, r, a);
    checks++;
    if (!a) begin failures++; $display("write %0d:%h not acknowledged", sp, addr); end
  endtask

  task automatic sup_rd(input sup_space_e sp, input logic [15:0] addr, output logic [15:0] d);
    logic a;
    sup(DEV, 1'b0, sp, addr, 16'h0, d, a);
    checks++;
    if (!a) begin failures++; $display("read %0d:%h not acknowledged", sp, addr); end
  endtask

  task automatic expect_eq(input string what, input logic [15:0] got, input logic [15:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("%s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    uinst_t      prog [P_LEN];
    logic [63:0] w;
    logic [15:0] r;
    logic        a;
    logic [8:0]  fwd_exp [$];
    logic [7:0]  store_exp [$];
    int          n_store_pk;

    repeat (3) @(negedge clk);
    rst_n = 1;

    // Load and verify the microprogram.
    fwd_store_program(prog);
    for (int i = 0; i < P_LEN; i++) begin
      w = 64'(prog[i]);
      for (int c = 0; c < 4; c++) sup_wr(SP_UMEM, 16'((i << 4) | c), w[c*16 +: 16]);
    end
    for (int i = 0; i < P_LEN; i += 6) begin
      w = 64'(prog[i]);
      for (int c = 0; c < 4; c++) begin
        sup_rd(SP_UMEM, 16'((i << 4) | c), r);
        expect_eq("microstore readback", r, w[c*16 +: 16]);
      end
    end
    sup_wr(SP_CTRL, CR_MPC, 16'h0);
    sup_wr(SP_CTRL, CR_CTRL, 16'h1);
    sup_rd(SP_CTRL, CR_CTRL, r);
    expect_eq("running", r, 16'h1);

    // A command for another PE is not answered.
    sup(DEV + 1, 1'b0, SP_CTRL, CR_CTRL, 16'h0, r, a);
    checks++;
    if (a || r != 0) begin failures++; $display("foreign command answered"); end
    // Memory is not reachable while running.
    sup_rd(SP_DMEM, 16'h0100, r);
    expect_eq("memory read while running", r, 16'h0);

    // Traffic.
    n_store_pk = 12;
    for (int p = 0; p < 15; p++) begin
      int len;
      len = 1 + ($urandom % 6);
      for (int i = 0; i < len; i++) begin
        logic [8:0] b;
        b = {(i == len - 1), 8'($urandom)};
        u_src1.q.push_back(b);
        fwd_exp.push_back(b);
      end
    end
    for (int p = 0; p < n_store_pk; p++) begin
      int len;
      len = 1 + ($urandom % 8);
      for (int i = 0; i < len; i++) begin
        logic [7:0] b;
        b = 8'($urandom);
        u_src0.q.push_back({(i == len - 1), b});
        store_exp.push_back(b);
      end
    end
    wait (u_src0.q.size() == 0 && u_src1.q.size() == 0 && u_snk0.got.size() == fwd_exp.size());
    repeat (100) @(negedge clk);

    // Halt and inspect.
    sup_wr(SP_CTRL, CR_CTRL, 16'h0);
    sup_rd(SP_CTRL, CR_CTRL, r);
    expect_eq("halted", r, 16'h0);
    for (int i = 0; i < fwd_exp.size(); i++) begin
      checks++;
      if (i >= u_snk0.got.size() || u_snk0.got[i] !== fwd_exp[i]) begin
        failures++;
        $display("forwarded byte %0d wrong", i);
      end
    end
    expect_eq("forwarded byte count", 16'(u_snk0.got.size()), 16'(fwd_exp.size()));
    expect_eq("nothing on output 1", 16'(u_snk1.got.size()), 16'h0);
    for (int i = 0; i < store_exp.size(); i++) begin
      sup_rd(SP_DMEM, 16'(16'h0100 + i), r);
      expect_eq("stored byte", r, {8'h00, store_exp[i]});
    end
    sup_rd(SP_REGS, 16'd3, r);
    expect_eq("packet count r3", r, 16'(n_store_pk));
    sup_rd(SP_REGS, 16'd2, r);
    expect_eq("store pointer r2", r, 16'(store_exp.size()));

    // Single step: from the polling loop head, one step moves to the next
    // microinstruction and the PE stays halted.
    sup_wr(SP_CTRL, CR_MPC, 16'(P_LOOP));
    sup_wr(SP_CTRL, CR_CTRL, 16'h2);
    sup_rd(SP_CTRL, CR_MPC, r);
    expect_eq("MPC after one step", r, 16'(P_LOOP + 1));
    sup_wr(SP_CTRL, CR_CTRL, 16'h2);
    sup_rd(SP_CTRL, CR_MPC, r);
    expect_eq("MPC after two steps", r, 16'(P_LOOP + 2));
    sup_rd(SP_CTRL, CR_CTRL, r);
    expect_eq("still halted", r, 16'h0);
    // Registers and DMAR written by the supervisor.
    sup_wr(SP_REGS, 16'd9, 16'h5A);
    sup_rd(SP_REGS, 16'd9, r);
    expect_eq("register 9", r, 16'h5A);
    sup_wr(SP_CTRL, CR_DMAR, 16'h1234);
    sup_rd(SP_CTRL, CR_DMAR, r);
    expect_eq("DMAR", r, 16'h1234);

    // Machine status saved to memory through the B bus and the ALU, then
    // restored from memory through the B bus (two single steps).
    begin
      uinst_t us, ur;
      us = nop(); us.bsrc = B_MSTAT; us.s_bus = 1; us.alu = ALU_PASS; us.ydst = Y_MEM;
      ur = nop(); ur.bsrc = B_MEM; ur.ld_status = 1; ur.st_bus = 1;
      w = 64'(us);
      for (int c = 0; c < 4; c++) sup_wr(SP_UMEM, 16'((100 << 4) | c), w[c*16 +: 16]);
      w = 64'(ur);
      for (int c = 0; c < 4; c++) sup_wr(SP_UMEM, 16'((101 << 4) | c), w[c*16 +: 16]);
      for (int k = 0; k < 4; k++) begin
        logic [3:0] saved, restored;
        saved = 4'($urandom); restored = 4'($urandom);
        sup_wr(SP_CTRL, CR_DMAR, 16'h0040 + 16'(k));
        sup_wr(SP_CTRL, CR_STAT, 16'(saved));
        sup_wr(SP_CTRL, CR_MPC, 16'd100);
        sup_wr(SP_CTRL, CR_CTRL, 16'h2);
        sup_rd(SP_DMEM, 16'h0040 + 16'(k), r);
        expect_eq("status saved to memory", r, 16'(saved));
        sup_wr(SP_DMEM, 16'h0040 + 16'(k), {8'h0, 4'($urandom), restored});
        sup_wr(SP_CTRL, CR_STAT, 16'(~restored));
        sup_wr(SP_CTRL, CR_CTRL, 16'h2);
        sup_rd(SP_CTRL, CR_STAT, r);
        expect_eq("status restored from the B bus", r, 16'(restored));
      end
    end

    checks++;
    if (n_busy_wait == 0) begin failures++; $display("output 0 never busy"); end
    $display("cycles waiting for output 0: %0d", n_busy_wait);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
