// tb_pe_seq: self-checking test of the microsequencer and its writable
// control store. A small program exercising every sequencing operation is
// written 16 bits at a time and read back; the test then runs it with a
// random branch condition and compares the MPC at every cycle with a model,
// checking CONT, JMP, JCT, JCF, CALL/RET (nested two deep), HALT, the
// supervisor's go/stop, single step and MPC write.
module tb_pe_seq;
  import dfp_pkg::*;
  import tb_uasm_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  uinst_t      uinst;
  logic        exec, ct = 0, go = 0, stop = 0, step = 0, running;
  logic [11:0] mpc, sup_addr = 0, sup_mpc = 0;
  logic        sup_we = 0, sup_mpc_we = 0;
  logic [1:0]  sup_chunk = 0;
  logic [15:0] sup_wdata = 0, sup_rdata;

  pe_seq dut (.clk, .rst_n, .uinst, .exec, .ct, .go, .stop, .step, .running, .mpc,
              .sup_we, .sup_addr, .sup_chunk, .sup_wdata, .sup_rdata, .sup_mpc_we, .sup_mpc);

  int checks = 0, failures = 0;
  uinst_t prog [16];
  int unsigned mstack [$];

  // 0 CONT, 1 JCT->5, 2 JCF->6, 3 CALL->10, 4 JMP->0,
  // 5 JMP->2, 6 JMP->3, 10 CALL->12, 11 RET, 12 RET, 13 HALT
  initial begin
    for (int i = 0; i < 16; i++) prog[i] = nop();
    prog[1]  = seq(nop(), SEQ_JCT,  CC_Z, 5);
    prog[2]  = seq(nop(), SEQ_JCF,  CC_Z, 6);
    prog[3]  = seq(nop(), SEQ_CALL, CC_TRUE, 10);
    prog[4]  = seq(nop(), SEQ_JMP,  CC_TRUE, 0);
    prog[5]  = seq(nop(), SEQ_JMP,  CC_TRUE, 2);
    prog[6]  = seq(nop(), SEQ_JMP,  CC_TRUE, 3);
    prog[10] = seq(nop(), SEQ_CALL, CC_TRUE, 12);
    prog[11] = seq(nop(), SEQ_RET,  CC_TRUE, 0);
    prog[12] = seq(nop(), SEQ_RET,  CC_TRUE, 0);
    prog[13] = seq(nop(), SEQ_HALT, CC_TRUE, 0);
  end

  function automatic int unsigned model_next(input int unsigned pc, input logic c);
    uinst_t u;
    u = prog[pc];
    case (u.seq)
      SEQ_JMP:  return int'(u.next);
      SEQ_JCT:  return c ? int'(u.next) : pc + 1;
      SEQ_JCF:  return c ? pc + 1 : int'(u.next);
      SEQ_CALL: begin mstack.push_back(pc + 1); return int'(u.next); end
      SEQ_RET:  return mstack.pop_back();
      SEQ_HALT: return pc;
      default:  return pc + 1;
    endcase
  endfunction

  initial begin
    int unsigned pc;
    logic [63:0] w;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 16; i++) begin
      w = 64'(prog[i]);
      for (int c = 0; c < 4; c++) begin
        sup_we = 1; sup_addr = 12'(i); sup_chunk = 2'(c); sup_wdata = w[c*16 +: 16];
        @(negedge clk);
      end
    end
    sup_we = 0;
    for (int i = 0; i < 16; i++) begin
      w = 64'(prog[i]);
      for (int c = 0; c < 4; c++) begin
        sup_addr = 12'(i); sup_chunk = 2'(c);
        #1;
        checks++;
        if (sup_rdata !== w[c*16 +: 16]) begin failures++; $display("store readback %0d.%0d", i, c); end
      end
    end
    checks++;
    if (running || exec) begin failures++; $display("running after reset"); end
    // Run 200 cycles with random conditions.
    @(negedge clk); go = 1;
    @(negedge clk); go = 0;
    // Running from the edge that sampled go; MPC 0 executes first.
    pc = 0;
    for (int n = 0; n < 200; n++) begin
      ct = 1'($urandom);
      #1;
      checks++;
      if (mpc !== 12'(pc) || uinst !== prog[pc]) begin
        failures++;
        $display("cycle %0d: MPC %0d expected %0d", n, mpc, pc);
      end
      @(negedge clk);
      pc = model_next(pc, ct);
    end
    // Stop, then step twice.
    stop = 1;
    @(negedge clk); stop = 0;
    pc = model_next(pc, ct);
    #1;
    checks++;
    if (running || mpc !== 12'(pc)) begin failures++; $display("stop failed"); end
    repeat (2) begin
      step = 1;
      @(negedge clk); step = 0;
      pc = model_next(pc, ct);
      #1;
      checks++;
      if (running || mpc !== 12'(pc)) begin failures++; $display("step failed: %0d vs %0d", mpc, pc); end
    end
    // HALT: jump the MPC to 13 and start; the PE must stop by itself.
    sup_mpc_we = 1; sup_mpc = 12'd13;
    @(negedge clk); sup_mpc_we = 0;
    go = 1;
    @(negedge clk); go = 0;
    repeat (2) @(negedge clk);
    checks++;
    if (running || mpc !== 12'd13) begin failures++; $display("HALT failed"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
