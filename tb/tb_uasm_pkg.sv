// tb_uasm_pkg: a tiny microassembler for PE test programs. Each function
// returns one horizontal microinstruction (dfp_pkg::uinst_t); seq() sets the
// sequencing fields of any of them. The packet program used by the PE and
// prototype tests is built by fwd_store_program().
package tb_uasm_pkg;
  import dfp_pkg::*;

  function automatic uinst_t nop();
    uinst_t u;
    u = '0;
    u.seq  = SEQ_CONT;
    u.cond = CC_TRUE;
    u.alu  = ALU_PASR;
    u.r_imm = 1'b1;
    return u;
  endfunction

  function automatic uinst_t seq(input uinst_t u, input seq_op_e op, input cond_e c,
                                 input int unsigned target);
    u.seq  = op;
    u.cond = c;
    u.next = UADDR_W'(target);
    return u;
  endfunction

  // reg[b] = imm
  function automatic uinst_t mvi(input int b, input logic [7:0] imm);
    uinst_t u;
    u = nop(); u.alu = ALU_PASR; u.r_imm = 1; u.imm = imm; u.b = 4'(b); u.wr_reg = 1;
    return u;
  endfunction

  // reg[b] = reg[b] + imm, status loaded
  function automatic uinst_t addi(input int b, input logic [7:0] imm);
    uinst_t u;
    u = nop(); u.alu = ALU_ADD; u.r_imm = 1; u.imm = imm; u.b = 4'(b); u.wr_reg = 1;
    u.ld_status = 1;
    return u;
  endfunction

  // status = flags of (B bus AND mask)
  function automatic uinst_t testb(input bsrc_e src, input logic [7:0] mask);
    uinst_t u;
    u = nop(); u.alu = ALU_AND; u.r_imm = 1; u.imm = mask; u.s_bus = 1; u.bsrc = src;
    u.ld_status = 1;
    return u;
  endfunction

  // reg[b] = B bus
  function automatic uinst_t ldb(input bsrc_e src, input int b);
    uinst_t u;
    u = nop(); u.alu = ALU_PASS; u.s_bus = 1; u.bsrc = src; u.b = 4'(b); u.wr_reg = 1;
    return u;
  endfunction

  // Y destination = reg[a]
  function automatic uinst_t st(input ydst_e dst, input int a, input logic last);
    uinst_t u;
    u = nop(); u.alu = ALU_PASR; u.r_imm = 0; u.a = 4'(a); u.ydst = dst; u.y_last = last;
    return u;
  endfunction

  // Y destination = imm
  function automatic uinst_t sti(input ydst_e dst, input logic [7:0] imm);
    uinst_t u;
    u = nop(); u.alu = ALU_PASR; u.r_imm = 1; u.imm = imm; u.ydst = dst;
    return u;
  endfunction

  // Y destination = B bus (e.g. input port straight into memory)
  function automatic uinst_t mvb(input bsrc_e src, input ydst_e dst);
    uinst_t u;
    u = nop(); u.alu = ALU_PASS; u.s_bus = 1; u.bsrc = src; u.ydst = dst;
    return u;
  endfunction

  // Packet program (input 0 is always served first, and the program never
  // spins on a busy output, so a PE keeps draining the network while its
  // own output is blocked):
  //  - bytes arriving on input port 1 are forwarded to output port 0,
  //    lastbyte preserved (injects packets into the routing network);
  //  - bytes arriving on input port 0 are stored in data memory from
  //    address 0x0100 upward (r2 = next offset) and r3 counts packets.
  localparam int unsigned P_LOOP = 3, P_FWD = 8, P_FWDL = 14, P_RCV = 16, P_RCVL = 21;
  localparam int unsigned P_WAIT_BR = 9;   // branch taken while output 0 is busy
  localparam int unsigned P_LEN = 25;

  function automatic void fwd_store_program(output uinst_t p [P_LEN]);
    p[0]  = mvi(2, 8'h00);
    p[1]  = sti(Y_DMARH, 8'h01);
    p[2]  = mvi(3, 8'h00);
    p[3]  = testb(B_PSTAT, 8'h01);                           // input 0 has a byte?
    p[4]  = seq(nop(), SEQ_JCF, CC_Z, P_RCV);
    p[5]  = testb(B_PSTAT, 8'h04);                           // input 1 has a byte?
    p[6]  = seq(nop(), SEQ_JCF, CC_Z, P_FWD);
    p[7]  = seq(nop(), SEQ_JMP, CC_TRUE, P_LOOP);
    p[8]  = testb(B_PSTAT, 8'h10);                           // output 0 free?
    p[9]  = seq(nop(), SEQ_JCT, CC_Z, P_LOOP);              // busy: poll again
    p[10] = testb(B_PSTAT, 8'h08);                           // input 1 lastbyte?
    p[11] = seq(nop(), SEQ_JCF, CC_Z, P_FWDL);
    p[12] = ldb(B_IN1, 1);
    p[13] = seq(st(Y_OUT0, 1, 1'b0), SEQ_JMP, CC_TRUE, P_LOOP);
    p[14] = ldb(B_IN1, 1);
    p[15] = seq(st(Y_OUT0, 1, 1'b1), SEQ_JMP, CC_TRUE, P_LOOP);
    p[16] = testb(B_PSTAT, 8'h02);                           // input 0 lastbyte?
    p[17] = seq(nop(), SEQ_JCF, CC_Z, P_RCVL);
    p[18] = st(Y_DMARL, 2, 1'b0);
    p[19] = mvb(B_IN0, Y_MEM);
    p[20] = seq(addi(2, 8'h01), SEQ_JMP, CC_TRUE, P_LOOP);
    p[21] = st(Y_DMARL, 2, 1'b0);
    p[22] = mvb(B_IN0, Y_MEM);
    p[23] = addi(2, 8'h01);
    p[24] = seq(addi(3, 8'h01), SEQ_JMP, CC_TRUE, P_LOOP);
  endfunction

endpackage
