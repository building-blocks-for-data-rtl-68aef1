// pe_seq: the PE's microsequencer and writable control store.
//
// The control store holds 2**UAW horizontal microinstructions
// (dfp_pkg::uinst_t), stored as CS_W-bit words and written by the supervisor
// 16 bits at a time. The microprogram counter (MPC) addresses it; the word
// read out controls the data paths for the current cycle (exec high). The
// next MPC is MPC+1, the branch target, a conditional choice of the two on
// the status unit's ct, or a return address from a STACK-entry stack (CALL
// pushes MPC+1, RET pops). HALT stops the machine at that microinstruction.
// The supervisor starts (go), stops (stop) and single-steps (step) it and may
// set the MPC while it is halted.
//
// Interface: uinst, exec (the current microinstruction is carried out this
// cycle), ct, go/stop/step, running, mpc, sup_*. Timing: one
// microinstruction per clock while running; a step executes exactly one.
//
// The 4K writable store, horizontal format and supervisor halt/single-step
// follow the original design; the sequencing operations, the stack and the
// control store word layout are this implementation's choices.
module pe_seq
  import dfp_pkg::*;
#(
  parameter int unsigned UAW   = UADDR_W,
  parameter int unsigned CS_W  = 64,
  parameter int unsigned STACK = 4
) (
  input  logic              clk,
  input  logic              rst_n,
  output uinst_t            uinst,
  output logic              exec,
  input  logic              ct,
  input  logic              go,
  input  logic              stop,
  input  logic              step,
  output logic              running,
  output logic [UAW-1:0]    mpc,
  input  logic              sup_we,
  input  logic [UAW-1:0]    sup_addr,
  input  logic [1:0]        sup_chunk,
  input  logic [15:0]       sup_wdata,
  output logic [15:0]       sup_rdata,
  input  logic              sup_mpc_we,
  input  logic [UAW-1:0]    sup_mpc
);

  logic [CS_W-1:0] cs [2**UAW];
  logic [CS_W-1:0] word;
  logic [UAW-1:0]  stk [STACK];
  logic [$clog2(STACK+1)-1:0] sp;
  logic [UAW-1:0]  nxt, seq_next;

  assign word  = cs[mpc];
  assign uinst = uinst_t'(word[UINST_W-1:0]);
  assign exec  = running || step;
  assign seq_next = mpc + 1'b1;
  assign nxt = uinst.next[UAW-1:0];

  always_ff @(posedge clk) begin
    if (sup_we) cs[sup_addr][sup_chunk*16 +: 16] <= sup_wdata;
  end
  assign sup_rdata = cs[sup_addr][sup_chunk*16 +: 16];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      mpc     <= '0;
      sp      <= '0;
      running <= 1'b0;
    end else begin
      if (go)   running <= 1'b1;
      if (stop) running <= 1'b0;
      if (sup_mpc_we && !running) begin
        mpc <= sup_mpc;
      end else if (exec) begin
        unique case (uinst.seq)
          SEQ_CONT: mpc <= seq_next;
          SEQ_JMP:  mpc <= nxt;
          SEQ_JCT:  mpc <= ct ? nxt : seq_next;
          SEQ_JCF:  mpc <= ct ? seq_next : nxt;
          SEQ_CALL: begin
            mpc <= nxt;
            if (sp != STACK[$bits(sp)-1:0]) begin
              stk[sp[$clog2(STACK)-1:0]] <= seq_next;
              sp <= sp + 1'b1;
            end
          end
          SEQ_RET: begin
            if (sp != '0) begin
              mpc <= stk[sp[$clog2(STACK)-1:0] - 1'b1];
              sp  <= sp - 1'b1;
            end else begin
              mpc <= seq_next;
            end
          end
          SEQ_HALT: running <= 1'b0;
          default:  mpc <= seq_next;
        endcase
      end
    end
  end

endmodule
