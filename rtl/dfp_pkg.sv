// dfp_pkg: types, constants and helper functions shared by the router, the
// routing networks and the processing element (PE) of the data flow prototype.
//
// A module connection carries one packet byte at a time: eight data wires, a
// lastbyte wire that is on only for the final byte of a packet, and a
// ready/acknowledge pair. The forward wires are bundled as link_fwd_t; the
// acknowledge travels back as a separate bit. The handshake is four-phase
// (return to zero): the sender raises ready with stable data, the receiver
// raises acknowledge when it has taken the byte, the sender drops ready, the
// receiver drops acknowledge. The data/lastbyte/ready/acknowledge wiring
// follows the module connection of the original design; the four-phase
// sequence and its synchronous, single-clock realisation are choices of this
// implementation (the original routers are self-timed).
//
// The PE is microprogrammed. uinst_t is its horizontal microinstruction: every
// control point of the data paths has a field of its own. The format is this
// implementation's own; only its horizontal style, the 4K-word store and the
// units it steers come from the original design.
package dfp_pkg;

  // ---------------------------------------------------------------- links
  typedef struct packed {
    logic       ready;  // a byte is offered
    logic       last;   // lastbyte: final byte of the packet
    logic [7:0] data;   // D7..D0
  } link_fwd_t;

  // Cyclic permutation of the data wires between successive routers: the
  // wire that was D1 becomes D0, so the next router switches on the next bit
  // of the destination tag.
  function automatic logic [7:0] rot_next(input logic [7:0] d);
    return {d[0], d[7:1]};
  endfunction

  // Undo k applications of rot_next.
  function automatic logic [7:0] rot_back(input logic [7:0] d, input int unsigned k);
    logic [7:0] r;
    r = d;
    for (int unsigned i = 0; i < (k % 8); i++) r = {r[6:0], r[7]};
    return r;
  endfunction

  // Apply rot_next k times.
  function automatic logic [7:0] rot_fwd(input logic [7:0] d, input int unsigned k);
    logic [7:0] r;
    r = d;
    for (int unsigned i = 0; i < (k % 8); i++) r = {r[0], r[7:1]};
    return r;
  endfunction

  // Destination tag for the rectangular network: tag bit k is examined by
  // stage k; stage 0 selects the upper or lower half of the receivers, so
  // tag bit k is bit (stages-1-k) of the receiver number. Tag bit k travels
  // in header byte k/8, bit k%8; this returns header byte j. Networks of
  // more than eight stages need one header byte per eight stages.
  function automatic logic [7:0] rect_tag(input int unsigned dst, input int unsigned stages,
                                          input int unsigned j = 0);
    logic [7:0] t;
    t = '0;
    for (int unsigned k = 8 * j; k < stages && k < 8 * j + 8; k++)
      t[k % 8] = 1'((dst >> (stages - 1 - k)) & 1);
    return t;
  endfunction

  // Triangular network: number of routers on the path from src to dst.
  // Packets climb through the "up" routers until they reach the smallest
  // subtree holding both ends, turn there (or at the root) and descend.
  function automatic int unsigned tri_hops(input int unsigned src, input int unsigned dst,
                                           input int unsigned levels);
    int unsigned l;
    l = 1;
    while (l < levels && ((src >> l) != (dst >> l))) l++;
    return (l == levels) ? 2 * levels - 1 : 2 * l;
  endfunction

  // Triangular network tag. Up routers: 0 = keep climbing, 1 = turn.
  // Root and down routers: 0 = left subtree, 1 = right subtree.
  function automatic logic [7:0] tri_tag(input int unsigned src, input int unsigned dst,
                                         input int unsigned levels);
    logic [7:0] t;
    int unsigned l, k;
    logic via_root;
    t = '0;
    l = 1;                                   // level of the turning subtree
    while (l < levels && ((src >> l) != (dst >> l))) l++;
    via_root = (l == levels);
    k = 0;
    if (via_root) begin
      for (int unsigned i = 1; i < levels; i++) begin t[k] = 1'b0; k++; end
      t[k] = 1'((dst >> (levels - 1)) & 1); k++;
      for (int signed i = int'(levels) - 2; i >= 0; i--) begin
        t[k] = 1'((dst >> i) & 1); k++;
      end
    end else begin
      for (int unsigned i = 1; i < l; i++) begin t[k] = 1'b0; k++; end
      t[k] = 1'b1; k++;                      // turn at level l
      for (int signed i = int'(l) - 1; i >= 0; i--) begin
        t[k] = 1'((dst >> i) & 1); k++;
      end
    end
    return t;
  endfunction

  // ------------------------------------------------------------------- PE
  localparam int unsigned UADDR_W = 12;      // 4K microinstruction store
  localparam int unsigned DMAR_W  = 16;      // data memory address register

  typedef enum logic [2:0] {
    SEQ_CONT = 3'd0,   // next sequential microinstruction
    SEQ_JMP  = 3'd1,   // unconditional branch
    SEQ_JCT  = 3'd2,   // branch if condition true
    SEQ_JCF  = 3'd3,   // branch if condition false
    SEQ_CALL = 3'd4,   // push return address, branch
    SEQ_RET  = 3'd5,   // pop return address
    SEQ_HALT = 3'd6    // stop; the supervisor restarts the PE
  } seq_op_e;

  typedef enum logic [2:0] {
    CC_Z    = 3'd0,    // zero
    CC_N    = 3'd1,    // negative (bit 7)
    CC_C    = 3'd2,    // carry out
    CC_V    = 3'd3,    // two's complement overflow
    CC_TRUE = 3'd4     // always true
  } cond_e;

  typedef enum logic [2:0] {
    ALU_ADD  = 3'd0,   // R + S + cin
    ALU_SUBR = 3'd1,   // S - R - 1 + cin  (S + ~R + cin)
    ALU_AND  = 3'd2,
    ALU_OR   = 3'd3,
    ALU_XOR  = 3'd4,
    ALU_PASR = 3'd5,   // R
    ALU_PASS = 3'd6,   // S
    ALU_SHR  = 3'd7    // S >> 1, cin into bit 7
  } alu_op_e;

  // Source driving the B bus.
  typedef enum logic [2:0] {
    B_NONE   = 3'd0,
    B_IN0    = 3'd1,   // input port 0 data (reading acknowledges the byte)
    B_IN1    = 3'd2,   // input port 1 data (reading acknowledges the byte)
    B_MEM    = 3'd3,   // data memory at DMAR
    B_PSTAT  = 3'd4,   // port status byte, see PST_* below
    B_MSTAT  = 3'd5    // machine status {4'b0, V, C, N, Z}
  } bsrc_e;

  // Destination of the Y bus.
  typedef enum logic [2:0] {
    Y_NONE   = 3'd0,
    Y_DMARL  = 3'd1,   // DMAR[7:0]
    Y_DMARH  = 3'd2,   // DMAR[15:8]
    Y_MEM    = 3'd3,   // data memory at DMAR
    Y_OUT0   = 3'd4,   // output port 0 data buffer and lastbyte flip-flop
    Y_OUT1   = 3'd5    // output port 1 data buffer and lastbyte flip-flop
  } ydst_e;

  // Bits of the port status byte on the B bus.
  localparam int unsigned PST_IN0_RDY  = 0;
  localparam int unsigned PST_IN0_LAST = 1;
  localparam int unsigned PST_IN1_RDY  = 2;
  localparam int unsigned PST_IN1_LAST = 3;
  localparam int unsigned PST_OUT0_FREE = 4;
  localparam int unsigned PST_OUT1_FREE = 5;

  typedef struct packed {
    seq_op_e              seq;
    cond_e                cond;
    logic [UADDR_W-1:0]   next;       // branch target
    alu_op_e              alu;
    logic                 r_imm;      // R operand: 1 = direct data (imm), 0 = reg[a]
    logic                 s_bus;      // S operand: 1 = B bus, 0 = reg[b]
    logic [3:0]           a;
    logic [3:0]           b;
    logic                 cin;
    logic                 wr_reg;     // write the ALU result into reg[b]
    logic                 ld_status;  // load the machine status ...
    logic                 st_bus;     // ... 0: from the ALU flags, 1: from B bus bits 3:0
    bsrc_e                bsrc;
    ydst_e                ydst;
    logic                 y_last;     // lastbyte value loaded with an output byte
    logic [7:0]           imm;        // direct data
  } uinst_t;

  localparam int unsigned UINST_W = $bits(uinst_t);

  typedef struct packed {
    logic v, c, n, z;
  } flags_t;

  // Supervisor bus address spaces.
  typedef enum logic [1:0] {
    SP_CTRL = 2'd0,    // control and PE registers
    SP_DMEM = 2'd1,    // data memory, byte address
    SP_UMEM = 2'd2,    // microstore: addr = {uaddr[11:0], 16-bit chunk[3:0]}
    SP_REGS = 2'd3     // general registers 0..15
  } sup_space_e;

  // Registers in SP_CTRL.
  localparam logic [15:0] CR_CTRL = 16'h0000;  // w: bit0 run, bit1 single step; r: bit0 running
  localparam logic [15:0] CR_MPC  = 16'h0001;  // microprogram counter
  localparam logic [15:0] CR_DMAR = 16'h0002;  // data memory address register
  localparam logic [15:0] CR_STAT = 16'h0003;  // machine status flags
  localparam logic [15:0] CR_PSTAT = 16'h0004; // port status byte (read only)

endpackage
