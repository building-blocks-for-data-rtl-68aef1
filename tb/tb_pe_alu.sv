// tb_pe_alu: self-checking test of the PE's ALU and register file. Loads
// random values into the sixteen registers through the supervisor port, then
// runs random operations with random operand sources and write-back, and
// compares result, flags and register contents with a reference model
// written here from the operation definitions.
module tb_pe_alu;
  import dfp_pkg::*;

  logic clk = 0;
  always #5 clk = ~clk;

  alu_op_e    op;
  logic [3:0] a, b, sup_addr;
  logic       r_imm, s_bus, cin, wr, sup_we;
  logic [7:0] imm, bbus, y, sup_wdata, sup_rdata;
  flags_t     flags;

  pe_alu dut (.clk, .op, .a, .b, .r_imm, .s_bus, .imm, .bbus, .cin, .wr, .y, .flags,
              .sup_we, .sup_addr, .sup_wdata, .sup_rdata);

  int checks = 0, failures = 0;
  logic [7:0] model [16];

  function automatic logic [11:0] ref_op(input alu_op_e o, input logic [7:0] r, s,
                                         input logic ci);
    // returns {v, c, n, z, y}
    logic [8:0] t;
    logic [7:0] res;
    logic c, v;
    c = 0; v = 0;
    case (o)
      ALU_ADD:  begin t = r + s + ci; res = t[7:0]; c = t[8];
                      v = (r[7] & s[7] & ~res[7]) | (~r[7] & ~s[7] & res[7]); end
      ALU_SUBR: begin t = {1'b0, s} + {1'b0, 8'hFF - r} + ci; res = t[7:0]; c = t[8];
                      v = (s[7] & ~r[7] & ~res[7]) | (~s[7] & r[7] & res[7]); end
      ALU_AND:  res = r & s;
      ALU_OR:   res = r | s;
      ALU_XOR:  res = r ^ s;
      ALU_PASR: res = r;
      ALU_PASS: res = s;
      default:  begin res = {ci, s[7:1]}; c = s[0]; end
    endcase
    return {v, c, res[7], (res == 0), res};
  endfunction

  initial begin
    sup_we = 0; wr = 0; op = ALU_ADD; a = 0; b = 0; r_imm = 0; s_bus = 0; cin = 0;
    imm = 0; bbus = 0; sup_addr = 0; sup_wdata = 0;
    for (int i = 0; i < 16; i++) begin
      @(negedge clk);
      sup_we = 1; sup_addr = 4'(i); sup_wdata = 8'($urandom); model[i] = sup_wdata;
    end
    @(negedge clk);
    sup_we = 0;
    for (int n = 0; n < 2000; n++) begin
      logic [7:0]  r, sv;
      logic [11:0] e;
      op = alu_op_e'($urandom % 8);
      a = 4'($urandom); b = 4'($urandom);
      r_imm = 1'($urandom); s_bus = 1'($urandom); cin = 1'($urandom);
      imm = 8'($urandom); bbus = 8'($urandom); wr = 1'($urandom);
      r  = r_imm ? imm : model[a];
      sv = s_bus ? bbus : model[b];
      e  = ref_op(op, r, sv, cin);
      #1;
      checks++;
      if ({flags.v, flags.c, flags.n, flags.z, y} !== e) begin
        failures++;
        $display("op %0d r %h s %h cin %b: got y %h vcnz %b%b%b%b expected %h", op, r, sv, cin,
                 y, flags.v, flags.c, flags.n, flags.z, e);
      end
      @(negedge clk);
      if (wr) model[b] = e[7:0];
    end
    wr = 0;
    for (int i = 0; i < 16; i++) begin
      sup_addr = 4'(i);
      #1;
      checks++;
      if (sup_rdata !== model[i]) begin
        failures++;
        $display("register %0d: %h expected %h", i, sup_rdata, model[i]);
      end
    end
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
