// tb_pe_status: self-checking test of the PE status unit. Random flag
// values are loaded (or not) from the ALU, from the B bus and by the
// supervisor; after every
// cycle each condition select must report the right bit of the register
// (or true), and the register must hold when nothing loads it.
module tb_pe_status;
  import dfp_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic   ld = 0, from_bus = 0, ct, sup_we = 0;
  flags_t alu_flags = '0, bus_flags = '0, mstat, sup_wdata = '0, model;
  cond_e  cond = CC_Z;

  pe_status dut (.clk, .rst_n, .ld, .from_bus, .alu_flags, .bus_flags, .cond, .ct, .mstat, .sup_we, .sup_wdata);

  int checks = 0, failures = 0;

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    model = '0;
    for (int n = 0; n < 500; n++) begin
      @(negedge clk);
      ld = 1'($urandom); sup_we = ($urandom % 4 == 0);
      from_bus = 1'($urandom);
      alu_flags = flags_t'($urandom); bus_flags = flags_t'($urandom); sup_wdata = flags_t'($urandom);
      @(negedge clk);
      if (sup_we) model = sup_wdata; else if (ld) model = from_bus ? bus_flags : alu_flags;
      ld = 0; sup_we = 0; from_bus = 0;
      for (int c = 0; c < 5; c++) begin
        logic e;
        cond = cond_e'(c);
        #1;
        e = (c == 0) ? model.z : (c == 1) ? model.n : (c == 2) ? model.c : (c == 3) ? model.v : 1'b1;
        checks++;
        if (ct !== e || mstat !== model) begin
          failures++;
          $display("cond %0d: ct %b expected %b, status %b expected %b", c, ct, e, mstat, model);
        end
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
