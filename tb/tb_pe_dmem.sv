// tb_pe_dmem: self-checking test of the PE data memory and DMAR at the full
// 32K-byte size. The supervisor fills random locations; then DMAR is loaded
// a byte at a time from the Y bus and random reads and writes through DMAR
// are compared with a reference array (DMAR values are 16 bits; the low 15
// select the byte). Also checks that the supervisor can set DMAR directly.
module tb_pe_dmem;
  import dfp_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [7:0]  y = 0, rdata, sup_wdata = 0;
  logic        ld_lo = 0, ld_hi = 0, we = 0, sup_sel = 0, sup_we = 0, sup_dmar_we = 0;
  logic [15:0] dmar, sup_addr = 0, sup_dmar = 0;

  pe_dmem dut (.clk, .rst_n, .y, .ld_lo, .ld_hi, .we, .rdata, .dmar,
               .sup_sel, .sup_we, .sup_addr, .sup_wdata, .sup_dmar_we, .sup_dmar);

  int checks = 0, failures = 0;
  logic [7:0] model [int];

  task automatic set_dmar(input logic [15:0] a);
    @(negedge clk); y = a[7:0];  ld_lo = 1;
    @(negedge clk); ld_lo = 0; y = a[15:8]; ld_hi = 1;
    @(negedge clk); ld_hi = 0;
  endtask

  initial begin
    logic [15:0] addrs [64];
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 64; i++) begin
      addrs[i] = 16'($urandom);
      @(negedge clk);
      sup_sel = 1; sup_we = 1; sup_addr = addrs[i]; sup_wdata = 8'($urandom);
      model[int'(addrs[i][14:0])] = sup_wdata;
    end
    @(negedge clk); sup_sel = 0; sup_we = 0;
    for (int n = 0; n < 300; n++) begin
      logic [15:0] a;
      a = addrs[$urandom % 64];
      set_dmar(a);
      checks++;
      if (dmar !== a) begin failures++; $display("DMAR %h expected %h", dmar, a); end
      checks++;
      if (rdata !== model[int'(a[14:0])]) begin
        failures++;
        $display("read %h: %h expected %h", a, rdata, model[int'(a[14:0])]);
      end
      if ($urandom % 2 == 1) begin
        y = 8'($urandom); we = 1;
        model[int'(a[14:0])] = y;
        @(negedge clk); we = 0;
      end
    end
    // Supervisor sets DMAR directly.
    @(negedge clk); sup_dmar_we = 1; sup_dmar = 16'hBEEF;
    @(negedge clk); sup_dmar_we = 0;
    checks++;
    if (dmar !== 16'hBEEF) begin failures++; $display("supervisor DMAR write failed"); end
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
