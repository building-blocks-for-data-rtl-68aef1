// tb_proto_top: end-to-end test of the prototype at its default size (four
// PEs, 4 x 4 rectangular network, 8 x 8 triangular network, 32K-byte data
// memories, 4K microstores). The supervisor loads the same packet program
// into all four PEs over the shared bus and starts them. Test sources then
// feed packets into port 1 of every PE; each PE forwards them through its
// port 0 into the rectangular network, which delivers them to the PE named
// by the packet's tag, which stores them in its data memory. The
// supervisor halts the PEs and reads memories and packet counters back:
// every packet must be stored whole, once, at the PE it was addressed to,
// with the packets of each source in order. Alongside, the triangular
// network carries packets between its eight leaves.
//
// Mechanisms counted (each must occur): router output conflicts and
// concurrent router outputs in the rectangular network, a PE waiting for
// its busy output port, a PE's lastbyte branch, a PE sending to itself,
// triangular packets turning inside a subtree and crossing the root, and a
// supervisor single step.
module tb_proto_top;
  import dfp_pkg::*;
  import tb_uasm_pkg::*;

  localparam int NPE = 4, NTRI = 8, PKLEN = 4, NPK = 12;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        sb_valid = 0, sb_write = 0, sb_ack;
  logic [7:0]  sb_dev = 0;
  sup_space_e  sb_space = SP_CTRL;
  logic [15:0] sb_addr = 0, sb_wdata = 0, sb_rdata;
  logic [NPE-1:0] running;
  link_fwd_t [NPE-1:0]  ext_in_fwd, ext_out_fwd;
  logic      [NPE-1:0]  ext_in_ack, ext_out_ack;
  link_fwd_t [NTRI-1:0] tri_in_fwd, tri_out_fwd;
  logic      [NTRI-1:0] tri_in_ack, tri_out_ack;

  proto_top dut (.clk, .rst_n, .sb_valid, .sb_dev, .sb_write, .sb_space, .sb_addr, .sb_wdata,
                 .sb_ack, .sb_rdata, .running, .ext_in_fwd, .ext_in_ack, .ext_out_fwd,
                 .ext_out_ack, .tri_in_fwd, .tri_in_ack, .tri_out_fwd, .tri_out_ack);

  int checks = 0, failures = 0;
  int unsigned n_conflict = 0, n_concurrent = 0, n_busy_wait = 0, n_last_branch = 0;
  int unsigned n_self = 0, n_tri_turn = 0, n_tri_root = 0, n_step = 0;

  // ---------------------------------------------------------------- traffic
  logic [8:0] srcq [NPE][$];
  logic [8:0] tsrcq [NTRI][$];
  logic [8:0] tgot [NTRI][$];
  int unsigned pend [NPE];
  int unsigned tpend [NTRI];

  for (genvar i = 0; i < NPE; i++) begin : g_pe_io
    tb_link_src  #(.STALL(1)) u_src (.clk, .rst_n, .fwd(ext_in_fwd[i]), .ack(ext_in_ack[i]));
    tb_link_sink #(.STALL(0)) u_snk (.clk, .rst_n, .fwd(ext_out_fwd[i]), .ack(ext_out_ack[i]));
    always @(posedge clk) begin
      while (srcq[i].size() > 0) u_src.q.push_back(srcq[i].pop_front());
      pend[i] = u_src.q.size() + (ext_in_fwd[i].ready ? 1 : 0);
      if (dut.g_pe[i].u_pe.exec && dut.g_pe[i].u_pe.mpc == 12'(P_WAIT_BR) && dut.g_pe[i].u_pe.ct)
        n_busy_wait++;
      if (dut.g_pe[i].u_pe.exec && dut.g_pe[i].u_pe.mpc == 12'(P_FWDL)) n_last_branch++;
    end
  end

  for (genvar i = 0; i < NTRI; i++) begin : g_tri_io
    tb_link_src  #(.STALL(2)) u_src (.clk, .rst_n, .fwd(tri_in_fwd[i]), .ack(tri_in_ack[i]));
    tb_link_sink #(.STALL(2)) u_snk (.clk, .rst_n, .fwd(tri_out_fwd[i]), .ack(tri_out_ack[i]));
    always @(posedge clk) begin
      while (tsrcq[i].size() > 0) u_src.q.push_back(tsrcq[i].pop_front());
      while (u_snk.got.size() > 0) tgot[i].push_back(u_snk.got.pop_front());
      tpend[i] = u_src.q.size() + (tri_in_fwd[i].ready ? 1 : 0);
    end
  end

  // Router activity in the rectangular network: 2 stages of 2 routers.
  for (genvar s = 0; s < 2; s++) begin : g_mon_s
    for (genvar r = 0; r < 2; r++) begin : g_mon_r
      always @(posedge clk) begin
        if ((dut.u_net.g_stage[s].g_rt[r].u_rt.g_im[0].u_im.req &
             dut.u_net.g_stage[s].g_rt[r].u_rt.g_im[1].u_im.req) != 2'b00) n_conflict++;
        if (dut.u_net.g_stage[s].g_rt[r].u_rt.out_fwd[0].ready &&
            dut.u_net.g_stage[s].g_rt[r].u_rt.out_fwd[1].ready) n_concurrent++;
      end
    end
  end

  // ------------------------------------------------------------ supervisor
  task automatic sup(input int dev, input logic wr, input sup_space_e sp,
                     input logic [15:0] addr, input logic [15:0] wdata,
                     output logic [15:0] rdata);
    @(negedge clk);
    sb_valid = 1; sb_dev = 8'(dev); sb_write = wr; sb_space = sp; sb_addr = addr;
    sb_wdata = wdata;
    @(negedge clk);
    sb_valid = 0;
    checks++;
    if (!sb_ack) begin failures++; $display("PE %0d did not answer", dev); end
    rdata = sb_rdata;
  endtask

  task automatic expect_eq(input string what, input logic [15:0] got, input logic [15:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("%s: got %h expected %h", what, got, exp);
    end
  endtask

  // ------------------------------------------------------------------ test
  initial begin
    uinst_t      prog [P_LEN];
    logic [63:0] w;
    logic [15:0] r;
    logic [7:0]  exp_pk [NPE][NPE][$];   // [dst][src] expected bytes
    int          n_to [NPE];
    int unsigned t_start, t_end;

    repeat (3) @(negedge clk);
    rst_n = 1;

    fwd_store_program(prog);
    for (int pe = 0; pe < NPE; pe++) begin
      for (int i = 0; i < P_LEN; i++) begin
        w = 64'(prog[i]);
        for (int c = 0; c < 4; c++) sup(pe, 1, SP_UMEM, 16'((i << 4) | c), w[c*16 +: 16], r);
      end
      sup(pe, 1, SP_CTRL, CR_MPC, 16'h0, r);
      sup(pe, 1, SP_CTRL, CR_CTRL, 16'h1, r);
    end
    checks++;
    if (running != '1) begin failures++; $display("PEs not running"); end

    // Rectangular network traffic: NPK packets from each PE, random
    // destinations including itself; tag, source, sequence, payload.
    for (int d = 0; d < NPE; d++) n_to[d] = 0;
    for (int p = 0; p < NPK; p++)
      for (int s = 0; s < NPE; s++) begin
        int d;
        logic [7:0] b;
        d = (p == 0) ? s : ((p < 4) ? 0 : $urandom % NPE);   // early hot spot on PE 0
        if (d == s) n_self++;
        n_to[d]++;
        for (int i = 0; i < PKLEN; i++) begin
          b = (i == 0) ? rect_tag(d, 2) : (i == 1) ? 8'(s) : (i == 2) ? 8'(p) : 8'($urandom);
          srcq[s].push_back({(i == PKLEN - 1), b});
          exp_pk[d][s].push_back(b);
        end
      end

    // Triangular network traffic: each leaf to a neighbour and to the far
    // side, bytes pre-rotated for the path.
    for (int s = 0; s < NTRI; s++)
      for (int k = 0; k < 2; k++) begin
        int d;
        int unsigned h;
        d = (k == 0) ? (s ^ 1) : (s ^ 4);
        h = tri_hops(s, d, 3);
        if (h == 2) n_tri_turn++;
        if (h == 5) n_tri_root++;
        tsrcq[s].push_back({1'b0, tri_tag(s, d, 3)});
        tsrcq[s].push_back({1'b0, rot_back(8'(s), h - 1)});
        tsrcq[s].push_back({1'b1, rot_back(8'(k), h - 1)});
      end

    t_start = 32'($time);
    @(negedge clk);
    begin
      int busy;
      do begin
        @(negedge clk);
        busy = 0;
        for (int i = 0; i < NPE; i++) busy += pend[i] + srcq[i].size();
        for (int i = 0; i < NTRI; i++) busy += tpend[i] + tsrcq[i].size();
      end while (busy != 0);
    end
    repeat (400) @(negedge clk);
    t_end = 32'($time);

    // Halt all PEs and read back.
    for (int pe = 0; pe < NPE; pe++) sup(pe, 1, SP_CTRL, CR_CTRL, 16'h0, r);
    checks++;
    if (running != '0) begin failures++; $display("PEs not halted"); end
    for (int d = 0; d < NPE; d++) begin
      int unsigned idx [NPE];
      sup(d, 0, SP_REGS, 16'd3, 16'h0, r);
      expect_eq($sformatf("PE %0d packet count", d), r, 16'(n_to[d]));
      for (int s = 0; s < NPE; s++) idx[s] = 0;
      for (int k = 0; k < n_to[d]; k++) begin
        logic [7:0] pk [PKLEN];
        int s;
        for (int i = 0; i < PKLEN; i++) begin
          sup(d, 0, SP_DMEM, 16'(256 + k * PKLEN + i), 16'h0, r);
          pk[i] = r[7:0];
        end
        s = (int'(pk[1]) < NPE) ? int'(pk[1]) : 0;
        for (int i = 0; i < PKLEN; i++) begin
          checks++;
          if (idx[s] >= exp_pk[d][s].size() || pk[i] !== exp_pk[d][s][idx[s]]) begin
            failures++;
            $display("PE %0d packet %0d byte %0d: %h unexpected (source %0d)", d, k, i, pk[i], s);
          end
          idx[s]++;
        end
      end
      for (int s = 0; s < NPE; s++) expect_eq("bytes consumed", 16'(idx[s]), 16'(exp_pk[d][s].size()));
      expect_eq("nothing on port 1 out", 16'(
        (d == 0) ? g_pe_io[0].u_snk.got.size() : (d == 1) ? g_pe_io[1].u_snk.got.size() :
        (d == 2) ? g_pe_io[2].u_snk.got.size() : g_pe_io[3].u_snk.got.size()), 16'h0);
    end

    // Triangular network deliveries.
    for (int d = 0; d < NTRI; d++) begin
      expect_eq($sformatf("leaf %0d bytes", d), 16'(tgot[d].size()), 16'd6);
      for (int k = 0; k + 2 < tgot[d].size(); k += 3) begin
        int s;
        int unsigned h;
        s = int'(tgot[d][k+1][7:0]);
        if (s >= NTRI) s = 0;
        h = tri_hops(s, d, 3);
        expect_eq("tri source is a partner", 16'((s == (d ^ 1)) || (s == (d ^ 4))), 16'h1);
        expect_eq("tri header", 16'(tgot[d][k]), 16'({1'b0, rot_fwd(tri_tag(s, d, 3), h - 1)}));
        expect_eq("tri end", 16'(tgot[d][k+2]), 16'({1'b1, 8'((s == (d ^ 1)) ? 0 : 1)}));
      end
    end

    // Supervisor single step on PE 2.
    sup(2, 1, SP_CTRL, CR_MPC, 16'(P_LOOP), r);
    sup(2, 1, SP_CTRL, CR_CTRL, 16'h2, r);
    sup(2, 0, SP_CTRL, CR_MPC, 16'h0, r);
    expect_eq("MPC after step", r, 16'(P_LOOP + 1));
    n_step++;

    $display("traffic phase: %0d cycles", (t_end - t_start) / 10);
    $display("conflicts %0d, concurrent %0d, busy waits %0d, lastbyte branches %0d",
             n_conflict, n_concurrent, n_busy_wait, n_last_branch);
    $display("self packets %0d, tri turns %0d, tri root %0d, steps %0d",
             n_self, n_tri_turn, n_tri_root, n_step);
    checks++; if (n_conflict == 0)    begin failures++; $display("no router conflict"); end
    checks++; if (n_concurrent == 0)  begin failures++; $display("no concurrent router outputs"); end
    checks++; if (n_busy_wait == 0)   begin failures++; $display("no busy output wait"); end
    checks++; if (n_last_branch == 0) begin failures++; $display("no lastbyte branch"); end
    checks++; if (n_self == 0)        begin failures++; $display("no self packet"); end
    checks++; if (n_tri_turn == 0)    begin failures++; $display("no subtree turn"); end
    checks++; if (n_tri_root == 0)    begin failures++; $display("no root crossing"); end
    checks++; if (n_step == 0)        begin failures++; $display("no single step"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
