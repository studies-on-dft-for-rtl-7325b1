// tb_mbist_wrapper -- self-checking test of the shared memory BIST wrapper.
//
// Wrappers run side by side on small memories:
//   u_ser: serial connection, 4 memories of 32 words x 8 bits tested as one
//          memory of 128 words with 2 select bits and one 8-bit generator and
//          analyzer (the example the serial connection is introduced with),
//          three data backgrounds;
//   u_par: parallel connection, 3 memories of 16 words, 16, 8 and 12 bits
//          wide (the unused upper read bits of the narrow ones are tied to 1).
// Checked against values worked out here, not taken from the wrapper:
// functional access around the wrapper, the scan bypass flops, the test
// length (8 * words * backgrounds + 2 edges to done), the number of reads and
// writes each memory sees (5 and 3 per word per background for March Y),
// one memory active at a time in the serial group, the memory contents left
// behind, a clean pass on good memories, and the fail flag of exactly the
// memory whose read data bit is forced stuck. A third wrapper (u_uneq)
// chains serially three 8-bit memories of 16, 8 and 12 words and runs two
// backgrounds; it checks the length 8 * 36 * 2 + 2, that no access goes
// beyond a memory's depth, and the checkerboard left in the last memory.
`timescale 1ns/1ps
module tb_mbist_wrapper;
  import dft_pkg::*;

  localparam int unsigned SK = 4, SAW = 5, SDW = 8, SBG = 3;   // 4 x (8 bits x 32 words)
  localparam int unsigned PK = 3, PAW = 4, PDW = 16, PBG = 1;
  localparam int unsigned PW [PK] = '{16, 8, 12};

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // ------------------------------------------------ serial group
  logic s_start, s_done, s_fail, s_scan;
  logic [SK-1:0] s_fail_mem, s_fce, s_fwe, s_mce, s_mwe;
  logic [SK-1:0][SAW-1:0] s_faddr, s_maddr;
  logic [SK-1:0][SDW-1:0] s_fwd, s_frd, s_mwd, s_mrd;

  mbist_wrapper #(.CONN(CONN_SERIAL), .K(SK), .AW(SAW), .DW(SDW), .NUM_BG(SBG)) u_ser (
    .clk, .rst_n, .start(s_start), .done(s_done), .fail(s_fail), .fail_mem(s_fail_mem),
    .scan_mode(s_scan), .f_ce(s_fce), .f_we(s_fwe), .f_addr(s_faddr), .f_wdata(s_fwd),
    .f_rdata(s_frd), .m_ce(s_mce), .m_we(s_mwe), .m_addr(s_maddr), .m_wdata(s_mwd),
    .m_rdata(s_mrd));

  for (genvar k = 0; k < SK; k++) begin : g_smem
    sram_sp #(.WORDS(2**SAW), .DW(SDW)) u_mem (.clk, .ce(s_mce[k]), .we(s_mwe[k]),
      .addr(s_maddr[k]), .wdata(s_mwd[k]), .rdata(s_mrd[k]));
  end

  // ------------------------------------------------ parallel group
  logic p_start, p_done, p_fail;
  logic [PK-1:0] p_fail_mem, p_mce, p_mwe;
  logic [PK-1:0][PAW-1:0] p_maddr;
  logic [PK-1:0][PDW-1:0] p_frd, p_mwd, p_mrd;
  logic [7:0]  p_rd1;
  logic [11:0] p_rd2;

  mbist_wrapper #(.CONN(CONN_PARALLEL), .K(PK), .AW(PAW), .DW(PDW), .NUM_BG(PBG),
                  .BIT_W(PW)) u_par (
    .clk, .rst_n, .start(p_start), .done(p_done), .fail(p_fail), .fail_mem(p_fail_mem),
    .scan_mode(1'b0), .f_ce('0), .f_we('0), .f_addr('0), .f_wdata('0),
    .f_rdata(p_frd), .m_ce(p_mce), .m_we(p_mwe), .m_addr(p_maddr), .m_wdata(p_mwd),
    .m_rdata(p_mrd));

  sram_sp #(.WORDS(2**PAW), .DW(16)) u_pm0 (.clk, .ce(p_mce[0]), .we(p_mwe[0]),
    .addr(p_maddr[0]), .wdata(p_mwd[0]), .rdata(p_mrd[0]));
  sram_sp #(.WORDS(2**PAW), .DW(8)) u_pm1 (.clk, .ce(p_mce[1]), .we(p_mwe[1]),
    .addr(p_maddr[1]), .wdata(p_mwd[1][7:0]), .rdata(p_rd1));
  sram_sp #(.WORDS(2**PAW), .DW(12)) u_pm2 (.clk, .ce(p_mce[2]), .we(p_mwe[2]),
    .addr(p_maddr[2]), .wdata(p_mwd[2][11:0]), .rdata(p_rd2));
  assign p_mrd[1] = {8'hFF, p_rd1};
  assign p_mrd[2] = {4'hF, p_rd2};

  // ------------------------------------------------ serial group, unequal depths
  localparam int unsigned UK = 3, UAW = 4, UDW = 8;
  localparam int unsigned UD [UK] = '{16, 8, 12};
  logic u_start, u_done, u_fail;
  logic [UK-1:0] u_fail_mem, u_mce, u_mwe;
  logic [UK-1:0][UAW-1:0] u_maddr;
  logic [UK-1:0][UDW-1:0] u_frd, u_mwd, u_mrd;

  mbist_wrapper #(.CONN(CONN_SERIAL), .K(UK), .AW(UAW), .DW(UDW), .NUM_BG(2), .DEPTH(UD)) u_uneq (
    .clk, .rst_n, .start(u_start), .done(u_done), .fail(u_fail), .fail_mem(u_fail_mem),
    .scan_mode(1'b0), .f_ce('0), .f_we('0), .f_addr('0), .f_wdata('0),
    .f_rdata(u_frd), .m_ce(u_mce), .m_we(u_mwe), .m_addr(u_maddr), .m_wdata(u_mwd),
    .m_rdata(u_mrd));

  sram_sp #(.WORDS(16), .DW(UDW)) u_um0 (.clk, .ce(u_mce[0]), .we(u_mwe[0]),
    .addr(u_maddr[0]), .wdata(u_mwd[0]), .rdata(u_mrd[0]));
  sram_sp #(.WORDS(8), .DW(UDW)) u_um1 (.clk, .ce(u_mce[1]), .we(u_mwe[1]),
    .addr(u_maddr[1][2:0]), .wdata(u_mwd[1]), .rdata(u_mrd[1]));
  sram_sp #(.WORDS(12), .DW(UDW)) u_um2 (.clk, .ce(u_mce[2]), .we(u_mwe[2]),
    .addr(u_maddr[2]), .wdata(u_mwd[2]), .rdata(u_mrd[2]));

  int u_rd [UK], u_wr [UK];
  int u_oob, u_multi;
  always @(posedge clk) begin
    if ($countones(u_mce) > 1) u_multi++;
    for (int k = 0; k < UK; k++) if (u_mce[k]) begin
      if (u_mwe[k]) u_wr[k]++; else u_rd[k]++;
      if (int'(u_maddr[k]) >= int'(UD[k])) u_oob++;
    end
  end

  task automatic run_uneq(output int cyc);
    u_oob = 0; u_multi = 0;
    for (int k = 0; k < UK; k++) begin u_rd[k] = 0; u_wr[k] = 0; end
    @(negedge clk); u_start = 1'b1;
    cyc = 0;
    while (!u_done && cyc < 100000) begin @(posedge clk); #1; cyc++; end
    @(negedge clk); u_start = 1'b0;
    @(negedge clk);
  endtask

  // ------------------------------------------------ access monitors
  int s_rd [SK], s_wr [SK], p_rd [PK], p_wr [PK];
  int s_multi;
  always @(posedge clk) begin
    if ($countones(s_mce) > 1) s_multi++;
    for (int k = 0; k < SK; k++) if (s_mce[k]) begin
      if (s_mwe[k]) s_wr[k]++; else s_rd[k]++;
    end
    for (int k = 0; k < PK; k++) if (p_mce[k]) begin
      if (p_mwe[k]) p_wr[k]++; else p_rd[k]++;
    end
  end

  task automatic clear_counts();
    s_multi = 0;
    for (int k = 0; k < SK; k++) begin s_rd[k] = 0; s_wr[k] = 0; end
    for (int k = 0; k < PK; k++) begin p_rd[k] = 0; p_wr[k] = 0; end
  endtask

  // background word of the last background used, independent model
  function automatic logic [15:0] exp_bg(input int b, input int addr);
    logic [15:0] chk;
    for (int i = 0; i < 16; i++) chk[i] = logic'(i % 2) ^ logic'(addr % 2);
    if (b == 0) return 16'h0;
    if (b == 1) return chk;
    return ~chk;
  endfunction

  // run both groups; return cycles from start to done
  task automatic run_both(output int s_cyc, output int p_cyc);
    bit sd, pd;
    s_cyc = 0; p_cyc = 0; sd = 0; pd = 0;
    clear_counts();
    @(negedge clk);
    s_start = 1'b1; p_start = 1'b1;
    while (!(sd && pd)) begin
      @(posedge clk); #1;
      if (!sd) s_cyc++;
      if (!pd) p_cyc++;
      if (s_done) sd = 1;
      if (p_done) pd = 1;
      if (s_cyc > 100000) break;
    end
  endtask

  task automatic release_both();
    @(negedge clk);
    s_start = 1'b0; p_start = 1'b0;
    @(posedge clk); #1;
    check(!s_done && !p_done, "done drops one edge after start is released");
  endtask

  int sc, pc;
  initial begin
    s_start = 0; p_start = 0; s_scan = 0; u_start = 0;
    s_fce = '0; s_fwe = '0; s_faddr = '0; s_fwd = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);

    // functional write then read through the wrapper (memory 2, address 5)
    s_fce[2] = 1; s_fwe[2] = 1; s_faddr[2] = 5'd5; s_fwd[2] = 8'hEF;
    @(negedge clk);
    s_fwe[2] = 0; s_fwd[2] = '0;
    @(negedge clk);
    s_fce[2] = 0;
    check(s_frd[2] == 8'hEF, "functional write/read through the wrapper");

    // scan bypass: read data comes from the bypass flops
    s_scan = 1; s_fce[1] = 1; s_fwe[1] = 1; s_faddr[1] = 5'd3; s_fwd[1] = 8'h34;
    @(negedge clk);
    s_fce[1] = 0;
    check(s_frd[1] == (8'h34 ^ 8'h03 ^ 8'hFF), "bypass flops capture wdata^addr^we");
    s_scan = 0;
    @(negedge clk);

    // ---- fault-free run
    run_both(sc, pc);
    check(sc == 8 * SK * (2**SAW) * SBG + 2, $sformatf("serial test length %0d", sc));
    check(pc == 8 * (2**PAW) * PBG + 2, $sformatf("parallel test length %0d", pc));
    check(!s_fail && s_fail_mem == '0, "serial group passes on good memories");
    check(!p_fail && p_fail_mem == '0, "parallel group passes on good memories");
    check(s_multi == 0, "serial group: one memory active at a time");
    for (int k = 0; k < SK; k++) begin
      check(s_rd[k] == 5 * (2**SAW) * SBG && s_wr[k] == 3 * (2**SAW) * SBG,
            $sformatf("serial mem %0d: %0d reads %0d writes", k, s_rd[k], s_wr[k]));
    end
    for (int k = 0; k < PK; k++) begin
      check(p_rd[k] == 5 * (2**PAW) && p_wr[k] == 3 * (2**PAW),
            $sformatf("parallel mem %0d: %0d reads %0d writes", k, p_rd[k], p_wr[k]));
    end
    for (int a = 0; a < 2**SAW; a++) begin
      logic [15:0] e;
      e = exp_bg(SBG - 1, a);
      check(g_smem[3].u_mem.mem[a] == e[SDW-1:0], $sformatf("serial mem 3 word %0d", a));
    end
    for (int a = 0; a < 2**PAW; a++)
      check(u_pm1.mem[a] == 8'h00, $sformatf("parallel mem 1 word %0d", a));
    release_both();

    // ---- stuck-at faults on one read data bit of one memory per group
    force g_smem[2].u_mem.rdata[5] = 1'b1;
    force u_pm1.rdata[3] = 1'b0;
    run_both(sc, pc);
    check(s_fail && s_fail_mem == 4'b0100, $sformatf("serial fault located: %b", s_fail_mem));
    check(p_fail && p_fail_mem == 3'b010, $sformatf("parallel fault located: %b", p_fail_mem));
    release_both();
    release g_smem[2].u_mem.rdata[5];
    release u_pm1.rdata[3];

    // ---- a fault in an unused upper bit of a narrow memory is not a failure,
    //      a fault in its top real bit is
    force u_pm2.rdata[11] = 1'b1;
    run_both(sc, pc);
    check(!s_fail, "serial group passes again after release");
    check(p_fail_mem == 3'b100, $sformatf("parallel fault in bit 11 of 12-bit memory: %b", p_fail_mem));
    release_both();
    release u_pm2.rdata[11];

    // ---- serial group with memories of 16, 8 and 12 words
    run_uneq(sc);
    check(sc == 8 * (16 + 8 + 12) * 2 + 2, $sformatf("unequal-depth serial test length %0d", sc));
    check(!u_fail, "unequal-depth serial group passes");
    check(u_oob == 0 && u_multi == 0, "no access beyond a memory's depth, one memory at a time");
    for (int k = 0; k < UK; k++)
      check(u_rd[k] == 5 * int'(UD[k]) * 2 && u_wr[k] == 3 * int'(UD[k]) * 2,
            $sformatf("unequal-depth mem %0d: %0d reads %0d writes", k, u_rd[k], u_wr[k]));
    for (int a = 0; a < 12; a++)
      check(u_um2.mem[a] == ((a % 2) ? 8'h55 : 8'hAA), $sformatf("unequal-depth mem 2 word %0d", a));
    force u_um2.rdata[2] = 1'b0;
    run_uneq(sc);
    check(u_fail_mem == 3'b100, $sformatf("unequal-depth fault located: %b", u_fail_mem));
    release u_um2.rdata[2];

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
