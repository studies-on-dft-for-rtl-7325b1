// tb_soc_dft_top -- end-to-end test of the SoC test infrastructure at its
// default size (no parameter overrides): 64 TAM lanes, nine cores, ten
// memories in four BIST groups, two memory clocks (133 and 266 MHz).
//
// Toy core models close the loop behind the wrappers (each core output bit is
// the XOR of two core input bits; the scan core returns its chain inputs
// inverted). The test:
//   1. writes and reads every memory through the functional ports, and checks
//      the scan bypass of one memory;
//   2. runs the complete memory BIST, checks the pass and the test length in
//      clk cycles worked out from March Y (8N) and the handshake, and that the
//      266 MHz group finished through the clock-domain crossing;
//   3. forces stuck read bits in memory 4 (266 MHz group) and memory 6, reruns
//      and checks that exactly those memories and groups are reported; then
//      releases and reruns for a pass;
//   4. walks the core test sessions of the 64-lane schedule: cores of a
//      session in test mode, all others isolated; checks the decoded core
//      inputs, the isolated inputs and the merged test outputs against a
//      reference decoder/encoder written here;
//   5. runs input and output interconnect tests and normal mode on every
//      wrapped core.
// Each mechanism (every wrapper mode, concurrent cores sharing the TAM, the
// scan core on its lanes, BIST pass, BIST fault detection, the clock
// crossing, the bypass) is counted, and one that never happened is a failure.
`timescale 1ns/1ps
module tb_soc_dft_top;
  import dft_pkg::*;

  localparam int unsigned SUM_PI = sum_all(CORE_PI);
  localparam int unsigned SUM_PO = sum_all(CORE_PO);
  localparam int unsigned SC     = 6;                          // scan core
  localparam int unsigned NCH    = CORE_TW[SC] - SCAN_CTRL_LANES;

  logic clk = 1'b0, clk_fast = 1'b0, rst_n = 1'b0;
  always #3.75  clk = ~clk;          // 133 MHz
  always #1.875 clk_fast = ~clk_fast; // 266 MHz

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // ------------------------------------------------ DUT
  logic scan_mode;
  wmode_e wmode [NUM_CORES];
  logic [SOC_TAM_W-1:0] tam_in, tam_out;
  logic [SUM_PI-1:0] func_in, core_in;
  logic [SUM_PO-1:0] func_out, core_out;
  logic [SCAN_CTRL_LANES-1:0] scan_ctrl;
  logic [NCH-1:0] scan_si, scan_so;
  logic mbist_start, mbist_busy, mbist_done, mbist_pass;
  logic [NUM_GRP-1:0] mbist_fail_grp;
  logic [NUM_MEM-1:0] mbist_fail_mem, mem_ce, mem_we;
  logic [NUM_MEM-1:0][MEM_MAX_AW-1:0] mem_addr;
  logic [NUM_MEM-1:0][MEM_MAX_DW-1:0] mem_wdata, mem_rdata;

  soc_dft_top dut (
    .clk, .clk_fast, .rst_n, .scan_mode,
    .wmode, .tam_in, .tam_out, .func_in, .func_out, .core_in, .core_out,
    .scan_ctrl, .scan_si, .scan_so,
    .mbist_start, .mbist_busy, .mbist_done, .mbist_pass, .mbist_fail_grp, .mbist_fail_mem,
    .mem_ce, .mem_we, .mem_addr, .mem_wdata, .mem_rdata);

  // ------------------------------------------------ toy cores
  always_comb begin
    core_out = '0;
    for (int c = 0; c < NUM_CORES; c++) begin
      int opi, opo;
      opi = sum_before(CORE_PI, c);
      opo = sum_before(CORE_PO, c);
      for (int o = 0; o < int'(CORE_PO[c]); o++)
        core_out[opo + o] = core_in[opi + (o % CORE_PI[c])] ^ core_in[opi + ((3 * o + 1) % CORE_PI[c])];
    end
  end
  assign scan_so = ~scan_si;

  // ------------------------------------------------ reference decoder / encoder
  typedef logic [511:0] wide_t;

  function automatic wide_t ref_dec(input wide_t t, input int tw, input int n);
    wide_t d = '0;
    for (int i = 0; i < n; i++) begin
      d[i] = t[i % tw];
      if (i >= tw) d[i] = t[i % tw] ^ t[((i % tw) + 1 + ((i / tw - 1) % (tw - 1))) % tw];
    end
    return d;
  endfunction

  function automatic wide_t ref_enc(input wide_t x, input int n, input int tw);
    wide_t r = '0;
    for (int i = 0; i < n; i++) r[i % tw] ^= x[i];
    return r;
  endfunction

  function automatic wide_t ref_core(input wide_t ci, input int npi, input int npo);
    wide_t co = '0;
    for (int o = 0; o < npo; o++) co[o] = ci[o % npi] ^ ci[(3 * o + 1) % npi];
    return co;
  endfunction

  // ------------------------------------------------ mechanism counters
  int n_mode [5];
  int n_concurrent, n_scan_core, n_bist_pass, n_bist_fault, n_cdc, n_bypass;

  // the 266 MHz group finishing, seen in the 133 MHz domain
  logic cdc_prev;
  always @(posedge clk) begin
    cdc_prev <= dut.grp_done[1];
    if (dut.grp_done[1] && !cdc_prev) n_cdc++;
  end

  // ------------------------------------------------ memory helpers
  function automatic bit is_fast(input int m);
    return MEM_MHZ[m] != MEM_MHZ[0];
  endfunction

  task automatic mem_cycle(input int m);
    if (is_fast(m)) @(negedge clk_fast); else @(negedge clk);
  endtask

  task automatic mem_write(input int m, input int a, input logic [31:0] d);
    mem_cycle(m);
    mem_ce[m] = 1; mem_we[m] = 1; mem_addr[m] = MEM_MAX_AW'(a); mem_wdata[m] = d;
    mem_cycle(m);
    mem_ce[m] = 0; mem_we[m] = 0;
  endtask

  task automatic mem_read(input int m, input int a, output logic [31:0] d);
    mem_cycle(m);
    mem_ce[m] = 1; mem_we[m] = 0; mem_addr[m] = MEM_MAX_AW'(a);
    mem_cycle(m);
    mem_ce[m] = 0;
    d = mem_rdata[m];
  endtask

  function automatic logic [31:0] mask_dw(input int m, input logic [31:0] d);
    return (MEM_DW[m] >= 32) ? d : (d & ((32'd1 << MEM_DW[m]) - 1));
  endfunction

  // longest group, in clk cycles: the slow groups {5..8} and {9,10} both hold
  // 1024 words; the 266 MHz group needs 8*256 fast cycles = 1024 clk cycles
  localparam int N_LONG = 1024;
  // start pulse sampled (1), grp_start register (1), wrapper 8N + 2,
  // done seen and release (1), done low (1), low seen and finish (1); the
  // release is stretched by the 266 MHz group: its falling start crosses two
  // clk_fast flops (one clk cycle), done falls on the next clk_fast edge and
  // crosses three clk flops, which is 3 clk cycles more than a 133 MHz group
  localparam int CDC_RELEASE = 3;
  localparam int EXP_BIST = 1 + 1 + 8 * N_LONG + 2 + 1 + 1 + 1 + CDC_RELEASE;

  task automatic run_bist(output int cyc);
    @(negedge clk); mbist_start = 1;
    @(negedge clk); mbist_start = 0;
    cyc = 1;
    while (!mbist_done && cyc < 100000) begin @(negedge clk); cyc++; end
  endtask

  // ------------------------------------------------ core-test helpers
  localparam int NSES = 8;
  localparam logic [8:0] SES [NSES] = '{
    9'b001000000, 9'b100100000, 9'b100000000, 9'b010000000,
    9'b000010011, 9'b000010000, 9'b000000100, 9'b000001000 };

  task automatic all_modes(input wmode_e m);
    for (int c = 0; c < NUM_CORES; c++) wmode[c] = m;
  endtask

  task automatic count_modes();
    for (int c = 0; c < NUM_CORES; c++) if (CORE_DFT[c] == DFT_NS) n_mode[int'(wmode[c])]++;
  endtask

  task automatic random_pins();
    for (int b = 0; b < SOC_TAM_W; b++) tam_in[b] = 1'($urandom);
    for (int b = 0; b < int'(SUM_PI); b++) func_in[b] = 1'($urandom);
  endtask

  // ------------------------------------------------ main sequence
  int cyc;
  logic [31:0] rd;
  logic [31:0] wr_pat [NUM_MEM];

  initial begin
    scan_mode = 0; mbist_start = 0;
    mem_ce = '0; mem_we = '0; mem_addr = '0; mem_wdata = '0;
    tam_in = '0; func_in = '0;
    all_modes(WM_NORMAL);
    repeat (4) @(posedge clk);
    rst_n = 1;
    repeat (2) @(posedge clk);

    // 1. functional access and bypass
    for (int m = 0; m < NUM_MEM; m++) begin
      wr_pat[m] = $urandom;
      mem_write(m, MEM_WORDS[m] - 1, wr_pat[m]);
    end
    for (int m = 0; m < NUM_MEM; m++) begin
      mem_read(m, MEM_WORDS[m] - 1, rd);
      check(rd == mask_dw(m, wr_pat[m]), $sformatf("functional access memory %0d", m + 1));
    end
    scan_mode = 1;
    mem_write(8, 5, 32'hCAFE_0001);
    check(mem_rdata[8] == (32'hCAFE_0001 ^ 32'd5 ^ 32'hFFFF_FFFF), "bypass flops in scan mode");
    if (mem_rdata[8] == (32'hCAFE_0001 ^ 32'd5 ^ 32'hFFFF_FFFF)) n_bypass++;
    scan_mode = 0;

    // 2. memory BIST, good memories
    run_bist(cyc);
    check(mbist_done && mbist_pass && mbist_fail_mem == '0, "memory BIST passes");
    check(cyc == EXP_BIST, $sformatf("memory BIST length %0d clk cycles, expected %0d", cyc, EXP_BIST));
    if (mbist_pass) n_bist_pass++;
    mem_read(0, 3, rd);
    check(rd == 32'h0, "memory holds the final March background after BIST");

    // 3. stuck read bits in memory 4 (fast group) and memory 6
    force dut.g_grp[1].g_mem[1].u_mem.rdata[0] = 1'b1;
    force dut.g_grp[2].g_mem[1].u_mem.rdata[7] = 1'b1;
    run_bist(cyc);
    check(mbist_done && !mbist_pass, "memory BIST fails on faulty memories");
    check(mbist_fail_mem == 10'b00_0010_1000, $sformatf("faulty memories located: %b", mbist_fail_mem));
    check(mbist_fail_grp == 4'b0110, $sformatf("faulty groups: %b", mbist_fail_grp));
    if (!mbist_pass && mbist_fail_mem == 10'b00_0010_1000) n_bist_fault++;
    release dut.g_grp[1].g_mem[1].u_mem.rdata[0];
    release dut.g_grp[2].g_mem[1].u_mem.rdata[7];
    run_bist(cyc);
    check(mbist_pass, "memory BIST passes again after the faults are removed");

    // 4. core test sessions on the shared TAM
    for (int it = 0; it < 4 * NSES; it++) begin
      int s, nact;
      wide_t exp_out;
      s = it % NSES;
      nact = 0;
      for (int c = 0; c < NUM_CORES; c++) wmode[c] = SES[s][c] ? WM_TEST : WM_ISOLATE;
      random_pins();
      #1;
      count_modes();
      exp_out = '0;
      for (int c = 0; c < NUM_CORES; c++) begin
        int opi, lane, tw;
        wide_t lanes, dec, ci;
        opi = sum_before(CORE_PI, c);
        lane = CORE_LANE[c]; tw = CORE_TW[c];
        lanes = wide_t'(tam_in >> lane) & ((wide_t'(1) << tw) - 1);
        if (CORE_DFT[c] == DFT_SCAN) begin
          if (SES[s][c]) begin
            check(scan_ctrl == lanes[SCAN_CTRL_LANES-1:0], "scan core control lanes");
            check(scan_si == lanes[SCAN_CTRL_LANES +: NCH], "scan core chain inputs");
            exp_out |= wide_t'({~lanes[SCAN_CTRL_LANES +: NCH], 4'b0000}) << lane;
            n_scan_core++;
            nact++;
          end
        end else begin
          ci = '0;
          for (int b = 0; b < int'(CORE_PI[c]); b++) ci[b] = core_in[opi + b];
          if (SES[s][c]) begin
            dec = ref_dec(lanes, tw, CORE_PI[c]);
            check(ci == dec, $sformatf("session %0d core %0d decoded inputs", s, c + 1));
            exp_out |= ref_enc(ref_core(dec, CORE_PI[c], CORE_PO[c]),
                               (CORE_PI[c] > CORE_PO[c]) ? CORE_PI[c] : CORE_PO[c], tw) << lane;
            nact++;
          end else begin
            check(ci == '0, $sformatf("session %0d core %0d isolated", s, c + 1));
          end
        end
      end
      check(tam_out == exp_out[SOC_TAM_W-1:0], $sformatf("session %0d merged test outputs", s));
      if (nact > 1) n_concurrent++;
    end

    // 5. interconnect tests and normal mode, one core at a time
    for (int c = 0; c < NUM_CORES; c++) begin
      int opi, opo, lane, tw, mw;
      wide_t lanes, fi, fo, co;
      if (CORE_DFT[c] != DFT_NS) continue;
      opi = sum_before(CORE_PI, c); opo = sum_before(CORE_PO, c);
      lane = CORE_LANE[c]; tw = CORE_TW[c];
      mw = (CORE_PI[c] > CORE_PO[c]) ? CORE_PI[c] : CORE_PO[c];

      // input interconnect: functional inputs observed on the lanes
      all_modes(WM_ISOLATE); wmode[c] = WM_IN_IC;
      random_pins(); #1; count_modes();
      fi = '0;
      for (int b = 0; b < int'(CORE_PI[c]); b++) fi[b] = func_in[opi + b];
      check(tam_out == SOC_TAM_W'(ref_enc(fi, mw, tw) << lane), $sformatf("core %0d input interconnect", c + 1));

      // output interconnect: lanes control the functional outputs
      all_modes(WM_ISOLATE); wmode[c] = WM_OUT_IC;
      random_pins(); #1; count_modes();
      lanes = wide_t'(tam_in >> lane) & ((wide_t'(1) << tw) - 1);
      fo = '0;
      for (int b = 0; b < int'(CORE_PO[c]); b++) fo[b] = func_out[opo + b];
      check(fo == (ref_dec(lanes, tw, mw) & ((wide_t'(1) << CORE_PO[c]) - 1)),
            $sformatf("core %0d output interconnect", c + 1));
      check(tam_out == '0, $sformatf("core %0d: no test output in output interconnect mode", c + 1));

      // normal mode: functional pins reach the core and back
      all_modes(WM_NORMAL);
      random_pins(); #1; count_modes();
      fi = '0; fo = '0;
      for (int b = 0; b < int'(CORE_PI[c]); b++) fi[b] = func_in[opi + b];
      for (int b = 0; b < int'(CORE_PO[c]); b++) fo[b] = func_out[opo + b];
      co = ref_core(fi, CORE_PI[c], CORE_PO[c]);
      check(fo == co, $sformatf("core %0d normal mode", c + 1));
    end

    // mechanisms
    check(n_mode[int'(WM_NORMAL)]  > 0, "normal mode used");
    check(n_mode[int'(WM_TEST)]    > 0, "test mode used");
    check(n_mode[int'(WM_ISOLATE)] > 0, "isolation mode used");
    check(n_mode[int'(WM_IN_IC)]   > 0, "input interconnect test used");
    check(n_mode[int'(WM_OUT_IC)]  > 0, "output interconnect test used");
    check(n_concurrent > 0, "concurrent cores on the TAM");
    check(n_scan_core > 0, "scan core tested on its lanes");
    check(n_bist_pass > 0, "memory BIST pass");
    check(n_bist_fault > 0, "memory BIST fault detection");
    check(n_cdc > 0, "BIST handshake across the 266 MHz domain");
    check(n_bypass > 0, "memory bypass in scan mode");
    $display("mechanisms: modes N/T/I/II/OI = %0d/%0d/%0d/%0d/%0d concurrent=%0d scan=%0d bist_pass=%0d bist_fault=%0d cdc=%0d bypass=%0d",
             n_mode[0], n_mode[1], n_mode[2], n_mode[3], n_mode[4], n_concurrent, n_scan_core,
             n_bist_pass, n_bist_fault, n_cdc, n_bypass);
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
