// soc_dft_top -- test infrastructure of a core-based SoC: core test wrappers on
// a shared TAM, and shared memory BIST for the embedded memories.
//
// Logic cores (dft_pkg core table, nine cores). Each core has either scan DFT
// or non-scan DFT (NS-DFT), as chosen for the 64-lane SoC. Every NS-DFT core
// sits in an ns_dft_wrapper whose mode is set by wmode[c]; the scan core has
// no wrapper, its functional pins pass straight through and its TAM lanes
// carry clock/reset/test-mode/scan-enable (4 lanes) and the scan chain inputs
// (scan_ctrl, scan_si), while its chain outputs (scan_so) return on the
// lanes above the 4 control lanes. tam_router maps the 64 test pins onto the
// cores' lanes; a core drives test outputs while its wmode is WM_TEST or
// WM_IN_IC (for the scan core: WM_TEST). The cores themselves are outside
// this module: their pins are the core_in/core_out ports, packed core 0
// first at the offsets given by dft_pkg::sum_before(CORE_PI/CORE_PO, c).
//
// Memories (dft_pkg memory table, ten single-port SRAMs). They are split into
// four BIST groups of serially connected memories, {1,2} {3,4} {5..8} {9,10}
// (numbered from 1), each served by one mbist_wrapper. Memories 3 and 4 run
// at 266 MHz on clk_fast, all others and the controller at 133 MHz on clk;
// the group on clk_fast is reached through synchronizers (start: 2 flops;
// done: 3 flops, one more than fail, so fail is settled when done arrives).
// One mbist_controller starts the groups per session; all four fit in one
// session under the power limit. A pulse on mbist_start runs the whole memory
// test; mbist_done/mbist_pass/mbist_fail_grp/mbist_fail_mem give the result
// (fail_mem valid while mbist_done is high). Outside the test the mem_* ports
// give functional access to each memory (address and data right-aligned in
// the widest word); scan_mode switches read data to the bypass flops.
//
// The pin counts, DFT choices, TAM widths, memory sizes and clocks follow the
// published design; lane offsets, grouping, sessions, handshake and the clock
// crossing are derived or chosen here (see the README).
module soc_dft_top
  import dft_pkg::*;
#(
  parameter int unsigned TAM_W   = SOC_TAM_W,
  parameter int unsigned NUM_BG  = 1,
  localparam int unsigned SUM_PI = sum_all(CORE_PI),
  localparam int unsigned SUM_PO = sum_all(CORE_PO),
  localparam int unsigned SUM_TW = sum_all(CORE_TW),
  localparam int unsigned SCAN_C = 6,                       // index of the scan core (No.7)
  localparam int unsigned NCHAIN = CORE_TW[SCAN_C] - SCAN_CTRL_LANES
) (
  input  logic                                   clk,
  input  logic                                   clk_fast,
  input  logic                                   rst_n,
  input  logic                                   scan_mode,
  // ---------------- logic cores and TAM
  input  wmode_e                                 wmode     [NUM_CORES],
  input  logic [TAM_W-1:0]                       tam_in,
  output logic [TAM_W-1:0]                       tam_out,
  input  logic [SUM_PI-1:0]                      func_in,
  output logic [SUM_PO-1:0]                      func_out,
  output logic [SUM_PI-1:0]                      core_in,
  input  logic [SUM_PO-1:0]                      core_out,
  output logic [SCAN_CTRL_LANES-1:0]             scan_ctrl,
  output logic [NCHAIN-1:0]                      scan_si,
  input  logic [NCHAIN-1:0]                      scan_so,
  // ---------------- memory BIST
  input  logic                                   mbist_start,
  output logic                                   mbist_busy,
  output logic                                   mbist_done,
  output logic                                   mbist_pass,
  output logic [NUM_GRP-1:0]                     mbist_fail_grp,
  output logic [NUM_MEM-1:0]                     mbist_fail_mem,
  // ---------------- functional memory ports
  input  logic [NUM_MEM-1:0]                     mem_ce,
  input  logic [NUM_MEM-1:0]                     mem_we,
  input  logic [NUM_MEM-1:0][MEM_MAX_AW-1:0]     mem_addr,
  input  logic [NUM_MEM-1:0][MEM_MAX_DW-1:0]     mem_wdata,
  output logic [NUM_MEM-1:0][MEM_MAX_DW-1:0]     mem_rdata
);

  // =================================================================== cores
  logic [NUM_CORES-1:0] core_act;
  logic [SUM_TW-1:0]    core_ti, core_to;

  tam_router #(.W(TAM_W), .NC(NUM_CORES), .TWC(CORE_TW), .LANE(CORE_LANE)) u_tam (
    .tam_in, .tam_out, .core_act, .core_ti, .core_to
  );

  for (genvar c = 0; c < NUM_CORES; c++) begin : g_core
    localparam int unsigned PI  = CORE_PI[c];
    localparam int unsigned PO  = CORE_PO[c];
    localparam int unsigned TW  = CORE_TW[c];
    localparam int unsigned OPI = sum_before(CORE_PI, c);
    localparam int unsigned OPO = sum_before(CORE_PO, c);
    localparam int unsigned OTW = sum_before(CORE_TW, c);

    if (CORE_DFT[c] == DFT_NS) begin : g_ns
      assign core_act[c] = (wmode[c] == WM_TEST) || (wmode[c] == WM_IN_IC);
      ns_dft_wrapper #(.NPI(PI), .NPO(PO), .TW(TW)) u_wrap (
        .mode     (wmode[c]),
        .func_in  (func_in [OPI +: PI]),
        .func_out (func_out[OPO +: PO]),
        .core_in  (core_in [OPI +: PI]),
        .core_out (core_out[OPO +: PO]),
        .test_in  (core_ti [OTW +: TW]),
        .test_out (core_to [OTW +: TW])
      );
    end else begin : g_scan
      assign core_act[c]            = (wmode[c] == WM_TEST);
      assign core_in [OPI +: PI]    = func_in [OPI +: PI];
      assign func_out[OPO +: PO]    = core_out[OPO +: PO];
      assign scan_ctrl              = core_ti[OTW +: SCAN_CTRL_LANES];
      assign scan_si                = core_ti[OTW + SCAN_CTRL_LANES +: NCHAIN];
      assign core_to[OTW +: TW]     = {scan_so, {SCAN_CTRL_LANES{1'b0}}};
    end
  end

  // =================================================================== memory BIST
  logic [NUM_GRP-1:0] grp_start, grp_done, grp_fail;

  mbist_controller #(.NG(NUM_GRP), .NSESS(1), .SESS(GRP_SESS)) u_ctrl (
    .clk, .rst_n,
    .start     (mbist_start),
    .busy      (mbist_busy),
    .done      (mbist_done),
    .pass      (mbist_pass),
    .fail_grp  (mbist_fail_grp),
    .grp_start (grp_start),
    .grp_done  (grp_done),
    .grp_fail  (grp_fail)
  );

  for (genvar g = 0; g < NUM_GRP; g++) begin : g_grp
    localparam int unsigned F    = GRP_FIRST[g];
    localparam int unsigned K    = GRP_K[g];
    localparam int unsigned DW   = MEM_DW[F];
    localparam int unsigned WDS  = MEM_WORDS[F];
    localparam int unsigned AW   = $clog2(WDS);
    localparam bit          FAST = (MEM_MHZ[F] != MEM_MHZ[0]);

    logic                 gclk;
    logic                 w_start, w_done, w_fail;
    logic [K-1:0]         w_fail_mem;
    logic [K-1:0]         f_ce, f_we, m_ce, m_we;
    logic [K-1:0][AW-1:0] f_addr, m_addr;
    logic [K-1:0][DW-1:0] f_wdata, f_rdata, m_wdata, m_rdata;

    if (FAST) begin : g_cdc
      logic done_s, done_s2;
      assign gclk = clk_fast;
      sync2 u_sync_start (.clk(clk_fast), .rst_n, .d(grp_start[g]), .q(w_start));
      sync2 u_sync_done  (.clk(clk),      .rst_n, .d(w_done),       .q(done_s));
      sync2 u_sync_fail  (.clk(clk),      .rst_n, .d(w_fail),       .q(grp_fail[g]));
      always_ff @(posedge clk or negedge rst_n)
        if (!rst_n) done_s2 <= 1'b0;
        else        done_s2 <= done_s;
      assign grp_done[g] = done_s2;
    end else begin : g_sync
      assign gclk        = clk;
      assign w_start     = grp_start[g];
      assign grp_done[g] = w_done;
      assign grp_fail[g] = w_fail;
    end

    mbist_wrapper #(.CONN(CONN_SERIAL), .K(K), .AW(AW), .DW(DW), .NUM_BG(NUM_BG)) u_wrap (
      .clk (gclk), .rst_n,
      .start (w_start), .done (w_done), .fail (w_fail), .fail_mem (w_fail_mem),
      .scan_mode,
      .f_ce, .f_we, .f_addr, .f_wdata, .f_rdata,
      .m_ce, .m_we, .m_addr, .m_wdata, .m_rdata
    );

    for (genvar k = 0; k < K; k++) begin : g_mem
      assign f_ce[k]    = mem_ce[F + k];
      assign f_we[k]    = mem_we[F + k];
      assign f_addr[k]  = mem_addr[F + k][AW-1:0];
      assign f_wdata[k] = mem_wdata[F + k][DW-1:0];
      assign mem_rdata[F + k]      = MEM_MAX_DW'(f_rdata[k]);
      assign mbist_fail_mem[F + k] = w_fail_mem[k];

      sram_sp #(.WORDS(WDS), .DW(DW)) u_mem (
        .clk (gclk), .ce (m_ce[k]), .we (m_we[k]), .addr (m_addr[k]),
        .wdata (m_wdata[k]), .rdata (m_rdata[k])
      );
    end
  end

endmodule
