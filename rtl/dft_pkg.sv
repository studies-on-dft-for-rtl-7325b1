// dft_pkg -- types and constants shared by the SoC test infrastructure.
//
// Holds the wrapper-mode encoding of the NS-DFT core wrapper, the connection
// type of a shared memory BIST wrapper, and two configuration tables:
//   * the nine cores of the SoC with their pin counts, the DFT chosen for the
//     64-lane configuration (SoC4, scan and NS-DFT mixed) and the TAM lanes
//     the schedule gives them;
//   * the ten embedded memories (width, depth, clock) and the BIST group each
//     belongs to.
// Pin counts, widths, depths, clocks and the chosen DFTs and TAM widths follow
// the published design; the lane offsets and the memory grouping are derived
// from its schedule and its compatibility rules (see the README).
package dft_pkg;

  // ---------------------------------------------------------------- NS-DFT wrapper
  typedef enum logic [2:0] {
    WM_NORMAL  = 3'd0,  // functional pins <-> core
    WM_TEST    = 3'd1,  // decoded test inputs -> core, encoded core outputs -> test outputs
    WM_ISOLATE = 3'd2,  // core inputs and functional outputs held at 0
    WM_IN_IC   = 3'd3,  // functional inputs -> encoder -> test outputs
    WM_OUT_IC  = 3'd4   // test inputs -> decoder -> functional outputs
  } wmode_e;

  // ---------------------------------------------------------------- memory BIST
  typedef enum logic {
    CONN_PARALLEL = 1'b0,  // same depth: one address/data generator, all memories at once
    CONN_SERIAL   = 1'b1   // same width: memories tested one after the other
  } conn_e;

  // March Y, 8N: {up(w0); up(r0,w1,r1); down(r1,w0,r0); up(r0)}
  localparam int unsigned MARCH_ELEMS = 4;

  // ---------------------------------------------------------------- cores (SoC4)
  localparam int unsigned NUM_CORES = 9;
  localparam int unsigned SOC_TAM_W = 64;

  typedef enum logic { DFT_SCAN = 1'b0, DFT_NS = 1'b1 } dft_e;

  // index 0..8 = core No.1..9: Gcd, Iir, Jwf, Lwf, Paulin, Risc, Mpeg, DctF, IdctC
  localparam int unsigned CORE_PI  [NUM_CORES] = '{32, 20, 80, 32, 32, 32, 58, 129, 96};
  localparam int unsigned CORE_PO  [NUM_CORES] = '{16, 16, 80, 32, 32, 98, 128, 260, 224};
  localparam dft_e        CORE_DFT [NUM_CORES] = '{DFT_NS, DFT_NS, DFT_NS, DFT_NS, DFT_NS,
                                                   DFT_NS, DFT_SCAN, DFT_NS, DFT_NS};
  localparam int unsigned CORE_TW  [NUM_CORES] = '{16, 16, 64, 32, 32, 32, 63, 64, 32};
  localparam int unsigned CORE_LANE[NUM_CORES] = '{0, 16, 0, 0, 32, 32, 0, 0, 0};
  // a scan core spends 4 lanes on clock, reset, test mode and scan enable
  localparam int unsigned SCAN_CTRL_LANES = 4;

  // offset of core c in a bus that concatenates one field per core
  function automatic int unsigned sum_before(input int unsigned v[NUM_CORES], input int unsigned c);
    int unsigned s = 0;
    for (int unsigned i = 0; i < c; i++) s += v[i];
    return s;
  endfunction

  function automatic int unsigned sum_all(input int unsigned v[NUM_CORES]);
    return sum_before(v, NUM_CORES);
  endfunction

  // ---------------------------------------------------------------- memories
  localparam int unsigned NUM_MEM    = 10;
  localparam int unsigned MEM_MAX_DW = 32;
  localparam int unsigned MEM_MAX_AW = 9;
  localparam int unsigned MEM_DW   [NUM_MEM] = '{16, 16, 16, 16, 16, 16, 16, 16, 32, 32};
  localparam int unsigned MEM_WORDS[NUM_MEM] = '{128, 128, 128, 128, 256, 256, 256, 256, 512, 512};
  localparam int unsigned MEM_MHZ  [NUM_MEM] = '{133, 133, 266, 266, 133, 133, 133, 133, 133, 133};

  // BIST groups: {1,2} {3,4} {5,6,7,8} {9,10}, all serially connected
  localparam int unsigned NUM_GRP = 4;
  localparam int unsigned GRP_FIRST[NUM_GRP] = '{0, 2, 4, 8};
  localparam int unsigned GRP_K    [NUM_GRP] = '{2, 2, 4, 2};
  localparam int unsigned GRP_SESS [NUM_GRP] = '{0, 0, 0, 0};

endpackage
