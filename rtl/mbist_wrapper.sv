// mbist_wrapper -- memory BIST wrapper shared by a group of K single-port memories.
//
// The wrapper holds one address generator, one data generator, a response
// analyzer and, for each memory, a set of bypass flip-flops. It runs the 8N
// March Y test {up(w0); up(r0,w1,r1); down(r1,w0,r0); up(r0)} once per data
// background. How the memories share the logic is set by CONN:
//   * CONN_PARALLEL: all K memories have the same depth. They get the same
//     address, write data and commands in the same cycle and are tested
//     together; each memory has its own comparator (masked to its width,
//     BIT_W) and its own fail flag. One pass takes 8 * 2**AW cycles.
//   * CONN_SERIAL: all K memories have the same width; depths may differ
//     (DEPTH, each at most 2**AW). The address generator covers the sum of
//     the depths; its upper part selects the memory (with equal
//     power-of-two depths these are simply clog2(K) extra address bits), so
//     the group is tested as one memory of sum(DEPTH) words with a single
//     comparator. One pass takes 8 * sum(DEPTH) cycles.
// The connection rules, the shared generator and analyzer, the extra select
// bits and the 8N test length follow the published method; March Y as the
// 8N algorithm, the backgrounds and the handshake are this design's choices.
//
// Data backgrounds (NUM_BG of them, in this order): solid zeros, checkerboard
// (0101.. inverted on odd addresses), inverted checkerboard. A "1" write
// stores the inverse of the background word.
//
// Handshake (four-phase, safe across clock domains when start is
// synchronized): raise start and hold it; the wrapper takes over the memory
// ports, runs, and raises done. fail and fail_mem are stable while done is
// high. Dropping start returns the memories to the functional ports and
// clears done on the next edge. With start seen high in cycle 0, done rises
// after 8*N*NUM_BG + 2 edges (one cycle to compare the last read).
//
// While the test is not running, the functional ports reach the memories.
// With scan_mode high the functional read data comes from the bypass
// flip-flops, which capture write data XOR address XOR write enable of each
// access, so that the logic around the memory can be scan tested.
module mbist_wrapper
  import dft_pkg::*;
#(
  parameter conn_e       CONN   = CONN_SERIAL,
  parameter int unsigned K      = 4,
  parameter int unsigned AW     = 8,
  parameter int unsigned DW     = 16,
  parameter int unsigned NUM_BG = 1,
  parameter int unsigned BIT_W [K] = '{default: DW},
  parameter int unsigned DEPTH [K] = '{default: 2 ** AW}
) (
  input  logic                   clk,
  input  logic                   rst_n,
  // control
  input  logic                   start,
  output logic                   done,
  output logic                   fail,
  output logic [K-1:0]           fail_mem,
  input  logic                   scan_mode,
  // functional side
  input  logic [K-1:0]           f_ce,
  input  logic [K-1:0]           f_we,
  input  logic [K-1:0][AW-1:0]   f_addr,
  input  logic [K-1:0][DW-1:0]   f_wdata,
  output logic [K-1:0][DW-1:0]   f_rdata,
  // memory side
  output logic [K-1:0]           m_ce,
  output logic [K-1:0]           m_we,
  output logic [K-1:0][AW-1:0]   m_addr,
  output logic [K-1:0][DW-1:0]   m_wdata,
  input  logic [K-1:0][DW-1:0]   m_rdata
);

  localparam bit          SER   = (CONN == CONN_SERIAL);
  localparam int unsigned SW    = (K > 1) ? $clog2(K) : 1;
  localparam int unsigned NWORD = SER ? total_words() : DEPTH[0];
  localparam int unsigned TAW   = (NWORD > 1) ? $clog2(NWORD) : 1;
  localparam logic [TAW-1:0] LAST = TAW'(NWORD - 1);
  localparam int unsigned BGW   = (NUM_BG > 1) ? $clog2(NUM_BG) : 1;

  typedef enum logic [1:0] { S_IDLE, S_RUN, S_FLUSH, S_DONE } state_e;

  state_e          state;
  logic [BGW-1:0]  bg;
  logic [1:0]      elem;
  logic [1:0]      op;
  logic [TAW-1:0]  addr;

  // first word of memory k in the address space of a serial group
  function automatic int unsigned base(input int unsigned k);
    int unsigned b = 0;
    for (int unsigned i = 0; i < k; i++) b += DEPTH[i];
    return b;
  endfunction

  function automatic int unsigned total_words();
    return base(K);
  endfunction

  // ---------------------------------------------------------------- March Y table
  function automatic logic [1:0] nops(input logic [1:0] e);
    return (e == 2'd1 || e == 2'd2) ? 2'd3 : 2'd1;
  endfunction

  function automatic logic op_read(input logic [1:0] e, input logic [1:0] o);
    return !(e == 2'd0 || o == 2'd1);
  endfunction

  // value written or expected: 0 = background, 1 = inverted background
  function automatic logic op_val(input logic [1:0] e, input logic [1:0] o);
    unique case (e)
      2'd0:    return 1'b0;
      2'd1:    return (o != 2'd0);
      2'd2:    return (o == 2'd0);
      default: return 1'b0;
    endcase
  endfunction

  function automatic logic elem_down(input logic [1:0] e);
    return (e == 2'd2);
  endfunction

  function automatic logic [DW-1:0] background(input logic [BGW-1:0] b, input logic a0);
    logic [DW-1:0] chk;
    for (int i = 0; i < DW; i++) chk[i] = logic'(i % 2) ^ a0;
    unique case (b)
      BGW'(0): return '0;
      BGW'(1): return chk;
      default: return ~chk;
    endcase
  endfunction

  // ---------------------------------------------------------------- generators
  logic          cur_read;
  logic [DW-1:0] cur_data;
  logic [SW-1:0] cur_sel;
  logic          bist_act;

  assign bist_act = (state == S_RUN) || (state == S_FLUSH);
  assign cur_read = op_read(elem, op);
  // serial: the upper part of the group address selects the memory, the rest
  // is the word address inside it (plain bit slicing when all depths are
  // equal powers of two)
  logic [AW-1:0] loc_addr;
  always_comb begin
    cur_sel  = '0;
    loc_addr = AW'(addr);
    if (SER) begin
      for (int unsigned k = 0; k < K; k++) begin
        if (32'(addr) >= base(k)) begin
          cur_sel  = SW'(k);
          loc_addr = AW'(32'(addr) - base(k));
        end
      end
    end
  end

  assign cur_data = background(bg, loc_addr[0]) ^ {DW{op_val(elem, op)}};

  // ---------------------------------------------------------------- port muxing
  logic [K-1:0][DW-1:0] byp_q;

  always_comb begin
    for (int k = 0; k < K; k++) begin
      if (state == S_RUN) begin
        m_ce[k]    = SER ? (cur_sel == SW'(k)) : 1'b1;
        m_we[k]    = !cur_read;
        m_addr[k]  = loc_addr;
        m_wdata[k] = cur_data;
      end else if (bist_act) begin
        m_ce[k]    = 1'b0;
        m_we[k]    = 1'b0;
        m_addr[k]  = '0;
        m_wdata[k] = '0;
      end else begin
        m_ce[k]    = f_ce[k];
        m_we[k]    = f_we[k];
        m_addr[k]  = f_addr[k];
        m_wdata[k] = f_wdata[k];
      end
      f_rdata[k] = scan_mode ? byp_q[k] : m_rdata[k];
    end
  end

  // bypass flip-flops
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) byp_q <= '0;
    else if (scan_mode) begin
      for (int k = 0; k < K; k++)
        if (f_ce[k]) byp_q[k] <= f_wdata[k] ^ DW'(f_addr[k]) ^ {DW{f_we[k]}};
    end
  end

  // ---------------------------------------------------------------- sequencer
  logic last_addr;
  assign last_addr = elem_down(elem) ? (addr == '0) : (addr == LAST);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      bg    <= '0;
      elem  <= '0;
      op    <= '0;
      addr  <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (start) begin
          state <= S_RUN;
          bg    <= '0;
          elem  <= '0;
          op    <= '0;
          addr  <= '0;
        end
        S_RUN: begin
          if (op != nops(elem) - 2'd1) begin
            op <= op + 2'd1;
          end else begin
            op <= '0;
            if (!last_addr) begin
              addr <= elem_down(elem) ? addr - 1'b1 : addr + 1'b1;
            end else if (elem != 2'(MARCH_ELEMS - 1)) begin
              elem <= elem + 2'd1;
              addr <= elem_down(elem + 2'd1) ? LAST : '0;
            end else if (32'(bg) != NUM_BG - 1) begin
              bg   <= bg + 1'b1;
              elem <= '0;
              addr <= '0;
            end else begin
              state <= S_FLUSH;
            end
          end
        end
        S_FLUSH: state <= S_DONE;
        S_DONE:  if (!start) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  assign done = (state == S_DONE);

  // ---------------------------------------------------------------- response analyzer
  // bits of the shared data word that memory k really has
  function automatic logic [DW-1:0] width_mask(input int k);
    logic [DW-1:0] m;
    for (int i = 0; i < DW; i++) m[i] = (i < int'(BIT_W[k]));
    return m;
  endfunction

  logic          rd_v;
  logic [DW-1:0] rd_exp;
  logic [SW-1:0] rd_sel;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_v     <= 1'b0;
      rd_exp   <= '0;
      rd_sel   <= '0;
      fail_mem <= '0;
    end else begin
      rd_v   <= (state == S_RUN) && cur_read;
      rd_exp <= cur_data;
      rd_sel <= cur_sel;
      if (state == S_IDLE && start) begin
        fail_mem <= '0;
      end else if (rd_v) begin
        for (int k = 0; k < K; k++) begin
          if (SER) begin
            if (rd_sel == SW'(k) && ((m_rdata[k] ^ rd_exp) & width_mask(k)) != '0)
              fail_mem[k] <= 1'b1;
          end else begin
            if (((m_rdata[k] ^ rd_exp) & width_mask(k)) != '0) fail_mem[k] <= 1'b1;
          end
        end
      end
    end
  end

  assign fail = |fail_mem;

  // ---------------------------------------------------------------- checks
  // serial connection: at most one memory of the group is active at a time
  a_serial_onehot: assert property (@(posedge clk) disable iff (!rst_n)
    (SER && bist_act) |-> $onehot0(m_ce));
  // results do not change while done is shown
  a_fail_stable: assert property (@(posedge clk) disable iff (!rst_n)
    (done && $past(done)) |-> $stable(fail_mem));

endmodule
