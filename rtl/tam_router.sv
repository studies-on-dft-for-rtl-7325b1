// tam_router -- test access mechanism (TAM) that shares the SoC test pins
// among the cores.
//
// The test schedule gives every core a TAM width TWC[c] and a fixed group of
// lanes starting at LANE[c]; cores tested at the same time have disjoint
// lanes, cores tested at different times may reuse the same ones. Input
// lanes are fanned out to every core that owns them (a core that is not under
// test ignores them: its wrapper is in another mode). Each output lane is the
// OR of the test outputs of the active cores (core_act) that own it, so a core
// that is not active cannot disturb a lane. Core test ports are packed one
// after another, core 0 at bit 0, in core_ti and core_to.
//
// Purely combinational. An assertion flags two active cores on one lane.
// Defaults are the 64-lane SoC of the published schedule (SoC4, scan and
// NS-DFT mixed): TAM widths from that schedule, lane offsets derived from its
// start and end times; the OR-merging is this design's choice.
module tam_router #(
  parameter int unsigned W  = dft_pkg::SOC_TAM_W,
  parameter int unsigned NC = dft_pkg::NUM_CORES,
  parameter int unsigned TWC  [NC] = dft_pkg::CORE_TW,
  parameter int unsigned LANE [NC] = dft_pkg::CORE_LANE,
  localparam int unsigned SUMTW = dft_pkg::sum_all(TWC)
) (
  input  logic [W-1:0]     tam_in,
  output logic [W-1:0]     tam_out,
  input  logic [NC-1:0]    core_act,
  output logic [SUMTW-1:0] core_ti,
  input  logic [SUMTW-1:0] core_to
);

  function automatic int unsigned offset(input int unsigned c);
    return dft_pkg::sum_before(TWC, c);
  endfunction

  always_comb begin
    core_ti = '0;
    tam_out = '0;
    for (int unsigned c = 0; c < NC; c++) begin
      for (int unsigned b = 0; b < TWC[c]; b++) begin
        core_ti[offset(c) + b] = tam_in[LANE[c] + b];
        if (core_act[c]) tam_out[LANE[c] + b] = tam_out[LANE[c] + b] | core_to[offset(c) + b];
      end
    end
  end

  // lanes of concurrently active cores must not overlap
  logic overlap;
  always_comb begin
    overlap = 1'b0;
    for (int unsigned a = 0; a < NC; a++)
      for (int unsigned b = a + 1; b < NC; b++)
        if (core_act[a] && core_act[b] &&
            LANE[a] < LANE[b] + TWC[b] && LANE[b] < LANE[a] + TWC[a]) overlap = 1'b1;
  end

  always_comb a_no_overlap: assert (!overlap) else $error("tam_router: active cores share a lane");

endmodule
