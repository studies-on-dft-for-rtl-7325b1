// tb_tam_router -- self-checking test of the TAM lane router at its default
// configuration (64 lanes, nine cores, lanes of the SoC4 schedule).
//
// The tester walks through the test sessions of the schedule (sets of cores
// tested at the same time) and applies random lane data and random core test
// outputs. Checked against a reference built here from the lane table: every
// core receives its own lanes, every output lane carries the OR of the active
// cores that own it, lanes of inactive cores stay 0, and in every session the
// active cores fit in the 64 lanes.
`timescale 1ns/1ps
module tb_tam_router;
  import dft_pkg::*;

  localparam int unsigned SUMTW = sum_all(CORE_TW);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  logic [SOC_TAM_W-1:0] tam_in, tam_out;
  logic [NUM_CORES-1:0] core_act;
  logic [SUMTW-1:0]     core_ti, core_to;

  tam_router dut (.tam_in, .tam_out, .core_act, .core_ti, .core_to);

  // sessions of the schedule (bit c = core c, cores numbered from 0)
  localparam int NSES = 8;
  localparam logic [8:0] SES [NSES] = '{
    9'b001000000,   // Mpeg (scan)        0-237
    9'b100100000,   // IdctC, Risc        237-288
    9'b100000000,   // IdctC              288-465
    9'b010000000,   // DctF               465-480
    9'b000010011,   // Gcd, Iir, Paulin   480-484
    9'b000010000,   // Paulin             486-493
    9'b000000100,   // Jwf                493-496
    9'b000001000    // Lwf                496-499
  };

  initial begin
    core_act = '0; tam_in = '0; core_to = '0;
    #1;
    for (int it = 0; it < 400; it++) begin
      int s, off, width;
      logic [SOC_TAM_W-1:0] exp_out;
      s = it % NSES;
      core_act = SES[s];
      for (int b = 0; b < SOC_TAM_W; b++) tam_in[b] = 1'($urandom);
      for (int b = 0; b < int'(SUMTW); b++) core_to[b] = 1'($urandom);
      #1;
      exp_out = '0;
      off = 0; width = 0;
      for (int c = 0; c < NUM_CORES; c++) begin
        for (int b = 0; b < int'(CORE_TW[c]); b++) begin
          check(core_ti[off + b] == tam_in[CORE_LANE[c] + b], $sformatf("core %0d lane %0d in", c, b));
          if (core_act[c]) exp_out[CORE_LANE[c] + b] |= core_to[off + b];
        end
        if (core_act[c]) width += CORE_TW[c];
        off += CORE_TW[c];
      end
      check(tam_out == exp_out, $sformatf("session %0d tam_out", s));
      check(width <= SOC_TAM_W, $sformatf("session %0d fits in the TAM", s));
    end
    // nothing active: all output lanes 0
    core_act = '0; #1;
    check(tam_out == '0, "idle TAM drives 0");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
