// tb_mbist_controller -- self-checking test of the BIST controller.
//
// Three groups in two sessions (groups 0 and 2 in session 0, group 1 in
// session 1). Each group is modelled here as a wrapper that answers start
// with done after a fixed number of cycles (7, 12, 4) and drops done one
// cycle after start falls; its fail answer is set per run. Checked: groups of
// a session start in the same cycle, a later session starts only after the
// earlier one has finished its handshake, every group is started exactly
// once per run, the run ends after the cycle count worked out from the
// delays, and pass / fail_grp report the modelled results.
`timescale 1ns/1ps
module tb_mbist_controller;

  localparam int unsigned NG = 3;
  localparam int unsigned SESS [NG] = '{0, 1, 0};
  localparam int DLY [NG] = '{7, 12, 4};

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

  logic start, busy, done, pass;
  logic [NG-1:0] fail_grp, grp_start, grp_done, grp_fail, fail_set;

  mbist_controller #(.NG(NG), .NSESS(2), .SESS(SESS)) dut (
    .clk, .rst_n, .start, .busy, .done, .pass, .fail_grp,
    .grp_start, .grp_done, .grp_fail);

  // behavioural wrappers
  int cnt [NG];
  int starts [NG];
  int t_rise [NG];
  int cyc;
  always_ff @(posedge clk) cyc <= cyc + 1;

  for (genvar g = 0; g < NG; g++) begin : g_w
    logic prev;
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        grp_done[g] <= 1'b0; cnt[g] <= 0; prev <= 1'b0;
      end else begin
        prev <= grp_start[g];
        if (grp_start[g] && !prev) begin
          starts[g] <= starts[g] + 1;
          t_rise[g] <= cyc;
        end
        if (!grp_start[g]) begin
          grp_done[g] <= 1'b0; cnt[g] <= 0;
        end else if (cnt[g] == DLY[g]) begin
          grp_done[g] <= 1'b1;
        end else begin
          cnt[g] <= cnt[g] + 1;
        end
      end
    end
    assign grp_fail[g] = grp_done[g] & fail_set[g];
  end

  // a session-1 group must never run together with a session-0 group
  int overlap = 0;
  always @(posedge clk) if (rst_n && grp_start[1] && (grp_start[0] || grp_start[2] || grp_done[0] || grp_done[2])) overlap++;

  task automatic run(input logic [NG-1:0] fs, output int cycles);
    fail_set = fs;
    for (int g = 0; g < NG; g++) starts[g] = 0;
    @(negedge clk); start = 1'b1;
    @(negedge clk); start = 1'b0;
    cycles = 1;
    while (!done && cycles < 1000) begin @(negedge clk); cycles++; end
  endtask

  int c;
  // expected length, worked out from the handshake: a session whose slowest
  // group needs D cycles lasts D + 5 edges (start register, D counts, done
  // register, sample and release, done low, low seen), plus one edge to take
  // the start pulse
  localparam int EXP = 1 + (7 + 5) + (12 + 5);

  initial begin
    start = 0; fail_set = '0; cyc = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(!busy && !done, "idle after reset");

    run(3'b000, c);
    check(done && pass && fail_grp == '0, "all groups pass");
    check(t_rise[0] == t_rise[2], "groups of one session start together");
    check(t_rise[1] > t_rise[0] + 7, "session 1 starts after session 0");
    check(starts[0] == 1 && starts[1] == 1 && starts[2] == 1, "each group started once");
    check(overlap == 0, "sessions do not overlap");
    check(c == EXP, $sformatf("run length %0d, expected %0d", c, EXP));
    repeat (5) @(negedge clk);
    check(done && pass, "result held after the run");

    run(3'b010, c);
    check(done && !pass && fail_grp == 3'b010, $sformatf("failing group 1 reported: %b", fail_grp));

    run(3'b101, c);
    check(done && !pass && fail_grp == 3'b101, $sformatf("failing groups 0,2 reported: %b", fail_grp));

    run(3'b000, c);
    check(pass && fail_grp == '0, "fail flags cleared by a new run");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
