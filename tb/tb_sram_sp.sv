// tb_sram_sp -- self-checking test of the single-port SRAM model.
//
// Writes random words to every address of a 128 x 16 memory, reads them back
// in random order against a reference array kept here, and checks the one
// cycle read latency, that rdata holds without a read, and that ce low blocks
// writes.
`timescale 1ns/1ps
module tb_sram_sp;

  localparam int unsigned WORDS = 128, DW = 16;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  logic ce, we;
  logic [6:0] addr;
  logic [DW-1:0] wdata, rdata;
  logic [DW-1:0] ref_mem [WORDS];

  sram_sp #(.WORDS(WORDS), .DW(DW)) dut (.clk, .ce, .we, .addr, .wdata, .rdata);

  initial begin
    ce = 0; we = 0; addr = '0; wdata = '0;
    @(negedge clk);
    for (int a = 0; a < WORDS; a++) begin
      ce = 1; we = 1; addr = 7'(a); wdata = DW'($urandom);
      ref_mem[a] = wdata;
      @(negedge clk);
    end
    // ce low: write must not happen
    ce = 0; we = 1; addr = 7'd9; wdata = ~ref_mem[9];
    @(negedge clk);
    for (int n = 0; n < 300; n++) begin
      int a;
      a = $urandom_range(WORDS - 1);
      ce = 1; we = 0; addr = 7'(a);
      @(posedge clk); #1;
      check(rdata == ref_mem[a], $sformatf("read addr %0d", a));
      @(negedge clk);
    end
    // hold: no read, data stays
    ce = 1; we = 0; addr = 7'd9;
    @(negedge clk);
    ce = 0; addr = 7'd10;
    repeat (3) @(negedge clk);
    check(rdata == ref_mem[9], "rdata holds without a read; ce low blocked the write");
    // a write does not change rdata
    ce = 1; we = 1; addr = 7'd11; wdata = 16'h5A5A;
    @(negedge clk);
    check(rdata == ref_mem[9], "write leaves rdata unchanged");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
