// sram_sp -- single-port, word-access embedded SRAM (the memory under test).
//
// One access per clock: with ce high, we high writes wdata to addr; we low
// reads addr and presents the word on rdata after the next rising edge (one
// cycle read latency). rdata holds its value while no read is done. The
// contents are not reset, as in a real SRAM macro. Written as a plain array so
// that it simulates and synthesizes to a memory cell; the depth and width of
// each instance are those of the memory table. The read latency and the
// absence of a byte enable are choices of this design.
module sram_sp #(
  parameter int unsigned WORDS = 256,
  parameter int unsigned DW    = 16,
  localparam int unsigned AW   = $clog2(WORDS)
) (
  input  logic          clk,
  input  logic          ce,
  input  logic          we,
  input  logic [AW-1:0] addr,
  input  logic [DW-1:0] wdata,
  output logic [DW-1:0] rdata
);

  logic [DW-1:0] mem [WORDS];

  always_ff @(posedge clk) begin
    if (ce) begin
      if (we) mem[addr] <= wdata;
      else    rdata     <= mem[addr];
    end
  end

endmodule
