// sync2 -- two-flip-flop synchronizer for one level signal entering the
// clock domain of clk. The output follows the input two to three edges of clk
// later. Used on the request/acknowledge levels between the BIST controller
// and BIST wrappers that run on another memory clock.
module sync2 (
  input  logic clk,
  input  logic rst_n,
  input  logic d,
  output logic q
);

  logic meta;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      meta <= 1'b0;
      q    <= 1'b0;
    end else begin
      meta <= d;
      q    <= meta;
    end
  end

endmodule
